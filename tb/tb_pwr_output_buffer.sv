// Self-checking testbench of the output buffer.
//
// Feeds spectra of 256 random (re, im) pairs as a contiguous stream and
// checks that the result pins carry the 256 real parts, one per cycle from
// the cycle after each input, immediately followed by the 256 imaginary
// parts in bin order, with result_valid and result_is_im set right, and
// nothing after the 512th word. It also checks that input arriving while
// enable is low is dropped, and that dropping enable in the middle of a
// readout abandons it and leaves the buffer ready for the next spectrum.
module tb_pwr_output_buffer;

  localparam int N = 256;

  logic clk = 1'b0, rst_n = 1'b0;
  logic enable = 1'b0, in_valid = 1'b0;
  logic signed [17:0] in_re = '0, in_im = '0;
  logic [17:0] result;
  logic result_valid, result_is_im;

  int checks = 0, failures = 0;

  pwr_output_buffer dut (
    .clk, .rst_n, .enable, .in_valid, .in_re, .in_im,
    .result, .result_valid, .result_is_im
  );

  always #50 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  logic [17:0] re_v [N];
  logic [17:0] im_v [N];

  // drive one spectrum; the monitor below checks the result side
  task automatic send(input int upto);
    for (int k = 0; k < N; k++) begin
      re_v[k] = 18'($urandom);
      im_v[k] = 18'($urandom);
    end
    for (int k = 0; k < upto; k++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_re = re_v[k];
      in_im = im_v[k];
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic expect_stream(input int words);
    int seen;
    seen = 0;
    // first word appears one cycle after the first input
    while (!result_valid) @(posedge clk);
    while (seen < words) begin
      check(result_valid, $sformatf("word %0d missing", seen));
      if (seen < N)
        check(!result_is_im && result == re_v[seen],
              $sformatf("real word %0d: %h want %h", seen, result, re_v[seen]));
      else
        check(result_is_im && result == im_v[seen - N],
              $sformatf("imag word %0d: %h want %h", seen - N, result, im_v[seen - N]));
      seen++;
      @(posedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // input while disabled is dropped
    send(N);
    repeat (600) begin
      @(posedge clk);
      check(!result_valid && result == '0, "output while disabled");
    end

    // two complete spectra
    for (int f = 0; f < 2; f++) begin
      @(negedge clk) enable = 1'b1;
      fork
        send(N);
        expect_stream(2 * N);
      join
      repeat (5) begin
        check(!result_valid, "output after 512 words");
        @(posedge clk);
      end
      @(negedge clk) enable = 1'b0;
    end

    // abandon a readout half way, then a clean spectrum
    @(negedge clk) enable = 1'b1;
    send(N);
    repeat (100) @(posedge clk);
    @(negedge clk) enable = 1'b0;
    @(posedge clk);
    @(posedge clk);
    check(!result_valid, "readout continued after enable dropped");
    @(negedge clk) enable = 1'b1;
    fork
      send(N);
      expect_stream(2 * N);
    join

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
