// Self-checking testbench of the 256-point FFT module.
//
// Each frame loads 256 samples through in_valid (with idle gaps between
// them, as the controller's sample strobe has), pulses start, and checks:
//   * finish and the first out_valid come exactly CALC_CYC clocks after the
//     start, finish only once, and out_valid lasts exactly 256 cycles;
//   * every bin against a direct DFT worked out here in floating point and
//     divided by 16, to within 2 output LSBs.
// Frames: two tones on exact bins, a full-scale square wave, full-scale DC,
// random data,
// and a frame with extra samples after the 256th (which must be ignored)
// and a second start while busy (which must be ignored too).
module tb_pwr_fft256;
  import pwr_pkg::*;

  localparam int N    = 256;
  localparam int CALC = 839;
  localparam real TOL = 2.0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, start = 1'b0;
  logic signed [13:0] in_data = '0;
  logic busy, out_valid, finish;
  logic signed [17:0] out_re, out_im;

  int checks = 0, failures = 0;
  longint cyc = 0;

  pwr_fft256 dut (
    .clk, .rst_n, .in_valid, .in_data, .start,
    .busy, .out_valid, .out_re, .out_im, .finish
  );

  always #50 clk = ~clk;   // 10 MHz
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int samples [N];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic load(input int extra);
    for (int n = 0; n < N + extra; n++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_data  = (n < N) ? 14'(samples[n]) : 14'sh1fff;
      @(negedge clk);
      in_valid = 1'b0;
      repeat (n % 3) @(negedge clk);
    end
  endtask

  task automatic run_frame(input string name, input bit restart_while_busy);
    longint t_start, t_first;
    int nvalid, nfinish;
    real ref_re, ref_im, ang;
    real max_err;
    @(negedge clk);
    start = 1'b1;
    @(posedge clk);
    t_start = cyc;
    @(negedge clk);
    start = 1'b0;
    if (restart_while_busy) begin
      repeat (100) @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
    end
    nvalid = 0; nfinish = 0; t_first = -1; max_err = 0.0;
    while (nvalid < N) begin
      @(posedge clk);
      if (finish) nfinish++;
      if (out_valid) begin
        if (t_first < 0) begin
          t_first = cyc;
          check(finish, {name, ": finish with first bin"});
        end
        ref_re = 0.0; ref_im = 0.0;
        for (int n = 0; n < N; n++) begin
          ang = 2.0 * 3.14159265358979323846 * real'((nvalid * n) % N) / real'(N);
          ref_re += real'(samples[n]) * $cos(ang);
          ref_im -= real'(samples[n]) * $sin(ang);
        end
        ref_re /= 16.0; ref_im /= 16.0;
        if ((real'(out_re) - ref_re) > max_err) max_err = real'(out_re) - ref_re;
        if ((ref_re - real'(out_re)) > max_err) max_err = ref_re - real'(out_re);
        if ((real'(out_im) - ref_im) > max_err) max_err = real'(out_im) - ref_im;
        if ((ref_im - real'(out_im)) > max_err) max_err = ref_im - real'(out_im);
        check((real'(out_re) - ref_re) <= TOL && (ref_re - real'(out_re)) <= TOL &&
              (real'(out_im) - ref_im) <= TOL && (ref_im - real'(out_im)) <= TOL,
              $sformatf("%s: bin %0d got (%0d,%0d) want (%.1f,%.1f)",
                        name, nvalid, out_re, out_im, ref_re, ref_im));
        nvalid++;
      end else if (t_first >= 0) begin
        check(1'b0, {name, ": gap in the output stream"});
        break;
      end
    end
    // the cycle in which out_valid is first seen is CALC cycles after start
    check(t_first - t_start == CALC,
          $sformatf("%s: latency %0d, want %0d", name, t_first - t_start, CALC));
    @(posedge clk);
    check(!out_valid, {name, ": out_valid longer than 256 cycles"});
    check(nfinish == 1, $sformatf("%s: finish pulses %0d", name, nfinish));
    repeat (5) @(posedge clk);
    check(!busy, {name, ": still busy after output"});
    $display("%s: max error %.2f LSB", name, max_err);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Two tones on exact bins 10 and 77
    for (int n = 0; n < N; n++)
      samples[n] = $rtoi(3000.0 * $cos(2.0 * 3.14159265358979323846 * 10.0 * n / N) +
                         2000.0 * $sin(2.0 * 3.14159265358979323846 * 77.0 * n / N));
    load(0);
    run_frame("tones", 1'b0);

    // Full-scale square wave
    for (int n = 0; n < N; n++) samples[n] = ((n / 8) % 2) ? -8192 : 8191;
    load(0);
    run_frame("square", 1'b0);

    // Full-scale DC
    for (int n = 0; n < N; n++) samples[n] = 8191;
    load(0);
    run_frame("dc", 1'b0);

    // Random data, extra samples, restart while busy
    for (int n = 0; n < N; n++) samples[n] = int'($urandom_range(16383)) - 8192;
    load(20);
    run_frame("random", 1'b1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
