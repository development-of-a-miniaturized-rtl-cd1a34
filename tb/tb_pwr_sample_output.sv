// Workload testbench: the receiver's sample-output measurement.
//
// A 20 kHz sinusoid of 100 mV amplitude is applied with the amplifier in its
// 0 dB mode, and the digital part runs at its default parameters for eight
// full observation cycles (eight spectra per band, about 0.9 s of receiver
// time). The analogue chain is modelled as an ideal band-pass per band
// (10 Hz - 1 kHz, 1 - 10 kHz, 10 - 100 kHz) with the passband gains measured
// for the 0 dB mode (+0.42, +0.6 and -7.45 dB), feeding the 14-bit ADC model
// with a +/-1 V full scale.
//
// Expected, worked out here: the tone lies only in band 3, so bands 1 and 2
// return an all-zero spectrum, and every band-3 spectrum peaks at bin 15
// (20 kHz / (333.3 kHz / 256) = 15.36), with the neighbouring bin 16 second.
// Band-3 spectra must follow each other at the 1117770-clock (111.8 ms)
// cycle time.
module tb_pwr_sample_output;
  import pwr_pkg::*;

  localparam int  N       = 256;
  localparam int  CYCLES  = 8;
  localparam real PI      = 3.14159265358979323846;
  localparam real F_TONE  = 20.0e3;
  localparam real A_TONE  = 0.1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [13:0] adc_data;
  logic [1:0]  analog_ctrl, receiver_state;
  logic        sampling_clk, fft_finish, result_valid, result_is_im;
  logic [17:0] fft_result;
  real         vin = 0.0;

  int checks = 0, failures = 0;
  longint cyc = 0;

  pwr_digital_part dut (
    .clk, .rst_n, .adc_data, .analog_ctrl, .sampling_clk,
    .receiver_state, .fft_result, .fft_finish, .result_valid, .result_is_im
  );

  pwr_adc_model adc (.sclk(sampling_clk), .vin(vin), .dout(adc_data));

  always #50 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (CYCLES * 1_117_770 + 400_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", what);
    end
  endtask

  // ideal band-pass with the 0 dB mode passband gain of each band
  function automatic real band_gain(input int b, input real f);
    case (b)
      1: return (f >= 10.0   && f <= 1.0e3)   ? 10.0 ** (0.42 / 20.0)  : 0.0;
      2: return (f >= 1.0e3  && f <= 10.0e3)  ? 10.0 ** (0.6 / 20.0)   : 0.0;
      3: return (f >= 10.0e3 && f <= 100.0e3) ? 10.0 ** (-7.45 / 20.0) : 0.0;
      default: return 0.0;
    endcase
  endfunction

  always @(negedge clk)
    vin = A_TONE * band_gain(int'(analog_ctrl), F_TONE) *
          $sin(2.0 * PI * F_TONE * real'(cyc) * 1.0e-7);

  // mechanisms seen
  int n_spectra [4];
  longint last_band3 = -1;

  task automatic take_spectrum(output int band, output int mag [N]);
    logic signed [17:0] re_w [N];
    logic signed [17:0] im_w [N];
    while (!result_valid) @(posedge clk);
    // the tag shows the current state; the data are from the band before it
    band = (int'(receiver_state) == 1) ? 3 : int'(receiver_state) - 1;
    for (int k = 0; k < 2 * N; k++) begin
      if (k < N) re_w[k] = fft_result; else im_w[k - N] = fft_result;
      @(posedge clk);
    end
    for (int k = 0; k < N; k++)
      mag[k] = (re_w[k] < 0 ? -int'(re_w[k]) : int'(re_w[k])) +
               (im_w[k] < 0 ? -int'(im_w[k]) : int'(im_w[k]));
  endtask

  initial begin
    int band, peak, second, mag [N];
    longint t_now;
    for (int b = 0; b < 4; b++) n_spectra[b] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    for (int s = 0; s < 3 * CYCLES; s++) begin
      take_spectrum(band, mag);
      t_now = cyc;
      n_spectra[band]++;
      check(band == (s % 3) + 1, $sformatf("spectrum %0d from band %0d", s, band));
      if (band != 3) begin
        int mx;
        mx = 0;
        for (int k = 0; k < N; k++) if (mag[k] > mx) mx = mag[k];
        check(mx <= 1, $sformatf("band %0d spectrum not empty (max %0d)", band, mx));
      end else begin
        peak = 0;
        for (int k = 1; k < N / 2; k++) if (mag[k] > mag[peak]) peak = k;
        second = (peak == 1) ? 2 : 1;
        for (int k = 1; k < N / 2; k++)
          if (k != peak && mag[k] > mag[second]) second = k;
        check(peak == 15, $sformatf("band 3 peak at bin %0d, want 15", peak));
        check(second == 16, $sformatf("band 3 second bin %0d, want 16", second));
        if (last_band3 >= 0)
          check(t_now - last_band3 == 1_117_770,
                $sformatf("band 3 spectra %0d clocks apart", t_now - last_band3));
        last_band3 = t_now;
        $display("cycle %0d: band 3 peak bin %0d = %.0f Hz, |X| %0d", s / 3, peak,
                 real'(peak) * 1.0e7 / 30.0 / real'(N), mag[peak]);
      end
    end
    for (int b = 1; b <= 3; b++)
      check(n_spectra[b] == CYCLES, $sformatf("band %0d: %0d spectra", b, n_spectra[b]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
