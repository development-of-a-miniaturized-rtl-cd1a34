// End-to-end testbench of the receiver digital part at its default
// parameters: one full observation cycle over the three bands, 10 MHz master
// clock, real waiting and observation times (about 112 ms of receiver time).
//
// The analogue chain is modelled as an ideal band-pass: the ADC model sees a
// single tone chosen by the analogue control word, one per band, each on an
// exact bin of that band's sampling rate (band 1: bin 20 = 260.4 Hz,
// band 2: bin 40 = 5.208 kHz, band 3: bin 60 = 78.13 kHz). The testbench
// itself watches the sampling clock and works out which ADC codes the FFT
// must receive (samples 0..255 of each observation, after the 13-clock ADC
// latency), computes their DFT in floating point and compares every one of
// the 512 result words of each band, in order real f0..f255 then imaginary
// f0..f255, allowing a few LSBs of rounding. It also checks
//   * that each band's spectrum peaks at its tone's bin;
//   * the receiver_state tag, the FFT latency (fft_finish 839 clocks after
//     the end of the observation, first word one clock later), and that no
//     result leaves during an observation state;
//   * the cycle time of 1117770 clocks (111.8 ms);
// and counts how often each mechanism happened: the six states, band
// switches of the analogue control, samples dropped for the ADC latency,
// FFT runs, real and imaginary output runs. A mechanism that never happened
// counts as a failure.
module tb_pwr_digital_part;
  import pwr_pkg::*;

  localparam int  N    = 256;
  localparam real TOL  = 4.0;
  localparam real PI   = 3.14159265358979323846;
  localparam real AMP  = 0.45;                       // volts at the ADC input

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

  always #50 clk = ~clk;    // 10 MHz master clock, 100 time steps per period
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (1_500_000) @(posedge clk);
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

  // ------------------------------------------------------------------
  // Stimulus: one tone per band, on bin tone_bin(b) of that band
  // ------------------------------------------------------------------
  function automatic int tone_bin(input int b);
    return 20 * b;
  endfunction
  function automatic real fs_of(input int b);   // sampling rate in Hz
    return (b == 1) ? 1.0e7 / 3000.0 : (b == 2) ? 1.0e7 / 300.0 : 1.0e7 / 30.0;
  endfunction

  // Analogue input, updated every master clock from the simulated time.
  // The sampling clock rises on a master clock edge, so the value at that
  // edge is the one the ADC samples.
  always @(negedge clk) begin
    int b;
    real t;
    b = int'(analog_ctrl);
    t = real'(cyc) * 1.0e-7;
    if (b >= 1 && b <= 3)
      vin = AMP * $cos(2.0 * PI * real'(tone_bin(b)) * fs_of(b) / real'(N) * t + 0.3 * b);
    else
      vin = 0.0;
  end

  // ------------------------------------------------------------------
  // Reference: codes the ADC takes at each sampling-clock rising edge
  // ------------------------------------------------------------------
  int  ref_codes [4][N];     // per band
  int  edges_seen [4];

  function automatic int code_of(input real v);
    real x;
    x = v * 8192.0;
    return $rtoi(x >= 0.0 ? x + 0.5 : x - 0.5);
  endfunction

  always @(posedge sampling_clk) begin
    int b;
    b = int'(analog_ctrl);
    if (edges_seen[b] < N) ref_codes[b][edges_seen[b]] = code_of(vin);
    edges_seen[b]++;
  end

  // ------------------------------------------------------------------
  // Mechanism counters
  // ------------------------------------------------------------------
  int n_state [6];
  int n_band_switch = 0, n_latency_drop = 0, n_fft = 0, n_re_run = 0, n_im_run = 0;
  int n_hidden_obs = 0;
  rx_state_e prev_state;
  logic [1:0] prev_ctrl;
  logic prev_is_im = 1'b0, prev_valid = 1'b0;
  longint t_obs_end = -1, t_finish = -1;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.state != prev_state) n_state[int'(dut.u_ctrl.state)]++;
    if (analog_ctrl != prev_ctrl) n_band_switch++;
    if (prev_state inside {ST_1B, ST_2B, ST_3B} && !(dut.u_ctrl.state inside {ST_1B, ST_2B, ST_3B}))
      t_obs_end = cyc;
    if (dut.u_ctrl.state inside {ST_1B, ST_2B, ST_3B}) begin
      n_hidden_obs++;
      if (result_valid) check(1'b0, "result during an observation state");
    end
    if (result_valid && !prev_valid) n_re_run++;
    if (result_valid && result_is_im && !prev_is_im) n_im_run++;
    if (fft_finish) begin
      n_fft++;
      t_finish = cyc;
      check(t_finish - t_obs_end == 839,
            $sformatf("fft_finish %0d clocks after observation end", t_finish - t_obs_end));
    end
    prev_state <= dut.u_ctrl.state;
    prev_ctrl  <= analog_ctrl;
    prev_is_im <= result_is_im;
    prev_valid <= result_valid;
  end

  // ADC samples not passed on (pipeline filling): edges minus strobes
  int n_strobes = 0;
  always @(posedge clk) if (rst_n && dut.u_ctrl.sample_strobe) n_strobes++;

  // ------------------------------------------------------------------
  // Result checking
  // ------------------------------------------------------------------
  task automatic check_band(input int b);
    logic signed [17:0] re_w [N];
    logic signed [17:0] im_w [N];
    int  k, peak, peak_mag, mag;
    real rr, ri, ang;
    longint t_first;
    // wait for the first word of the spectrum
    while (!result_valid) @(posedge clk);
    t_first = cyc;
    check(t_first == t_finish + 1, "first word one clock after fft_finish");
    // the spectrum was taken in the previous band's observation; the tag
    // shows the current state's band, the one after b
    check(int'(receiver_state) == (b % 3) + 1,
          $sformatf("receiver_state %0d during band %0d output", receiver_state, b));
    for (k = 0; k < 2 * N; k++) begin
      check(result_valid && (result_is_im == (k >= N)),
            $sformatf("band %0d word %0d: valid/is_im", b, k));
      if (k < N) re_w[k] = fft_result; else im_w[k - N] = fft_result;
      @(posedge clk);
    end
    check(!result_valid, "more than 512 words");
    peak = -1; peak_mag = -1;
    for (k = 0; k < N; k++) begin
      rr = 0.0; ri = 0.0;
      for (int n = 0; n < N; n++) begin
        ang = 2.0 * PI * real'((k * n) % N) / real'(N);
        rr += real'(ref_codes[b][n]) * $cos(ang);
        ri -= real'(ref_codes[b][n]) * $sin(ang);
      end
      rr /= 16.0; ri /= 16.0;
      check((real'(re_w[k]) - rr) <= TOL && (rr - real'(re_w[k])) <= TOL &&
            (real'(im_w[k]) - ri) <= TOL && (ri - real'(im_w[k])) <= TOL,
            $sformatf("band %0d bin %0d: got (%0d,%0d) want (%.1f,%.1f)",
                      b, k, re_w[k], im_w[k], rr, ri));
      if (k < N / 2) begin
        mag = (re_w[k] < 0 ? -int'(re_w[k]) : int'(re_w[k])) +
              (im_w[k] < 0 ? -int'(im_w[k]) : int'(im_w[k]));
        if (mag > peak_mag) begin peak_mag = mag; peak = k; end
      end
    end
    check(peak == tone_bin(b), $sformatf("band %0d peak at bin %0d, want %0d", b, peak, tone_bin(b)));
    $display("band %0d: peak bin %0d (%.1f Hz), |X| ~ %0d", b, peak,
             real'(peak) * fs_of(b) / real'(N), peak_mag);
  endtask

  initial begin
    longint t_cycle_start;
    for (int b = 0; b < 4; b++) edges_seen[b] = 0;
    prev_state = ST_1A;
    prev_ctrl  = 2'd1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    t_cycle_start = cyc;

    check_band(1);
    check_band(2);
    check_band(3);

    // back in 1A: one full cycle has passed
    check(dut.u_ctrl.state == ST_1A, "in state 1A after band 3 output");
    check(cyc - t_cycle_start > 1_117_770 && cyc - t_cycle_start < 1_117_770 + 2000,
          $sformatf("cycle time %0d clocks", cyc - t_cycle_start));
    for (int b = 1; b <= 3; b++)
      check(edges_seen[b] == N + 13, $sformatf("band %0d: %0d sampling edges", b, edges_seen[b]));
    n_latency_drop = edges_seen[1] + edges_seen[2] + edges_seen[3] - n_strobes;
    check(n_latency_drop == 3 * 13, $sformatf("%0d samples dropped for latency", n_latency_drop));

    $display("states 1A..3B entered: %0d %0d %0d %0d %0d %0d",
             n_state[0], n_state[1], n_state[2], n_state[3], n_state[4], n_state[5]);
    $display("band switches %0d, latency drops %0d, FFT runs %0d, real runs %0d, imag runs %0d, observing cycles %0d",
             n_band_switch, n_latency_drop, n_fft, n_re_run, n_im_run, n_hidden_obs);
    for (int s = 1; s < 6; s++) check(n_state[s] > 0, $sformatf("state %0d never entered", s));
    check(n_state[0] > 0, "state 1A never re-entered");
    check(n_band_switch >= 3, "band never switched");
    check(n_latency_drop > 0, "ADC latency never skipped");
    check(n_fft == 3, $sformatf("%0d FFT runs", n_fft));
    check(n_re_run == 3 && n_im_run == 3, "output runs");
    check(n_hidden_obs > 0, "never observed");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
