// Self-checking testbench of the receiver controller, at its default
// parameters (10 MHz master clock, real waiting and observation times).
//
// Over two full cycles of 1A..3B it measures, from the outside:
//   * the length of every state (waiting 200000/20000/2000 clocks, i.e.
//     20/2.0/0.2 ms; observation 269 sampling periods of 3000/300/30 clocks),
//     and the order of the states;
//   * the analogue control and receiver state codes in each state;
//   * the sampling clock: 269 rising edges per observation state, the right
//     period and duty, no edges in waiting states;
//   * the sample strobe: 256 per observation, none in the first 13 sampling
//     periods, each one in the cycle the sampling clock falls;
//   * one fft_start pulse in the first cycle after each observation state;
//   * out_enable high exactly in waiting states;
//   * the whole cycle length, 1117770 clocks (111.8 ms).
module tb_pwr_controller;
  import pwr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  rx_state_e state;
  logic [1:0] analog_ctrl, receiver_state;
  logic sampling_clk, sample_strobe, fft_start, out_enable;

  int checks = 0, failures = 0;

  pwr_controller dut (
    .clk, .rst_n, .state, .analog_ctrl, .receiver_state,
    .sampling_clk, .sample_strobe, .fft_start, .out_enable
  );

  always #50 clk = ~clk;

  initial begin
    repeat (2_400_000) @(posedge clk);
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

  // expected values per state index 0..5 = 1A,1B,2A,2B,3A,3B
  function automatic int exp_len(input int s);
    case (s)
      0: return 200_000;
      1: return 269 * 3000;
      2: return 20_000;
      3: return 269 * 300;
      4: return 2_000;
      default: return 269 * 30;
    endcase
  endfunction

  function automatic int exp_div(input int s);
    return (s == 1) ? 3000 : (s == 3) ? 300 : 30;
  endfunction

  initial begin
    int s, len, rises, strobes, starts, last_rise, period_bad, strobe_bad;
    int total;
    logic prev_sclk;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    total = 0;
    for (int round = 0; round < 2; round++) begin
      for (s = 0; s < 6; s++) begin
        check(int'(state) == s, $sformatf("state %0d, want %0d", state, s));
        check(analog_ctrl == 2'(s / 2 + 1) && receiver_state == 2'(s / 2 + 1),
              $sformatf("state %0d: band codes %0d/%0d", s, analog_ctrl, receiver_state));
        check(out_enable == (s % 2 == 0), $sformatf("state %0d: out_enable", s));
        len = 0; rises = 0; strobes = 0; starts = 0; last_rise = -1;
        period_bad = 0; strobe_bad = 0;
        prev_sclk = 1'b0;
        // count cycles until the state changes, watching the outputs
        while (int'(state) == s) begin
          if (sampling_clk && !prev_sclk) begin
            if (last_rise >= 0 && len - last_rise != exp_div(s)) period_bad++;
            last_rise = len;
            rises++;
          end
          if (sample_strobe) begin
            strobes++;
            // strobe in the cycle the sampling clock has just fallen,
            // half a period after the rising edge, past the ADC latency
            if (sampling_clk || !prev_sclk || len - last_rise != exp_div(s) / 2 ||
                rises <= 13) strobe_bad++;
          end
          if (fft_start) starts += (len == 0) ? 1 : 100;  // only in the first cycle
          prev_sclk = sampling_clk;
          @(negedge clk);
          len++;
        end
        total += len;
        check(len == exp_len(s), $sformatf("state %0d lasted %0d, want %0d", s, len, exp_len(s)));
        if (s % 2 == 1) begin
          check(rises == 269, $sformatf("state %0d: %0d sampling edges", s, rises));
          check(strobes == 256, $sformatf("state %0d: %0d strobes", s, strobes));
          check(period_bad == 0, $sformatf("state %0d: %0d bad periods", s, period_bad));
          check(strobe_bad == 0, $sformatf("state %0d: %0d misplaced strobes", s, strobe_bad));
        end else begin
          check(rises == 0 && strobes == 0, $sformatf("state %0d: sampling while waiting", s));
          // first cycle of a waiting state that follows an observation
          check(starts == ((round == 0 && s == 0) ? 0 : 1),
                $sformatf("state %0d: %0d fft_start pulses", s, starts));
        end
        if (s % 2 == 1) check(starts == 0, $sformatf("state %0d: start while observing", s));
      end
    end
    check(total == 2 * 1_117_770, $sformatf("two cycles took %0d clocks", total));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
