// Digital part of a band-switching spectrum plasma wave receiver.
//
// The receiver covers 10 Hz - 100 kHz in three bands (10 Hz - 1 kHz,
// 1 - 10 kHz, 10 - 100 kHz). Instead of digitising the whole range at once
// with one gain setting, an analogue chip band-limits and amplifies one band
// at a time, and this digital part switches the chip's band, clocks its ADC
// at the rate that suits the band, and turns 256 samples of each band into a
// complex spectrum. One full cycle over the three bands takes 111.8 ms at the
// 10 MHz master clock.
//
// Blocks, wired as in the receiver's block diagram of its digital part:
//   pwr_controller     time-driven sequencer of states 1A..3B; drives the
//                      2-bit analogue control, the ADC sampling clock, the FFT
//                      input rate and start, and the output buffer enable.
//   pwr_fft256         256-point FFT of the 14-bit ADC words; 839-clock
//                      calculation time; 18-bit real and imaginary results.
//   pwr_output_buffer  sends each spectrum as 256 real then 256 imaginary
//                      18-bit words.
//
// Ports: to the analogue chip go analog_ctrl and sampling_clk; from its ADC
// comes adc_data (two's complement), taken on the controller's sample strobe,
// half a sampling period after each sampling-clock rising edge. The result
// side carries receiver_state (band of the current state), fft_result,
// fft_finish (one-cycle pulse when a calculation ends), and this design's own
// result_valid and result_is_im markers.
//
// Timing of one band: observation state xB lasts (256 + 13) sampling periods;
// at its end the FFT starts; 839 clocks later fft_finish pulses, and the 512
// result words follow from the next cycle on, all inside the next waiting
// state (the shortest, 3A, is 2000 clocks).
module pwr_digital_part
  import pwr_pkg::*;
#(
  parameter int unsigned WAIT1     = WAIT1_CYC,
  parameter int unsigned WAIT2     = WAIT2_CYC,
  parameter int unsigned WAIT3     = WAIT3_CYC,
  parameter int unsigned DIV1      = SDIV1,
  parameter int unsigned DIV2      = SDIV2,
  parameter int unsigned DIV3      = SDIV3,
  parameter int unsigned CALC_CYC  = FFT_CALC_CYC
) (
  input  logic              clk,            // 10 MHz master clock
  input  logic              rst_n,
  // analogue front end
  input  logic [ADC_W-1:0]  adc_data,
  output logic [CTRL_W-1:0] analog_ctrl,
  output logic              sampling_clk,
  // result output
  output logic [CTRL_W-1:0] receiver_state,
  output logic [RES_W-1:0]  fft_result,
  output logic              fft_finish,
  output logic              result_valid,
  output logic              result_is_im
);

  initial begin
    assert (WAIT1 >= CALC_CYC + 2 * FFT_N + 2 &&
            WAIT2 >= CALC_CYC + 2 * FFT_N + 2 &&
            WAIT3 >= CALC_CYC + 2 * FFT_N + 2)
      else $error("a waiting state is too short for calculation and output");
  end

  rx_state_e               state;
  logic                    sample_strobe, fft_start, out_enable;
  logic                    fft_busy, fft_valid;
  logic signed [RES_W-1:0] fft_re, fft_im;

  pwr_controller #(
    .WAIT1(WAIT1), .WAIT2(WAIT2), .WAIT3(WAIT3),
    .DIV1(DIV1), .DIV2(DIV2), .DIV3(DIV3),
    .N_SAMPLES(FFT_N), .ADC_LAT(ADC_LATENCY)
  ) u_ctrl (
    .clk            (clk),
    .rst_n          (rst_n),
    .state          (state),
    .analog_ctrl    (analog_ctrl),
    .receiver_state (receiver_state),
    .sampling_clk   (sampling_clk),
    .sample_strobe  (sample_strobe),
    .fft_start      (fft_start),
    .out_enable     (out_enable)
  );

  pwr_fft256 #(
    .CALC_CYC(CALC_CYC)
  ) u_fft (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (sample_strobe),
    .in_data   (adc_data),
    .start     (fft_start),
    .busy      (fft_busy),
    .out_valid (fft_valid),
    .out_re    (fft_re),
    .out_im    (fft_im),
    .finish    (fft_finish)
  );

  pwr_output_buffer u_obuf (
    .clk          (clk),
    .rst_n        (rst_n),
    .enable       (out_enable),
    .in_valid     (fft_valid),
    .in_re        (fft_re),
    .in_im        (fft_im),
    .result       (fft_result),
    .result_valid (result_valid),
    .result_is_im (result_is_im)
  );

  // The spectrum has to leave before the next observation begins.
  a_no_output_while_observing : assert property (
    @(posedge clk) disable iff (!rst_n) is_observing(state) |-> !fft_busy)
    else $error("FFT still busy in an observation state");

endmodule
