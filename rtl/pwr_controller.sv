// Receiver controller: time-driven sequencer of the six receiver states.
//
// The receiver observes three bands in turn. Each band gets a waiting state
// (1A, 2A, 3A), in which the analogue chain settles after its filters were
// switched and the FFT module turns the previous band's samples into a
// spectrum, and then an observation state (1B, 2B, 3B), in which the ADC is
// clocked and 256 samples are handed to the FFT module. The cycle is
// 1A -> 1B -> 2A -> 2B -> 3A -> 3B -> 1A, and every change of state happens
// after a fixed number of master clocks; nothing external steers it.
//
// Outputs, registered or decoded straight from the state register:
//   analog_ctrl    2-bit band code for the analogue chip; it switches at the
//                  start of a waiting state and holds through the following
//                  observation state.
//   receiver_state 2-bit band code of the current state, for the reader of
//                  the result stream.
//   sampling_clk   ADC sampling clock, a divided master clock running only in
//                  observation states: N_SAMPLES + ADC_LAT periods of SDIVx
//                  master clocks, high for the first half of each period.
//   sample_strobe  one-cycle pulse at the falling edge of sampling_clk, for
//                  the periods from ADC_LAT on, so that exactly N_SAMPLES
//                  words are taken once the ADC pipeline has filled; this is
//                  the input rate of the FFT module.
//   fft_start      one-cycle pulse in the first cycle of each waiting state
//                  that follows an observation: the calculation start time.
//   out_enable     high during waiting states; the output buffer passes
//                  results only then.
//
// Waiting times (20, 2.0, 0.2 ms) and the observation length of 256 samples
// plus the 13-clock ADC latency follow the receiver description. The dividers
// 3000/300/30 are derived from its observation times and frequency
// resolutions. The band encoding, the sampling-clock duty cycle and the
// capture point at the falling edge are this design's own choices.
module pwr_controller
  import pwr_pkg::*;
#(
  parameter int unsigned WAIT1     = WAIT1_CYC,
  parameter int unsigned WAIT2     = WAIT2_CYC,
  parameter int unsigned WAIT3     = WAIT3_CYC,
  parameter int unsigned DIV1      = SDIV1,
  parameter int unsigned DIV2      = SDIV2,
  parameter int unsigned DIV3      = SDIV3,
  parameter int unsigned N_SAMPLES = FFT_N,
  parameter int unsigned ADC_LAT   = ADC_LATENCY
) (
  input  logic              clk,
  input  logic              rst_n,
  output rx_state_e         state,
  output logic [CTRL_W-1:0] analog_ctrl,
  output logic [CTRL_W-1:0] receiver_state,
  output logic              sampling_clk,
  output logic              sample_strobe,
  output logic              fft_start,
  output logic              out_enable
);

  localparam int unsigned PERIODS = N_SAMPLES + ADC_LAT;

  initial begin
    assert (DIV1 >= 2 && DIV2 >= 2 && DIV3 >= 2)
      else $error("sampling dividers must be at least 2");
    assert (WAIT1 >= 1 && WAIT2 >= 1 && WAIT3 >= 1)
      else $error("waiting times must be at least one cycle");
  end

  rx_state_e   state_q;
  logic [31:0] cnt_q;     // cycles spent in a waiting state
  logic [31:0] ph_q;      // master-clock phase inside a sampling period
  logic [15:0] per_q;     // sampling periods completed in an observation state
  logic        sclk_q, strobe_q, start_q;

  logic [31:0] wait_len, div_len;

  always_comb begin
    unique case (band_of(state_q))
      BAND_1:  begin wait_len = WAIT1; div_len = DIV1; end
      BAND_2:  begin wait_len = WAIT2; div_len = DIV2; end
      default: begin wait_len = WAIT3; div_len = DIV3; end
    endcase
  end

  function automatic rx_state_e next_of(input rx_state_e s);
    case (s)
      ST_1A:   return ST_1B;
      ST_1B:   return ST_2A;
      ST_2A:   return ST_2B;
      ST_2B:   return ST_3A;
      ST_3A:   return ST_3B;
      default: return ST_1A;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= ST_1A;
      cnt_q    <= '0;
      ph_q     <= '0;
      per_q    <= '0;
      sclk_q   <= 1'b0;
      strobe_q <= 1'b0;
      start_q  <= 1'b0;
    end else begin
      strobe_q <= 1'b0;
      start_q  <= 1'b0;
      if (!is_observing(state_q)) begin
        // Waiting state: let the analogue chain settle.
        if (cnt_q == wait_len - 1) begin
          state_q <= next_of(state_q);
          cnt_q   <= '0;
          ph_q    <= '0;
          per_q   <= '0;
          sclk_q  <= 1'b1;            // first sampling edge
        end else begin
          cnt_q <= cnt_q + 1;
        end
      end else begin
        // Observation state: run the sampling clock.
        if (ph_q == div_len - 1) begin
          ph_q <= '0;
          if (32'(per_q) == PERIODS - 1) begin
            state_q <= next_of(state_q);
            start_q <= 1'b1;          // spectrum of this band can be computed
            sclk_q  <= 1'b0;
          end else begin
            per_q  <= per_q + 1'b1;
            sclk_q <= 1'b1;
          end
        end else begin
          ph_q <= ph_q + 1;
          if (ph_q + 1 == div_len / 2) begin
            sclk_q   <= 1'b0;
            strobe_q <= (32'(per_q) >= ADC_LAT);
          end
        end
      end
    end
  end

  assign state          = state_q;
  assign analog_ctrl    = band_of(state_q);
  assign receiver_state = band_of(state_q);
  assign sampling_clk   = sclk_q;
  assign sample_strobe  = strobe_q;
  assign fft_start      = start_q;
  assign out_enable     = !is_observing(state_q);

endmodule
