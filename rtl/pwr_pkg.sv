// Shared types and constants of the plasma wave receiver digital part.
//
// The receiver splits 10 Hz - 100 kHz into three observation bands and
// visits them in a fixed cycle of six states: each band has a waiting state
// (xA), during which the analogue chain settles and the previous band's
// spectrum is computed and sent out, followed by an observation state (xB),
// during which 256 ADC samples are collected. All timing is counted in
// cycles of the 10 MHz master clock.
//
// The band lengths of the waiting states (20 ms, 2 ms, 0.2 ms), the 256-point
// transform, the 14-bit ADC word, its 13-clock latency, the 18-bit result
// words and the 839-cycle calculation time follow the receiver description.
// The sampling clock dividers (3000, 300, 30) are derived here: they are the
// divisors of 10 MHz that give the stated observation times (269 sampling
// periods of 300 us, 30 us and 3 us are 80.7 ms, 8.07 ms and 0.807 ms) and
// frequency resolutions (3.33 kHz / 256 = 13 Hz, and 130 Hz, 1.3 kHz).
// The state and band encodings are this design's own.
package pwr_pkg;

  // Word widths
  localparam int unsigned ADC_W    = 14;   // ADC sample word
  localparam int unsigned RES_W    = 18;   // real or imaginary result word
  localparam int unsigned CTRL_W   = 2;    // analogue control and receiver state

  // Transform
  localparam int unsigned FFT_N      = 256;
  localparam int unsigned FFT_LOG2N  = 8;
  localparam int unsigned FFT_CALC_CYC = 839;  // start to first result, master clocks

  // ADC pipeline latency in sampling clocks
  localparam int unsigned ADC_LATENCY = 13;

  // Default cycle counts at the 10 MHz master clock
  localparam int unsigned WAIT1_CYC = 200_000;  // 20 ms
  localparam int unsigned WAIT2_CYC = 20_000;   // 2.0 ms
  localparam int unsigned WAIT3_CYC = 2_000;    // 0.2 ms
  localparam int unsigned SDIV1     = 3_000;    // 3.33 kHz sampling
  localparam int unsigned SDIV2     = 300;      // 33.3 kHz sampling
  localparam int unsigned SDIV3     = 30;       // 333 kHz sampling

  // Receiver states, in the order they are visited
  typedef enum logic [2:0] {
    ST_1A = 3'd0,
    ST_1B = 3'd1,
    ST_2A = 3'd2,
    ST_2B = 3'd3,
    ST_3A = 3'd4,
    ST_3B = 3'd5
  } rx_state_e;

  // Observation band code, used both for the 2-bit analogue control word
  // and for the 2-bit receiver state output.
  typedef enum logic [CTRL_W-1:0] {
    BAND_NONE = 2'd0,
    BAND_1    = 2'd1,   // 10 Hz - 1 kHz
    BAND_2    = 2'd2,   // 1 kHz - 10 kHz
    BAND_3    = 2'd3    // 10 kHz - 100 kHz
  } band_e;

  function automatic band_e band_of(input rx_state_e s);
    case (s)
      ST_1A, ST_1B: return BAND_1;
      ST_2A, ST_2B: return BAND_2;
      default:      return BAND_3;
    endcase
  endfunction

  function automatic logic is_observing(input rx_state_e s);
    return (s == ST_1B) || (s == ST_2B) || (s == ST_3B);
  endfunction

endpackage
