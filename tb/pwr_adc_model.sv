// Behavioural model of the receiver's pipeline ADC, for simulation only.
//
// A 14-bit converter with a pipeline latency of 13 sampling clocks: the
// input voltage is sampled at each rising edge of sclk, and the code of the
// sample taken LATENCY edges earlier appears on dout a short output delay
// after the edge. Full scale is +/-FS volts, the code is two's complement,
// rounded and clipped. The resolution and latency follow the receiver
// description; the full scale, code format and output delay are chosen for
// the testbenches.
module pwr_adc_model #(
  parameter int  BITS    = 14,
  parameter int  LATENCY = 13,
  parameter real FS      = 1.0
) (
  input  logic            sclk,
  input  real             vin,
  output logic [BITS-1:0] dout
);

  logic [BITS-1:0] pipe [LATENCY];

  function automatic logic [BITS-1:0] quantise(input real v);
    real   x;
    int    c;
    x = v / FS * real'(1 << (BITS - 1));
    c = $rtoi(x >= 0.0 ? x + 0.5 : x - 0.5);
    if (c > (1 << (BITS - 1)) - 1) c = (1 << (BITS - 1)) - 1;
    if (c < -(1 << (BITS - 1)))    c = -(1 << (BITS - 1));
    return BITS'(c);
  endfunction

  initial begin
    for (int i = 0; i < LATENCY; i++) pipe[i] = '0;
    dout = '0;
  end

  always @(posedge sclk) begin
    logic [BITS-1:0] oldest;
    oldest = pipe[LATENCY-1];      // taken LATENCY edges ago
    for (int i = LATENCY - 1; i > 0; i--) pipe[i] = pipe[i-1];
    pipe[0] = quantise(vin);
    #5 dout = oldest;
  end

endmodule
