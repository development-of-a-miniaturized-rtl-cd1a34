// Output buffer: puts the 36-bit parallel spectrum out on 18 result pins.
//
// The FFT module delivers one frequency bin per clock with its real and
// imaginary parts side by side. To save pins, the receiver sends the
// spectrum as two runs of 18-bit words: first the real parts of bins
// f0..f255, then the imaginary parts of f0..f255, one word per master clock
// (25.6 us each at 10 MHz), as in the receiver's time sequence.
//
// How it works: the real part of each incoming bin is registered and sent on
// at once; the imaginary part is written into a 256 x 18 memory. When all N
// bins have arrived, the memory is read out in order, one word per clock.
//
// Interface and timing:
//   enable      from the controller; while low, incoming bins are dropped,
//               any readout in progress is abandoned and the output is zero.
//   in_valid    one per bin, N consecutive cycles (the FFT output stream).
//   result      the 18-bit output word; result_valid marks a word and
//               result_is_im tells the imaginary run from the real one.
//   A bin that is valid in cycle t appears as a real word in cycle t+1; the
//   imaginary run follows the real run without a gap, so one spectrum takes
//   2*N cycles.
// The serial order follows the receiver's time sequence; the enable control,
// result_valid and result_is_im are this design's own.
module pwr_output_buffer
  import pwr_pkg::*;
#(
  parameter int unsigned N     = FFT_N,
  parameter int unsigned LOG2N = FFT_LOG2N,
  parameter int unsigned W     = RES_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                enable,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic [W-1:0]        result,
  output logic                result_valid,
  output logic                result_is_im
);

  logic [W-1:0]   im_mem [N];
  logic [LOG2N:0] wr_q;        // imaginary words stored
  logic [LOG2N:0] rd_q;        // imaginary words sent
  logic           im_run_q;    // sending the imaginary run
  logic [W-1:0]   res_q;
  logic           valid_q, is_im_q;

  always_ff @(posedge clk) begin
    if (enable && in_valid && !im_run_q && !wr_q[LOG2N])
      im_mem[wr_q[LOG2N-1:0]] <= in_im;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q     <= '0;
      rd_q     <= '0;
      im_run_q <= 1'b0;
      res_q    <= '0;
      valid_q  <= 1'b0;
      is_im_q  <= 1'b0;
    end else if (!enable) begin
      wr_q     <= '0;
      rd_q     <= '0;
      im_run_q <= 1'b0;
      res_q    <= '0;
      valid_q  <= 1'b0;
      is_im_q  <= 1'b0;
    end else if (im_run_q) begin
      res_q   <= im_mem[rd_q[LOG2N-1:0]];
      valid_q <= 1'b1;
      is_im_q <= 1'b1;
      if (32'(rd_q) == N - 1) begin
        im_run_q <= 1'b0;
        wr_q     <= '0;
        rd_q     <= '0;
      end else begin
        rd_q <= rd_q + 1'b1;
      end
    end else if (in_valid && !wr_q[LOG2N]) begin
      res_q   <= in_re;
      valid_q <= 1'b1;
      is_im_q <= 1'b0;
      wr_q    <= wr_q + 1'b1;
      if (32'(wr_q) == N - 1) im_run_q <= 1'b1;
    end else begin
      res_q   <= '0;
      valid_q <= 1'b0;
      is_im_q <= 1'b0;
    end
  end

  assign result       = res_q;
  assign result_valid = valid_q;
  assign result_is_im = is_im_q;

endmodule
