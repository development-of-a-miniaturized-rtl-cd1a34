// FFT module: 256-point complex spectrum of one band's ADC samples.
//
// Function (from the receiver description): it takes 14-bit samples at the
// rate the controller sets, starts when the controller says so, and after a
// calculation time of 839 master clocks puts out the spectrum as 18-bit real
// and 18-bit imaginary parts, one frequency bin per clock from f0 to f255,
// together with a one-bit "FFT finish" flag: 37 output bits in parallel.
//
// Insides (this design's own; the description gives only the function):
// an in-place iterative radix-2 decimation-in-time transform on a register
// array of N complex words.
//   * Loading: every in_valid pulse writes the 14-bit sample, sign-extended,
//     into the array at the bit-reversed address of its arrival index. At
//     most N samples are taken after each start; later ones are ignored
//     until the next start. Samples are read as two's complement.
//   * Calculation: LOG2N stages of N/2 butterflies, BPC butterflies per
//     clock (512 clocks at the defaults), twiddle factors computed at
//     elaboration from cos/sin with TW_FRAC fraction bits. The word width
//     W_W = 24 holds the full growth of a 256-point transform of 14-bit data,
//     so nothing is scaled inside.
//   * Output: the engine finishes well inside CALC_CYC; the results are
//     released at exactly CALC_CYC clocks after the start, so the module has
//     the fixed latency of the original. Each word is the internal value
//     divided by 2^OUT_SHIFT (rounded, saturated to OUT_W bits).
//
// Timing: if fft_start is high in cycle t, finish and out_valid are high in
// cycle t + CALC_CYC, and out_valid stays high for N cycles (bins 0..N-1).
// A start that arrives while the module is busy is ignored.
module pwr_fft256
  import pwr_pkg::*;
#(
  parameter int unsigned N         = FFT_N,
  parameter int unsigned LOG2N     = FFT_LOG2N,
  parameter int unsigned IN_W      = ADC_W,
  parameter int unsigned OUT_W     = RES_W,
  parameter int unsigned W_W       = 24,
  parameter int unsigned TW_W      = 18,
  parameter int unsigned OUT_SHIFT = 4,
  parameter int unsigned BPC       = 2,
  parameter int unsigned CALC_CYC  = FFT_CALC_CYC
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  input  logic                    start,
  output logic                    busy,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_re,
  output logic signed [OUT_W-1:0] out_im,
  output logic                    finish
);

  localparam int unsigned TW_FRAC    = TW_W - 2;
  localparam int unsigned BFLY_CYC   = (N / 2) / BPC;    // clocks per stage
  localparam int unsigned ENGINE_CYC = LOG2N * BFLY_CYC;

  initial begin
    assert ((1 << LOG2N) == N) else $error("N must be 2**LOG2N");
    assert ((N / 2) % BPC == 0) else $error("BPC must divide N/2");
    assert (CALC_CYC > ENGINE_CYC + 1)
      else $error("calculation time too short for the butterfly engine");
  end

  // ---------------------------------------------------------------------
  // Twiddle factors W^k = cos(2 pi k / N) - j sin(2 pi k / N), k < N/2
  // ---------------------------------------------------------------------
  typedef logic signed [TW_W-1:0] tw_t;
  typedef tw_t tw_tab_t [N/2];

  function automatic tw_tab_t make_twiddles(input bit want_sin);
    tw_tab_t t;
    for (int k = 0; k < N / 2; k++) begin
      real ang, v;
      ang  = 2.0 * 3.14159265358979323846 * real'(k) / real'(N);
      v    = (want_sin ? $sin(ang) : $cos(ang)) * real'(1 << TW_FRAC);
      t[k] = tw_t'($rtoi(v >= 0.0 ? v + 0.5 : v - 0.5));
    end
    return t;
  endfunction

  localparam tw_tab_t TW_COS = make_twiddles(1'b0);
  localparam tw_tab_t TW_SIN = make_twiddles(1'b1);

  // ---------------------------------------------------------------------
  // State
  // ---------------------------------------------------------------------
  typedef enum logic [1:0] {PH_IDLE, PH_CALC, PH_HOLD, PH_OUT} phase_e;

  typedef logic [LOG2N-1:0] idx_t;

  phase_e                phase_q;
  logic signed [W_W-1:0] mem_re [N];
  logic signed [W_W-1:0] mem_im [N];
  logic [LOG2N:0]        wr_cnt_q;     // samples loaded since the last start
  logic [$clog2(LOG2N+1)-1:0] stage_q;
  logic [LOG2N-2:0]      grp_q;        // butterfly group of BPC in a stage
  logic [$clog2(CALC_CYC+1)-1:0] cyc_q;  // clocks since start
  idx_t                  bin_q;
  logic                  valid_q, finish_q;
  logic signed [OUT_W-1:0] re_q, im_q;

  function automatic idx_t bitrev(input idx_t v);
    idx_t r;
    for (int b = 0; b < int'(LOG2N); b++) r[b] = v[LOG2N-1-b];
    return r;
  endfunction

  // Scale a result word down and saturate it to OUT_W bits.
  function automatic logic signed [OUT_W-1:0] scale_out(input logic signed [W_W-1:0] v);
    logic signed [W_W:0] r;
    r = (W_W+1)'(v);
    if (OUT_SHIFT > 0) r = (r + ((W_W+1)'(1) <<< (OUT_SHIFT - 1))) >>> OUT_SHIFT;
    if (r > (W_W+1)'((1 << (OUT_W - 1)) - 1))  return {1'b0, {(OUT_W-1){1'b1}}};
    if (r < -(W_W+1)'(1 << (OUT_W - 1)))       return {1'b1, {(OUT_W-1){1'b0}}};
    return OUT_W'(r);
  endfunction

  // ---------------------------------------------------------------------
  // Butterfly addressing for the current stage and group
  // ---------------------------------------------------------------------
  idx_t                  ia [BPC];
  idx_t                  ib [BPC];
  logic [LOG2N-2:0]      tk [BPC];
  logic signed [W_W-1:0] x_re [BPC], x_im [BPC], y_re [BPC], y_im [BPC];

  for (genvar p = 0; p < int'(BPC); p++) begin : g_bfly
    logic [LOG2N-2:0] b, pos, half_mask;
    always_comb begin
      b         = (LOG2N-1)'(grp_q * BPC + p);
      half_mask = (LOG2N-1)'((1 << stage_q) - 1);
      pos       = b & half_mask;
      // group (b >> s) spaced 2^(s+1) apart, pos inside the group
      ia[p]     = idx_t'(((LOG2N)'(b >> stage_q) << (stage_q + 1)) | (LOG2N)'(pos));
      ib[p]     = ia[p] | idx_t'(1 << stage_q);
      tk[p]     = (LOG2N-1)'(pos << (LOG2N - 1 - 32'(stage_q)));
    end

    pwr_fft_butterfly #(.W_W(W_W), .TW_W(TW_W), .TW_FRAC(TW_FRAC)) u_bfly (
      .a_re (mem_re[ia[p]]),
      .a_im (mem_im[ia[p]]),
      .b_re (mem_re[ib[p]]),
      .b_im (mem_im[ib[p]]),
      .tw_c (TW_COS[tk[p]]),
      .tw_s (TW_SIN[tk[p]]),
      .x_re (x_re[p]),
      .x_im (x_im[p]),
      .y_re (y_re[p]),
      .y_im (y_im[p])
    );
  end

  // ---------------------------------------------------------------------
  // Sample memory: loading and in-place butterflies
  // ---------------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (phase_q == PH_CALC) begin
      for (int p = 0; p < int'(BPC); p++) begin
        mem_re[ia[p]] <= x_re[p];
        mem_im[ia[p]] <= x_im[p];
        mem_re[ib[p]] <= y_re[p];
        mem_im[ib[p]] <= y_im[p];
      end
    end else if (phase_q == PH_IDLE && in_valid && !wr_cnt_q[LOG2N]) begin
      mem_re[bitrev(wr_cnt_q[LOG2N-1:0])] <= W_W'(in_data);
      mem_im[bitrev(wr_cnt_q[LOG2N-1:0])] <= '0;
    end
  end

  // ---------------------------------------------------------------------
  // Sequencing
  // ---------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q  <= PH_IDLE;
      wr_cnt_q <= '0;
      stage_q  <= '0;
      grp_q    <= '0;
      cyc_q    <= '0;
      bin_q    <= '0;
      valid_q  <= 1'b0;
      finish_q <= 1'b0;
      re_q     <= '0;
      im_q     <= '0;
    end else begin
      finish_q <= 1'b0;
      if (phase_q != PH_IDLE) cyc_q <= cyc_q + 1'b1;
      unique case (phase_q)
        PH_IDLE: begin
          if (start) begin
            phase_q  <= PH_CALC;
            stage_q  <= '0;
            grp_q    <= '0;
            cyc_q    <= 1;
            wr_cnt_q <= '0;
          end else if (in_valid && !wr_cnt_q[LOG2N]) begin
            wr_cnt_q <= wr_cnt_q + 1'b1;
          end
        end
        PH_CALC: begin
          if (32'(grp_q) == BFLY_CYC - 1) begin
            grp_q <= '0;
            if (32'(stage_q) == LOG2N - 1) phase_q <= PH_HOLD;
            else                           stage_q <= stage_q + 1'b1;
          end else begin
            grp_q <= grp_q + 1'b1;
          end
        end
        PH_HOLD: begin
          if (32'(cyc_q) == CALC_CYC - 1) begin
            phase_q  <= PH_OUT;
            finish_q <= 1'b1;
            valid_q  <= 1'b1;
            re_q     <= scale_out(mem_re[0]);
            im_q     <= scale_out(mem_im[0]);
            bin_q    <= 1;
          end
        end
        PH_OUT: begin
          if (bin_q == '0) begin
            // all N bins have been sent
            phase_q <= PH_IDLE;
            valid_q <= 1'b0;
            re_q    <= '0;
            im_q    <= '0;
          end else begin
            re_q  <= scale_out(mem_re[bin_q]);
            im_q  <= scale_out(mem_im[bin_q]);
            bin_q <= bin_q + 1'b1;
          end
        end
        default: phase_q <= PH_IDLE;
      endcase
    end
  end

  assign busy      = (phase_q != PH_IDLE);
  assign out_valid = valid_q;
  assign out_re    = re_q;
  assign out_im    = im_q;
  assign finish    = finish_q;

endmodule
