// coherent_demod: interpolator and carrier derotator of the QPSK demodulator.
//
// Each received sample x[n] (two per symbol) first passes a linear
// interpolator steered by the symbol-timing loop:
//     i[n] = x[n-1] + mu * (x[n] - x[n-1]),   0 <= mu <= 1 (MU_W fraction bits)
// so mu = 1 samples on time and smaller mu samples up to one sample earlier.
// The interpolated sample is then rotated by the carrier phase estimate:
//     y[n] = i[n] * exp(-j*theta)
// with cos/sin from a 2**PH_W entry table. Output samples are labelled even
// (symbol centres: used by bit decision and carrier tracking) and odd (zero
// crossings: used by timing tracking); sym_phase says which input sample
// phase, counted from sync, carries the symbols.
//
// Timing: one sample per in_valid, latency 4 cycles. The interpolator and the
// derotator follow the document's coherent demodulator; the linear
// interpolation and the number formats are this implementation's choices.
module coherent_demod #(
  parameter int unsigned MU_W = 12,
  parameter int unsigned PH_W = fdma_pkg::PH_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sync,        // restarts the sample count (burst start)
  input  logic              sym_phase,
  input  logic [MU_W:0]     mu,          // fractional sampling instant, 1.0 = 2**MU_W
  input  logic [PH_W-1:0]   theta,       // carrier phase estimate
  input  logic              in_valid,
  input  fdma_pkg::cplx_t   in_data,
  output logic              out_valid,
  output logic              out_even,
  output fdma_pkg::cplx_t   out_data
);
  import fdma_pkg::*;

  cplx_t xprev;
  logic  par_q;          // parity of the next input sample

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xprev <= '0;
      par_q <= 1'b0;
    end else begin
      if (sync) par_q <= 1'b0;
      else if (in_valid) par_q <= ~par_q;
      if (in_valid) xprev <= in_data;
    end
  end

  // ---- stage 1: difference ----------------------------------------------
  logic signed [DW:0] d1_re, d1_im;
  cplx_t              b1;
  logic               v1, e1;
  always_ff @(posedge clk) begin
    d1_re <= (DW+1)'(in_data.re) - (DW+1)'(xprev.re);
    d1_im <= (DW+1)'(in_data.im) - (DW+1)'(xprev.im);
    b1    <= xprev;
    e1    <= (par_q == sym_phase);
  end

  // ---- carrier table (read in parallel with stage 1) ------------------------
  sample_t c2, s2;
  sincos_rom #(.ENTRIES(1 << PH_W)) u_rom (
    .clk  (clk),
    .addr (theta),
    .cos_o(c2),
    .sin_o(s2)
  );

  // ---- stage 2: interpolate -------------------------------------------------
  cplx_t i2;
  logic  v2, e2;
  always_ff @(posedge clk) begin
    logic signed [DW+MU_W+2:0] pr, pi;
    pr = (DW+MU_W+3)'(d1_re) * (DW+MU_W+3)'($signed({1'b0, mu}));
    pi = (DW+MU_W+3)'(d1_im) * (DW+MU_W+3)'($signed({1'b0, mu}));
    i2.re <= sat(48'(b1.re) + 48'(pr >>> MU_W));
    i2.im <= sat(48'(b1.im) + 48'(pi >>> MU_W));
    e2    <= e1;
  end

  // ---- stage 3: rotation products -------------------------------------------
  logic signed [2*DW-1:0] rc3, is3, ic3, rs3;
  logic v3, e3;
  always_ff @(posedge clk) begin
    rc3 <= i2.re * c2;
    is3 <= i2.im * s2;
    ic3 <= i2.im * c2;
    rs3 <= i2.re * s2;
    e3  <= e2;
  end

  // ---- stage 4: combine -------------------------------------------------------
  always_ff @(posedge clk) begin
    out_data.re <= rnd15(48'(rc3) + 48'(is3));
    out_data.im <= rnd15(48'(ic3) - 48'(rs3));
    out_even    <= e3;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
      v3 <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1 <= in_valid;
      v2 <= v1;
      v3 <= v2;
      out_valid <= v3;
    end
  end
endmodule
