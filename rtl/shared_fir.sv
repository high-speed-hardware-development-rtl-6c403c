// shared_fir: one multiplexed 9-tap FIR filter serving all M polyphase branches.
//
// Instead of M separate filters, a single arithmetic unit computes the branch
// filters one after the other. The delay line of every branch is kept in RAM:
// TAPS-1 data RAMs of M words each, RAM k holding x_b[n-1-k] for branch b.
// The branch coefficients h_b[k] = h[k*M + b] of the prototype low-pass filter
// live in TAPS coefficient RAMs of M words, loaded through the coef_* port.
// (With the half-bin phase shifter of this design the loaded taps are
// h[k*M + b] * (-1)^k.)
// For each sample x_b[n] of branch b the unit reads the branch's old samples,
// multiplies all TAPS samples by their coefficients in parallel, and sums the
// products with an adder tree:  y_b[n] = sum_k h_b[k] * x_b[n-k].
// The delay line of branch b is shifted by writing every tap one RAM further.
//
// Timing: one sample per clock, any branch order in which a branch does not
// come back on the very next cycle. Latency 4 cycles from in_valid to
// out_valid (RAM read, multiply, two adder-tree levels, round). The branch
// number and the first/last flags travel with the sample.
// Coefficients are Q1.15; the products are summed at full width and the
// result rounded back to Q1.15 with saturation. The RAM organisation and the
// tree of multipliers and adders follow the document; the pipeline depth, the
// coefficient load port and the number format are this implementation's own.
module shared_fir #(
  parameter int unsigned M    = fdma_pkg::FFT_N,
  parameter int unsigned TAPS = fdma_pkg::FIR_TAPS,
  parameter int unsigned BW   = $clog2(M),
  parameter int unsigned TW   = $clog2(TAPS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // coefficient load: h_b[k] for branch coef_branch, tap coef_tap
  input  logic              coef_we,
  input  logic [BW-1:0]     coef_branch,
  input  logic [TW-1:0]     coef_tap,
  input  fdma_pkg::sample_t coef_data,
  // sample input from the commutator
  input  logic              in_valid,
  input  fdma_pkg::cplx_t   in_data,
  input  logic [BW-1:0]     in_branch,
  input  logic              in_first,
  input  logic              in_last,
  // filtered branch output
  output logic              out_valid,
  output fdma_pkg::cplx_t   out_data,
  output logic [BW-1:0]     out_branch,
  output logic              out_first,
  output logic              out_last
);
  import fdma_pkg::*;

  localparam int unsigned PW = 2 * DW;      // product width
  localparam int unsigned SW = PW + 4;      // sum width (TAPS <= 16)

  typedef logic signed [PW-1:0] prod_t;
  typedef logic signed [SW-1:0] sum_t;

  // ---- memories -----------------------------------------------------------
  cplx_t   dly_ram  [TAPS-1][M];   // delay line RAMs
  sample_t coef_ram [TAPS][M];     // coefficient RAMs

  always_ff @(posedge clk) begin
    if (coef_we) coef_ram[coef_tap][coef_branch] <= coef_data;
  end

  // ---- stage 1: read old samples and coefficients ---------------------------
  logic          v1, f1, l1;
  logic [BW-1:0] b1;
  cplx_t         x1;
  cplx_t         old1 [TAPS-1];
  sample_t       h1   [TAPS];

  always_ff @(posedge clk) begin
    for (int k = 0; k < int'(TAPS) - 1; k++) old1[k] <= dly_ram[k][in_branch];
    for (int k = 0; k < int'(TAPS); k++)     h1[k]   <= coef_ram[k][in_branch];
    x1 <= in_data;
    b1 <= in_branch;
    f1 <= in_first;
    l1 <= in_last;
  end

  // ---- stage 2: shift the delay line, multiply all taps in parallel --------
  cplx_t tap2 [TAPS];
  always_comb begin
    tap2[0] = x1;
    for (int k = 1; k < int'(TAPS); k++) tap2[k] = old1[k-1];
  end

  always_ff @(posedge clk) begin
    if (v1) begin
      for (int k = 0; k < int'(TAPS) - 1; k++) dly_ram[k][b1] <= tap2[k];
    end
  end

  prod_t         pre2 [TAPS];
  prod_t         pim2 [TAPS];
  logic          v2, f2, l2;
  logic [BW-1:0] b2;

  always_ff @(posedge clk) begin
    for (int k = 0; k < int'(TAPS); k++) begin
      pre2[k] <= tap2[k].re * h1[k];
      pim2[k] <= tap2[k].im * h1[k];
    end
    b2 <= b1;
    f2 <= f1;
    l2 <= l1;
  end

  // ---- stage 3: first adder-tree levels (pairs, then pairs of pairs) --------
  localparam int unsigned NQ = (TAPS + 3) / 4;   // partial sums after 2 levels
  sum_t          qre3 [NQ];
  sum_t          qim3 [NQ];
  logic          v3, f3, l3;
  logic [BW-1:0] b3;

  always_ff @(posedge clk) begin
    for (int q = 0; q < int'(NQ); q++) begin
      sum_t sre, sim;
      sre = '0;
      sim = '0;
      for (int k = 4 * q; k < 4 * q + 4; k++) begin
        if (k < int'(TAPS)) begin
          sre = sre + SW'(pre2[k]);
          sim = sim + SW'(pim2[k]);
        end
      end
      qre3[q] <= sre;
      qim3[q] <= sim;
    end
    b3 <= b2;
    f3 <= f2;
    l3 <= l2;
  end

  // ---- stage 4: last tree levels, round to Q1.15, output register ----------
  cplx_t sum_c;
  always_comb begin
    sum_t tre, tim;
    tre = '0;
    tim = '0;
    for (int q = 0; q < int'(NQ); q++) begin
      tre = tre + qre3[q];
      tim = tim + qim3[q];
    end
    sum_c.re = rnd15(48'(tre));
    sum_c.im = rnd15(48'(tim));
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

  always_ff @(posedge clk) begin
    out_data   <= sum_c;
    out_branch <= b3;
    out_first  <= f3;
    out_last   <= l3;
  end
endmodule
