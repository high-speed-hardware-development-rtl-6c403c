// phase_shifter: rotates each polyphase branch output before the DFT.
//
// The output of branch b, which feeds DFT input i = M-1-b (the position of
// the branch's sample within an input block), is multiplied by exp(j*pi*i/M).
// This half-bin rotation moves the DFT bin grid by half a channel spacing, so
// that bin k receives the channel centred at (k - 1/2) * fs/M and the M
// channels lie symmetric about the band centre. For the bank to be exact the
// prototype taps are stored with alternating sign, h[k*M+b]*(-1)^k (see
// shared_fir), and the output is multiplied by (-1)^frame (see const_mult).
// The document places a phase shifter between the filter bank and the DFT but
// does not give its angle; the half-bin rotation is this implementation's reading.
// The rotation factors come from a 2M-entry cos/sin table (sincos_rom); the
// complex product uses four parallel multipliers.
//
// Timing: one sample per clock, latency 3 cycles (table read, multiply,
// round). Branch number and first/last flags travel with the sample.
module phase_shifter #(
  parameter int unsigned M  = fdma_pkg::FFT_N,
  parameter int unsigned BW = $clog2(M)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  fdma_pkg::cplx_t   in_data,
  input  logic [BW-1:0]     in_branch,
  input  logic              in_first,
  input  logic              in_last,
  output logic              out_valid,
  output fdma_pkg::cplx_t   out_data,
  output logic [BW-1:0]     out_branch,
  output logic              out_first,
  output logic              out_last
);
  import fdma_pkg::*;

  sample_t c1, s1;
  sincos_rom #(.ENTRIES(2 * M)) u_rom (
    .clk  (clk),
    .addr ({1'b0, BW'(M - 1) - in_branch}),
    .cos_o(c1),
    .sin_o(s1)
  );

  cplx_t         x1;
  logic [BW-1:0] b1, b2;
  logic          f1, l1, f2, l2;
  logic          v1, v2;
  logic signed [2*DW-1:0] rr2, ii2, ri2, ir2;

  always_ff @(posedge clk) begin
    x1 <= in_data;
    b1 <= in_branch;
    f1 <= in_first;
    l1 <= in_last;
    // (x.re + j x.im)(c + j s)
    rr2 <= x1.re * c1;
    ii2 <= x1.im * s1;
    ri2 <= x1.re * s1;
    ir2 <= x1.im * c1;
    b2 <= b1;
    f2 <= f1;
    l2 <= l1;
    out_data.re <= rnd15(48'(rr2) - 48'(ii2));
    out_data.im <= rnd15(48'(ri2) + 48'(ir2));
    out_branch  <= b2;
    out_first   <= f2;
    out_last    <= l2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1 <= in_valid;
      v2 <= v1;
      out_valid <= v2;
    end
  end
endmodule
