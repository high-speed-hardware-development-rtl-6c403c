// fft_mae: multiplexed butterfly arithmetic element of one FFT stage.
//
// A single radix-2 decimation-in-frequency butterfly is time-shared by all
// N/2 butterflies of a stage: the stage controller feeds it one operand pair
// per clock, together with the twiddle factor W and a tag (the two memory
// addresses the results go back to). It computes
//     y0 = (a + b) / 2
//     y1 = ((a - b) / 2) * W
// The halving in every stage keeps the 10-stage FFT free of overflow (the
// transform is scaled by 1/N). The four real products of the complex multiply
// are formed in parallel.
//
// Timing: one butterfly per clock, latency 3 cycles (add/subtract, multiply,
// round); the tag and valid travel alongside. The butterfly form, the scaling
// and the pipeline depth are this implementation's choices; the document gives
// a time-multiplexed butterfly with parallel arithmetic.
module fft_mae #(
  parameter int unsigned TAG_W = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  fdma_pkg::cplx_t   a,
  input  fdma_pkg::cplx_t   b,
  input  fdma_pkg::cplx_t   w,
  input  logic [TAG_W-1:0]  in_tag,
  output logic              out_valid,
  output fdma_pkg::cplx_t   y0,
  output fdma_pkg::cplx_t   y1,
  output logic [TAG_W-1:0]  out_tag
);
  import fdma_pkg::*;

  // stage 1: sum and difference, halved
  logic signed [DW:0] sre, sim, dre, dim;
  always_comb begin
    sre = (DW+1)'(a.re) + (DW+1)'(b.re);
    sim = (DW+1)'(a.im) + (DW+1)'(b.im);
    dre = (DW+1)'(a.re) - (DW+1)'(b.re);
    dim = (DW+1)'(a.im) - (DW+1)'(b.im);
  end

  cplx_t s1, d1, w1;
  logic [TAG_W-1:0] t1, t2;
  logic v1, v2;
  always_ff @(posedge clk) begin
    s1.re <= sre[DW:1];
    s1.im <= sim[DW:1];
    d1.re <= dre[DW:1];
    d1.im <= dim[DW:1];
    w1    <= w;
    t1    <= in_tag;
  end

  // stage 2: four parallel multiplications
  logic signed [2*DW-1:0] rr2, ii2, ri2, ir2;
  cplx_t s2;
  always_ff @(posedge clk) begin
    rr2 <= d1.re * w1.re;
    ii2 <= d1.im * w1.im;
    ri2 <= d1.re * w1.im;
    ir2 <= d1.im * w1.re;
    s2  <= s1;
    t2  <= t1;
  end

  // stage 3: combine and round
  always_ff @(posedge clk) begin
    y0      <= s2;
    y1.re   <= rnd15(48'(rr2) - 48'(ii2));
    y1.im   <= rnd15(48'(ri2) + 48'(ir2));
    out_tag <= t2;
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
