// const_mult: multiplication of the DFT outputs by a constant.
//
// The last block of the uniform channel filter bank scales every DFT output
// X_k[m] (bin k, frame m) by one complex constant C (Q1.15, coef input):
//     y_k[m] = (-1)^m * C * X_k[m] * 2**OUT_SHIFT
// The factor 2**OUT_SHIFT undoes the 1/N scaling of the FFT (results are
// saturated). The sign (-1)^m belongs to the half-channel offset of the
// filter bank (see phase_shifter): a channel centred half a bin off the DFT
// grid leaves the critically decimated bank at half the output rate, and the
// alternating sign brings it to baseband. The document names this block only;
// the programmable constant, the gain shift and the frame sign are this
// implementation's choices.
//
// Timing: one sample per clock, latency 2 cycles (multiply, round). The bin
// index and the last flag travel with the sample; the frame sign changes after
// each sample marked in_last.
module const_mult #(
  parameter int unsigned IW        = $clog2(fdma_pkg::FFT_N),
  parameter int unsigned OUT_SHIFT = $clog2(fdma_pkg::FFT_N)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  fdma_pkg::cplx_t   coef,
  input  logic              in_valid,
  input  fdma_pkg::cplx_t   in_data,
  input  logic [IW-1:0]     in_index,
  input  logic              in_last,
  output logic              out_valid,
  output fdma_pkg::cplx_t   out_data,
  output logic [IW-1:0]     out_index,
  output logic              out_last
);
  import fdma_pkg::*;

  logic signed [2*DW-1:0] rr1, ii1, ri1, ir1;
  logic [IW-1:0]          i1;
  logic                   l1, v1, neg1;
  logic                   odd_frame;      // m odd: negate

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) odd_frame <= 1'b0;
    else if (in_valid && in_last) odd_frame <= ~odd_frame;
  end

  always_ff @(posedge clk) begin
    rr1  <= in_data.re * coef.re;
    ii1  <= in_data.im * coef.im;
    ri1  <= in_data.re * coef.im;
    ir1  <= in_data.im * coef.re;
    i1   <= in_index;
    l1   <= in_last;
    neg1 <= odd_frame;
  end

  always_ff @(posedge clk) begin
    logic signed [47:0] re, im;
    re = (48'(rr1) - 48'(ii1)) <<< OUT_SHIFT;
    im = (48'(ri1) + 48'(ir1)) <<< OUT_SHIFT;
    if (neg1) begin
      re = -re;
      im = -im;
    end
    out_data.re <= rnd15(re);
    out_data.im <= rnd15(im);
    out_index   <= i1;
    out_last    <= l1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1 <= in_valid;
      out_valid <= v1;
    end
  end
endmodule
