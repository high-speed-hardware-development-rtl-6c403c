// fft_reorder: output memory of the pipelined FFT.
//
// The last stage writes its frame into this dual memory in bit-reversed
// order. When a frame is complete (in_done) the banks swap and the frame is
// read out one bin per clock in natural order, k = 0 .. N-1, by reading
// address bitrev(k); the next frame is written meanwhile.
//
// Timing: output starts 2 cycles after in_done, one bin per clock, out_last
// marks bin N-1. A frame arriving before the previous one has been read out
// is flagged on overrun.
module fft_reorder #(
  parameter int unsigned N  = fdma_pkg::FFT_N,
  parameter int unsigned AW = $clog2(N)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_we,
  input  logic [AW-1:0]     in_wa_a,
  input  fdma_pkg::cplx_t   in_wd_a,
  input  logic [AW-1:0]     in_wa_b,
  input  fdma_pkg::cplx_t   in_wd_b,
  input  logic              in_done,
  output logic              out_valid,
  output fdma_pkg::cplx_t   out_data,
  output logic [AW-1:0]     out_index,
  output logic              out_last,
  output logic              overrun
);
  import fdma_pkg::*;

  logic [AW-1:0] k_q, rev;
  logic          run_q;
  cplx_t         rd_b_unused;
  logic          wbank_unused;

  always_comb begin
    for (int i = 0; i < int'(AW); i++) rev[i] = k_q[AW-1-i];
  end

  fft_dual_mem #(.DEPTH(N)) u_mem (
    .clk  (clk),
    .rst_n(rst_n),
    .swap (in_done),
    .we_a (in_we), .wa_a(in_wa_a), .wd_a(in_wd_a),
    .we_b (in_we), .wa_b(in_wa_b), .wd_b(in_wd_b),
    .ra_a (rev),   .rd_a(out_data),
    .ra_b (rev),   .rd_b(rd_b_unused),
    .wbank(wbank_unused)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q     <= 1'b0;
      k_q       <= '0;
      out_valid <= 1'b0;
      out_index <= '0;
      out_last  <= 1'b0;
      overrun   <= 1'b0;
    end else begin
      if (in_done && run_q && !(k_q == AW'(N - 1))) overrun <= 1'b1;
      out_valid <= run_q;
      out_index <= k_q;
      out_last  <= run_q && (k_q == AW'(N - 1));
      if (in_done) begin
        run_q <= 1'b1;
        k_q   <= '0;
      end else if (run_q) begin
        k_q <= k_q + 1'b1;
        if (k_q == AW'(N - 1)) run_q <= 1'b0;
      end
    end
  end
endmodule
