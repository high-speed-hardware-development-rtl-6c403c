// fft_stage: one of the radix-2 stages of the pipelined FFT.
//
// The stage owns the dual memory in front of it. The upstream stage fills one
// bank with a frame of N points; when it signals in_done the banks swap and
// this stage runs its N/2 decimation-in-frequency butterflies on the frame,
// one per clock, through its multiplexed arithmetic element (fft_mae). For
// butterfly j of stage s, with span L = N / 2**(s+1):
//     a = (j / L) * 2L + (j mod L),  b = a + L,  W = exp(-j*2*pi*(j mod L)*2**s / N)
// Both results are written back at a and b into the next stage's memory
// (in-place addressing), so the frame leaves the last stage in bit-reversed
// order. out_done is raised with the last write and starts the next stage.
//
// Timing: out_done follows in_done by N/2 + 4 cycles; a new frame may arrive every N/2
// cycles or more (the system delivers one every N cycles). A frame that
// arrives while the stage is still busy is flagged on overrun.
module fft_stage #(
  parameter int unsigned N     = fdma_pkg::FFT_N,
  parameter int unsigned STAGE = 0,
  parameter int unsigned AW    = $clog2(N)
) (
  input  logic              clk,
  input  logic              rst_n,
  // writes into this stage's input memory (from the previous stage)
  input  logic              in_we_a,
  input  logic [AW-1:0]     in_wa_a,
  input  fdma_pkg::cplx_t   in_wd_a,
  input  logic              in_we_b,
  input  logic [AW-1:0]     in_wa_b,
  input  fdma_pkg::cplx_t   in_wd_b,
  input  logic              in_done,
  // writes into the next stage's memory
  output logic              out_we,
  output logic [AW-1:0]     out_wa_a,
  output fdma_pkg::cplx_t   out_wd_a,
  output logic [AW-1:0]     out_wa_b,
  output fdma_pkg::cplx_t   out_wd_b,
  output logic              out_done,
  output logic              busy,
  output logic              overrun
);
  import fdma_pkg::*;

  localparam int unsigned SPAN = N >> (STAGE + 1);
  localparam int unsigned LS   = $clog2(SPAN) + 0;   // log2(SPAN)

  // ---- input dual memory ---------------------------------------------------
  logic [AW-1:0] ra_a, ra_b;
  cplx_t         rd_a, rd_b;
  logic          wbank_unused;

  fft_dual_mem #(.DEPTH(N)) u_mem (
    .clk  (clk),
    .rst_n(rst_n),
    .swap (in_done),
    .we_a (in_we_a), .wa_a(in_wa_a), .wd_a(in_wd_a),
    .we_b (in_we_b), .wa_b(in_wa_b), .wd_b(in_wd_b),
    .ra_a (ra_a),    .rd_a(rd_a),
    .ra_b (ra_b),    .rd_b(rd_b),
    .wbank(wbank_unused)
  );

  // ---- butterfly address generator -----------------------------------------
  logic [AW-2:0] j_q;          // butterfly counter
  logic          run_q;
  logic          issue;
  logic          last_issue;

  assign issue      = run_q;
  assign last_issue = run_q && (j_q == (AW-1)'(N/2 - 1));
  assign busy       = run_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q   <= 1'b0;
      j_q     <= '0;
      overrun <= 1'b0;
    end else begin
      if (in_done && run_q && !last_issue) overrun <= 1'b1;
      if (in_done) begin
        run_q <= 1'b1;
        j_q   <= '0;
      end else if (run_q) begin
        j_q <= j_q + 1'b1;
        if (last_issue) run_q <= 1'b0;
      end
    end
  end

  logic [AW-1:0] pos, grp_base, tw_idx;
  always_comb begin
    pos      = AW'(j_q) & AW'(SPAN - 1);
    grp_base = (AW'(j_q) >> LS) << (LS + 1);
    ra_a     = grp_base | pos;
    ra_b     = ra_a + AW'(SPAN);
    tw_idx   = AW'(pos << STAGE);
  end

  // ---- twiddle table --------------------------------------------------------
  sample_t tw_cos, tw_sin;
  sincos_rom #(.ENTRIES(N)) u_tw (
    .clk  (clk),
    .addr (tw_idx),
    .cos_o(tw_cos),
    .sin_o(tw_sin)
  );

  // ---- operands one cycle after the addresses ------------------------------
  logic          v1, last1;
  logic [AW-1:0] a1, b1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1    <= 1'b0;
      last1 <= 1'b0;
    end else begin
      v1    <= issue;
      last1 <= last_issue;
    end
  end
  always_ff @(posedge clk) begin
    a1 <= ra_a;
    b1 <= ra_b;
  end

  cplx_t w1;
  assign w1.re = tw_cos;
  assign w1.im = -tw_sin;

  localparam int unsigned TAG_W = 2 * AW + 1;
  logic [TAG_W-1:0] tag_out;
  logic             mae_valid;
  cplx_t            y0, y1;

  fft_mae #(.TAG_W(TAG_W)) u_mae (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (v1),
    .a        (rd_a),
    .b        (rd_b),
    .w        (w1),
    .in_tag   ({last1, a1, b1}),
    .out_valid(mae_valid),
    .y0       (y0),
    .y1       (y1),
    .out_tag  (tag_out)
  );

  assign out_we   = mae_valid;
  assign out_wa_a = tag_out[2*AW-1:AW];
  assign out_wa_b = tag_out[AW-1:0];
  assign out_wd_a = y0;
  assign out_wd_b = y1;
  assign out_done = mae_valid && tag_out[2*AW];
endmodule
