// fft_pipeline: N-point complex FFT built as a pipeline of log2(N) stages.
//
// Each stage (fft_stage) has a dual memory in front of it and one time-shared
// butterfly element. A frame of N points is written into the first memory in
// any order (in_addr gives the point number); in_last marks the final write of
// a frame and hands it to stage 0. Every stage passes the frame to the next
// as soon as its N/2 butterflies are done, while the stage before it already
// works on the next frame, so STAGES frames are in flight at once. The result
// leaves through fft_reorder in natural bin order, scaled by 1/N.
//
// Timing: a new frame may be accepted every N cycles (the frame period of the
// system, 22.22 us); the latency from the in_last write to the first output
// bin is STAGES*(N/2 + 4) + 2 cycles. overrun reports a frame that arrived
// before a stage was free.
module fft_pipeline #(
  parameter int unsigned N      = fdma_pkg::FFT_N,
  parameter int unsigned STAGES = $clog2(N),
  parameter int unsigned AW     = $clog2(N)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [AW-1:0]     in_addr,
  input  fdma_pkg::cplx_t   in_data,
  input  logic              in_last,
  output logic              out_valid,
  output fdma_pkg::cplx_t   out_data,
  output logic [AW-1:0]     out_index,
  output logic              out_last,
  output logic              overrun
);
  import fdma_pkg::*;

  // write bus into stage s (s = STAGES is the reorder memory)
  logic          we_a [STAGES+1];
  logic          we_b [STAGES+1];
  logic [AW-1:0] wa_a [STAGES+1];
  logic [AW-1:0] wa_b [STAGES+1];
  cplx_t         wd_a [STAGES+1];
  cplx_t         wd_b [STAGES+1];
  logic          done [STAGES+1];
  logic [STAGES:0] ovr;

  assign we_a[0] = in_valid;
  assign wa_a[0] = in_addr;
  assign wd_a[0] = in_data;
  assign we_b[0] = 1'b0;
  assign wa_b[0] = '0;
  assign wd_b[0] = '0;
  assign done[0] = in_valid && in_last;

  for (genvar s = 0; s < int'(STAGES); s++) begin : g_stage
    logic busy_unused;
    fft_stage #(.N(N), .STAGE(s)) u_stage (
      .clk     (clk),
      .rst_n   (rst_n),
      .in_we_a (we_a[s]),
      .in_wa_a (wa_a[s]),
      .in_wd_a (wd_a[s]),
      .in_we_b (we_b[s]),
      .in_wa_b (wa_b[s]),
      .in_wd_b (wd_b[s]),
      .in_done (done[s]),
      .out_we  (we_a[s+1]),
      .out_wa_a(wa_a[s+1]),
      .out_wd_a(wd_a[s+1]),
      .out_wa_b(wa_b[s+1]),
      .out_wd_b(wd_b[s+1]),
      .out_done(done[s+1]),
      .busy    (busy_unused),
      .overrun (ovr[s])
    );
    assign we_b[s+1] = we_a[s+1];
  end

  fft_reorder #(.N(N)) u_reorder (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_we    (we_a[STAGES]),
    .in_wa_a  (wa_a[STAGES]),
    .in_wd_a  (wd_a[STAGES]),
    .in_wa_b  (wa_b[STAGES]),
    .in_wd_b  (wd_b[STAGES]),
    .in_done  (done[STAGES]),
    .out_valid(out_valid),
    .out_data (out_data),
    .out_index(out_index),
    .out_last (out_last),
    .overrun  (ovr[STAGES])
  );

  assign overrun = |ovr;
endmodule
