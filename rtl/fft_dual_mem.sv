// fft_dual_mem: dual (ping-pong) memory placed between two FFT stages.
//
// Two banks of DEPTH complex words. While the stage upstream writes a new
// frame into one bank, the stage downstream reads the previous frame from the
// other; a pulse on swap exchanges the two roles. Each side has two ports, so
// a butterfly can store both of its results and fetch both of its operands in
// a single clock. Reads are synchronous: data appears one cycle after the
// address. Writes on the same clock edge as swap still go to the old write
// bank, so the writer can assert swap together with its last write.
// Dual memories between the stages follow the document; two ports per side and
// the swap handshake are this implementation's choices.
module fft_dual_mem #(
  parameter int unsigned DEPTH = fdma_pkg::FFT_N,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              swap,
  // write side (upstream stage)
  input  logic              we_a,
  input  logic [AW-1:0]     wa_a,
  input  fdma_pkg::cplx_t   wd_a,
  input  logic              we_b,
  input  logic [AW-1:0]     wa_b,
  input  fdma_pkg::cplx_t   wd_b,
  // read side (downstream stage)
  input  logic [AW-1:0]     ra_a,
  output fdma_pkg::cplx_t   rd_a,
  input  logic [AW-1:0]     ra_b,
  output fdma_pkg::cplx_t   rd_b,
  output logic              wbank      // bank currently written
);
  import fdma_pkg::*;

  cplx_t mem0 [DEPTH];
  cplx_t mem1 [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wbank <= 1'b0;
    else if (swap) wbank <= ~wbank;
  end

  always_ff @(posedge clk) begin
    if (wbank == 1'b0) begin
      if (we_a) mem0[wa_a] <= wd_a;
      if (we_b) mem0[wa_b] <= wd_b;
    end else begin
      if (we_a) mem1[wa_a] <= wd_a;
      if (we_b) mem1[wa_b] <= wd_b;
    end
  end

  always_ff @(posedge clk) begin
    rd_a <= wbank ? mem0[ra_a] : mem1[ra_a];
    rd_b <= wbank ? mem0[ra_b] : mem1[ra_b];
  end

  // Both write ports must not hit the same word in one cycle.
  assert property (@(posedge clk) disable iff (!rst_n) (we_a && we_b) |-> (wa_a != wa_b))
    else $error("fft_dual_mem: both write ports address word %0d", wa_a);
endmodule
