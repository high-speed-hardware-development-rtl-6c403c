// commutator: input commutator of the polyphase analysis filter bank.
//
// The composite FDMA sample stream arrives one complex sample per clock (with
// a valid strobe). The commutator deals consecutive samples out to the M
// filter-bank branches in descending order, M-1 first and 0 last, so a block
// of M input samples gives each branch one new sample. It tags every sample
// with its branch number and marks the first and last sample of each block.
// Because the shared FIR filter serves the branches one after the other, the
// commutator is a branch counter rather than a physical switch.
//
// Timing: registered, one cycle from in_valid to out_valid; one block of M
// samples is one frame of the pipeline (1/45 kHz = 22.22 us at the design's
// figures, which needs a 46.08 MHz sample clock for M = 1024).
// The descending branch order is the usual commutator convention for a
// polyphase analysis bank; the document draws the commutator but gives no order.
module commutator #(
  parameter int unsigned M  = fdma_pkg::FFT_N,
  parameter int unsigned BW = $clog2(M)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  fdma_pkg::cplx_t   in_data,
  output logic              out_valid,
  output fdma_pkg::cplx_t   out_data,
  output logic [BW-1:0]     out_branch,
  output logic              out_first,   // first sample of a block (branch M-1)
  output logic              out_last     // last sample of a block (branch 0)
);
  logic [BW-1:0] branch_q;   // branch that receives the next input sample

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      branch_q   <= BW'(M - 1);
      out_valid  <= 1'b0;
      out_data   <= '0;
      out_branch <= '0;
      out_first  <= 1'b0;
      out_last   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data   <= in_data;
        out_branch <= branch_q;
        out_first  <= (branch_q == BW'(M - 1));
        out_last   <= (branch_q == '0);
        branch_q   <= (branch_q == '0) ? BW'(M - 1) : branch_q - 1'b1;
      end else begin
        out_first <= 1'b0;
        out_last  <= 1'b0;
      end
    end
  end
endmodule
