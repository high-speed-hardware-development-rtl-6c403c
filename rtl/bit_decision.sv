// bit_decision: hard QPSK symbol decisions on the even (symbol-centre) samples.
//
// For every even sample from the coherent demodulator the module decides
//     A_n = sign(I),  B_n = sign(Q)
// and outputs them as bits (1 = negative, a Gray-coded QPSK constellation). It
// also keeps the previous decisions A_(n-1), B_(n-1), which the timing
// tracking loop needs, and hands the even sample on to the carrier tracking
// loop together with its decisions (X_2n, Y_2n). Odd samples are ignored.
//
// Timing: registered, one cycle from an even in_valid to sym_valid.
// The sign decision follows from the document's module list; the bit mapping
// is this implementation's choice.
module bit_decision (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sync,       // clears the previous decisions
  input  logic              in_valid,
  input  logic              in_even,
  input  fdma_pkg::cplx_t   in_data,
  output logic              sym_valid,
  output logic              a_n,        // 1: I < 0
  output logic              b_n,        // 1: Q < 0
  output logic              a_prev,
  output logic              b_prev,
  output fdma_pkg::cplx_t   sym_data    // X_2n + j Y_2n
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sym_valid <= 1'b0;
      a_n       <= 1'b0;
      b_n       <= 1'b0;
      a_prev    <= 1'b0;
      b_prev    <= 1'b0;
      sym_data  <= '0;
    end else begin
      sym_valid <= in_valid && in_even;
      if (sync) begin
        a_n    <= 1'b0;
        b_n    <= 1'b0;
        a_prev <= 1'b0;
        b_prev <= 1'b0;
      end else if (in_valid && in_even) begin
        a_prev   <= a_n;
        b_prev   <= b_n;
        a_n      <= in_data.re[fdma_pkg::DW-1];
        b_n      <= in_data.im[fdma_pkg::DW-1];
        sym_data <= in_data;
      end
    end
  end
endmodule
