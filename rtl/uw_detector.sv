// uw_detector: unique-word detection in the recovered symbol stream.
//
// The symbol decisions (two bits each) are shifted into a window of UW_LEN
// symbols, which is compared with the unique word UW every symbol. When at
// most MAX_ERR bits differ, uw_found pulses and the following symbols are
// delivered as data on data_valid/data_bits, up to the end of the burst
// (sync restarts the search). Finding the unique word marks the start of the
// data field in the TDMA frame.
//
// Timing: uw_found is registered, one cycle after the sym_valid of the last UW
// symbol; data symbols one cycle after their sym_valid.
// The frame layout (guard, preamble, unique word, data) follows the document;
// the word, its length and the error tolerance are this implementation's own.
module uw_detector #(
  parameter int unsigned   UW_LEN  = 16,
  parameter logic [2*UW_LEN-1:0] UW = 32'hE4B1_1D2F,
  parameter int unsigned   MAX_ERR = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sync,
  input  logic       sym_valid,
  input  logic [1:0] sym_bits,       // {A_n, B_n}
  output logic       uw_found,
  output logic       data_valid,
  output logic [1:0] data_bits
);
  logic [2*UW_LEN-1:0] win;
  logic                locked;
  logic [2*UW_LEN-1:0] nxt;
  int unsigned         hdist;

  always_comb begin
    nxt  = {win[2*UW_LEN-3:0], sym_bits};
    hdist = 0;
    for (int i = 0; i < int'(2 * UW_LEN); i++) hdist += int'(nxt[i] ^ UW[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win        <= '0;
      locked     <= 1'b0;
      uw_found   <= 1'b0;
      data_valid <= 1'b0;
      data_bits  <= '0;
    end else begin
      uw_found   <= 1'b0;
      data_valid <= 1'b0;
      if (sync) begin
        win    <= '0;
        locked <= 1'b0;
      end else if (sym_valid) begin
        win <= nxt;
        if (locked) begin
          data_valid <= 1'b1;
          data_bits  <= sym_bits;
        end else if (hdist <= MAX_ERR) begin
          locked   <= 1'b1;
          uw_found <= 1'b1;
        end
      end
    end
  end
endmodule
