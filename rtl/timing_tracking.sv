// timing_tracking: decision-directed symbol-timing tracking loop.
//
// From the odd (zero-crossing) sample between two symbols and the decisions
// on either side it forms the timing error
//     e_n = I_(2n-1) * (A_(n-1) - A_n) + Q_(2n-1) * (B_(n-1) - B_n)
// with A, B = +1/-1, so the products reduce to adding or subtracting twice the
// sample. e_n is negative when the sampling instant is late. The loop filter
// is an accumulator, S_n = S_(n-1) + (K * e_n) / 2**KSHIFT, limited to
// [0, 1.0]; S_n is the fractional sampling instant (mu) of the interpolator
// in the coherent demodulator. load sets S_n (from the preamble estimate).
//
// Timing: e_n and S_n are updated one cycle after each sym_valid.
// The error formula follows the document's inputs (odd samples, A_n, A_(n-1),
// B_n, B_(n-1)); the first-order loop and its scaling are this
// implementation's choices.
module timing_tracking #(
  parameter int unsigned MU_W   = 12,
  parameter int unsigned KSHIFT = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic [MU_W:0]      load_val,
  input  logic signed [15:0] k_gain,
  // odd samples from the coherent demodulator
  input  logic               odd_valid,
  input  fdma_pkg::cplx_t    odd_data,
  // decisions
  input  logic               sym_valid,
  input  logic               a_n,
  input  logic               b_n,
  input  logic               a_prev,
  input  logic               b_prev,
  output logic signed [fdma_pkg::DW+2:0] err,
  output logic [MU_W:0]      s_n
);
  import fdma_pkg::*;

  localparam int unsigned EW = DW + 3;
  localparam int unsigned AW = EW + 16 + 2;
  localparam logic signed [AW-1:0] ONE = AW'(1) <<< (MU_W + KSHIFT);

  cplx_t odd_q;
  logic signed [AW-1:0] acc;     // S_n with KSHIFT extra fraction bits

  // (A_prev - A_n) * x with A = +1 for bit 0, -1 for bit 1
  function automatic logic signed [EW-1:0] term(input logic prev, input logic cur,
                                                  input sample_t x);
    if (prev == cur) return '0;
    // prev=0 (+1), cur=1 (-1): +2x ; prev=1, cur=0: -2x
    return prev ? -(EW'(x) <<< 1) : (EW'(x) <<< 1);
  endfunction

  logic signed [EW-1:0] e_c;
  logic signed [AW-1:0] nxt;
  assign e_c = term(a_prev, a_n, odd_q.re) + term(b_prev, b_n, odd_q.im);
  assign nxt = acc + AW'(e_c * k_gain);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      odd_q <= '0;
      acc   <= ONE;
      err   <= '0;
    end else begin
      if (odd_valid) odd_q <= odd_data;
      if (load) begin
        acc <= AW'(load_val) <<< KSHIFT;
      end else if (sym_valid) begin
        if (nxt < 0) acc <= '0;
        else if (nxt > ONE) acc <= ONE;
        else acc <= nxt;
        err <= e_c;
      end
    end
  end

  assign s_n = acc[MU_W+KSHIFT:KSHIFT];
endmodule
