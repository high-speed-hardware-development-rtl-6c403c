// carrier_tracking: decision-directed second-order carrier phase tracking loop.
//
// For each symbol the even sample X_2n + jY_2n (already derotated by the
// current estimate) and its decisions A_n, B_n (+1/-1) give the phase error
//     e_n = Y_2n * A_n - X_2n * B_n      (~ |z| * sin(residual phase))
// The loop filter is proportional-plus-integral with the two gains of the
// document, K1*Ts and K2*Ts:
//     f_n     = f_(n-1) + K2 * e_n
//     theta_n = theta_(n-1) + K1 * e_n + f_n
// theta is a 32-bit binary angle (a full turn is 2**32); its top PH_W bits
// drive the derotator of the coherent demodulator. load presets the phase
// (preamble estimate) and clears the frequency term.
//
// Timing: updated one cycle after each sym_valid.
// The loop structure and the gains follow the document; the error detector
// and the number formats are this implementation's choices.
module carrier_tracking #(
  parameter int unsigned PH_W = fdma_pkg::PH_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic [PH_W-1:0]    load_phase,
  input  logic signed [15:0] k1_ts,
  input  logic signed [15:0] k2_ts,
  input  logic               sym_valid,
  input  logic               a_n,
  input  logic               b_n,
  input  fdma_pkg::cplx_t    sym_data,
  output logic signed [fdma_pkg::DW+1:0] err,
  output logic [PH_W-1:0]    phase
);
  import fdma_pkg::*;

  localparam int unsigned EW = DW + 2;

  logic [31:0]          theta;
  logic signed [31:0]   freq;
  logic signed [EW-1:0] e_c;

  always_comb begin
    logic signed [EW-1:0] ya, xb;
    ya  = a_n ? -EW'(sym_data.im) : EW'(sym_data.im);
    xb  = b_n ? -EW'(sym_data.re) : EW'(sym_data.re);
    e_c = ya - xb;
  end

  logic signed [31:0] f_nxt;
  assign f_nxt = freq + 32'(e_c * k2_ts);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      theta <= '0;
      freq  <= '0;
      err   <= '0;
    end else if (load) begin
      theta <= {load_phase, {(32 - PH_W){1'b0}}};
      freq  <= '0;
    end else if (sym_valid) begin
      freq  <= f_nxt;
      theta <= theta + 32'(e_c * k1_ts) + f_nxt;
      err   <= e_c;
    end
  end

  assign phase = theta[31:32-PH_W];
endmodule
