// qpsk_demod: burst-mode QPSK demodulator for one TDMA channel.
//
// A TDMA burst consists of guard time, preamble, unique word and data. The
// demodulator receives the channel at two samples per symbol and
//   1. on burst_start runs the preamble module (carrier and timing
//      acquisition) over the first PRE_LEN samples,
//   2. loads its estimates into the carrier and timing tracking loops and
//      selects the symbol sample phase,
//   3. then tracks: the coherent demodulator interpolates and derotates each
//      sample; even samples go to the bit decision and the carrier loop, odd
//      samples to the timing loop, which closes back onto the interpolator
//      (mu) and the derotator (theta);
//   4. searches the decisions for the unique word and delivers the data
//      symbols that follow it.
//
// Timing: samples may arrive at most every clock during tracking but the
// acquisition needs about log2(PRE_LEN/2) + 20 cycles after the last preamble
// sample before the next sample comes; in the transmultiplexer a channel sample
// arrives once per 1024-cycle frame. Symbol decisions appear 5 cycles after
// their sample. The module structure follows the document's block diagram;
// the control sequence and the loop-gain ports are this implementation's.
module qpsk_demod #(
  parameter int unsigned PRE_LEN = 32,
  parameter int unsigned UW_LEN  = 16,
  parameter logic [2*UW_LEN-1:0] UW = 32'hE4B1_1D2F,
  parameter int unsigned MU_W    = 12,
  parameter int unsigned PH_W    = fdma_pkg::PH_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               burst_start,
  input  logic               in_valid,
  input  fdma_pkg::cplx_t    in_data,
  input  logic signed [15:0] k1_ts,       // carrier loop proportional gain
  input  logic signed [15:0] k2_ts,       // carrier loop integral gain
  input  logic signed [15:0] kt_gain,     // timing loop gain
  output logic               acq_done,    // preamble estimates loaded
  output logic               tracking,
  output logic               sym_valid,
  output logic [1:0]         sym_bits,    // {A_n, B_n}
  output logic               uw_found,
  output logic               data_valid,
  output logic [1:0]         data_bits,
  output logic [PH_W-1:0]    phase_est,
  output logic [MU_W:0]      mu_est
);
  import fdma_pkg::*;

  // ---- control --------------------------------------------------------------
  logic pre_done, pre_sym_phase;
  logic [PH_W-1:0] pre_phase;
  logic sym_phase_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tracking    <= 1'b0;
      sym_phase_q <= 1'b0;
    end else begin
      if (burst_start) tracking <= 1'b0;
      else if (pre_done) begin
        tracking    <= 1'b1;
        sym_phase_q <= pre_sym_phase;
      end
    end
  end
  assign acq_done = pre_done;

  preamble_proc #(.PRE_LEN(PRE_LEN), .PH_W(PH_W)) u_pre (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (burst_start),
    .in_valid (in_valid),
    .in_data  (in_data),
    .done     (pre_done),
    .sym_phase(pre_sym_phase),
    .phase    (pre_phase)
  );

  // ---- coherent demodulator -------------------------------------------------
  logic  cd_valid, cd_even;
  cplx_t cd_data;

  coherent_demod #(.MU_W(MU_W), .PH_W(PH_W)) u_cd (
    .clk      (clk),
    .rst_n    (rst_n),
    .sync     (burst_start),
    .sym_phase(sym_phase_q),
    .mu       (mu_est),
    .theta    (phase_est),
    .in_valid (in_valid),
    .in_data  (in_data),
    .out_valid(cd_valid),
    .out_even (cd_even),
    .out_data (cd_data)
  );

  // ---- bit decision ---------------------------------------------------------
  logic  bd_valid, a_n, b_n, a_prev, b_prev;
  cplx_t bd_data;

  bit_decision u_bd (
    .clk      (clk),
    .rst_n    (rst_n),
    .sync     (burst_start),
    .in_valid (cd_valid),
    .in_even  (cd_even),
    .in_data  (cd_data),
    .sym_valid(bd_valid),
    .a_n      (a_n),
    .b_n      (b_n),
    .a_prev   (a_prev),
    .b_prev   (b_prev),
    .sym_data (bd_data)
  );

  logic trk_sym;
  assign trk_sym   = bd_valid && tracking;
  assign sym_valid = trk_sym;
  assign sym_bits  = {a_n, b_n};

  // ---- tracking loops -------------------------------------------------------
  logic signed [DW+2:0] t_err_unused;
  logic signed [DW+1:0] c_err_unused;

  timing_tracking #(.MU_W(MU_W)) u_tt (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (pre_done),
    .load_val ((MU_W+1)'(1) << MU_W),
    .k_gain   (kt_gain),
    .odd_valid(cd_valid && !cd_even),
    .odd_data (cd_data),
    .sym_valid(trk_sym),
    .a_n      (a_n),
    .b_n      (b_n),
    .a_prev   (a_prev),
    .b_prev   (b_prev),
    .err      (t_err_unused),
    .s_n      (mu_est)
  );

  carrier_tracking #(.PH_W(PH_W)) u_ct (
    .clk       (clk),
    .rst_n     (rst_n),
    .load      (pre_done),
    .load_phase(pre_phase),
    .k1_ts     (k1_ts),
    .k2_ts     (k2_ts),
    .sym_valid (trk_sym),
    .a_n       (a_n),
    .b_n       (b_n),
    .sym_data  (bd_data),
    .err       (c_err_unused),
    .phase     (phase_est)
  );

  // ---- unique word and data ------------------------------------------------
  uw_detector #(.UW_LEN(UW_LEN), .UW(UW)) u_uw (
    .clk       (clk),
    .rst_n     (rst_n),
    .sync      (burst_start),
    .sym_valid (trk_sym),
    .sym_bits  ({a_n, b_n}),
    .uw_found  (uw_found),
    .data_valid(data_valid),
    .data_bits (data_bits)
  );
endmodule
