// fdma_tdm_top: on-board FDMA-to-TDM converter: transmultiplexer plus burst QPSK demodulator.
//
// The uplink carries NUM_CHANNELS uniformly spaced SCPC carriers (FDMA). The
// transmultiplexer separates them with a uniform polyphase filter bank:
//   commutator -> shared 9-tap FIR (all M branches in one multiplexed filter)
//   -> phase shifter -> M-point pipelined FFT -> multiplication by a constant.
// Every frame of M composite input samples (one per clock) yields one new
// sample of each of the M FFT bins; bins 0 .. NUM_CHANNELS-1 are the channels
// and are delivered on ch_valid/ch_index/ch_data, the remaining bins are guard
// band and dropped. The samples of the channel chosen by ch_sel are passed to
// the burst QPSK demodulator, whose recovered symbols and unique-word/data
// outputs leave the chip for the TDM downlink.
//
// Timing: one composite input sample per clock; a frame is M clocks (22.22 us
// at a 46.08 MHz clock for M = 1024, i.e. 45 kHz per channel). A channel's
// sample leaves M*(STAGES/2 + 1) + ~90 clocks after the frame that produced it
// entered. The module chain follows the document; serving a single selected
// channel with one demodulator, and the load ports for the prototype filter
// coefficients and the output constant, are this implementation's choices.
module fdma_tdm_top #(
  parameter int unsigned M            = fdma_pkg::FFT_N,
  parameter int unsigned NUM_CHANNELS = fdma_pkg::NUM_CHANNELS,
  parameter int unsigned TAPS         = fdma_pkg::FIR_TAPS,
  parameter int unsigned PRE_LEN      = 32,
  parameter int unsigned BW           = $clog2(M),
  parameter int unsigned TW           = $clog2(TAPS),
  parameter int unsigned MU_W         = 12,
  parameter int unsigned PH_W         = fdma_pkg::PH_W
) (
  input  logic               clk,
  input  logic               rst_n,
  // composite FDMA input
  input  logic               in_valid,
  input  fdma_pkg::cplx_t    in_data,
  // prototype filter coefficients h[k*M + b]
  input  logic               coef_we,
  input  logic [BW-1:0]      coef_branch,
  input  logic [TW-1:0]      coef_tap,
  input  fdma_pkg::sample_t  coef_data,
  // output constant
  input  fdma_pkg::cplx_t    out_const,
  // separated channels
  output logic               ch_valid,
  output logic [BW-1:0]      ch_index,
  output fdma_pkg::cplx_t    ch_data,
  output logic               frame_out,   // last bin of a frame
  output logic               overrun,
  // demodulator of the selected channel
  input  logic [BW-1:0]      ch_sel,
  input  logic               burst_start,
  input  logic signed [15:0] k1_ts,
  input  logic signed [15:0] k2_ts,
  input  logic signed [15:0] kt_gain,
  output logic               dm_acq_done,
  output logic               dm_tracking,
  output logic               dm_sym_valid,
  output logic [1:0]         dm_sym_bits,
  output logic               dm_uw_found,
  output logic               dm_data_valid,
  output logic [1:0]         dm_data_bits,
  output logic [PH_W-1:0]    dm_phase,
  output logic [MU_W:0]      dm_mu
);
  import fdma_pkg::*;

  // ---- commutator ----------------------------------------------------------
  logic          cm_valid, cm_first, cm_last;
  cplx_t         cm_data;
  logic [BW-1:0] cm_branch;

  commutator #(.M(M)) u_comm (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_data   (in_data),
    .out_valid (cm_valid),
    .out_data  (cm_data),
    .out_branch(cm_branch),
    .out_first (cm_first),
    .out_last  (cm_last)
  );

  // ---- shared polyphase FIR --------------------------------------------------
  logic          fi_valid, fi_first, fi_last;
  cplx_t         fi_data;
  logic [BW-1:0] fi_branch;

  shared_fir #(.M(M), .TAPS(TAPS)) u_fir (
    .clk        (clk),
    .rst_n      (rst_n),
    .coef_we    (coef_we),
    .coef_branch(coef_branch),
    .coef_tap   (coef_tap),
    .coef_data  (coef_data),
    .in_valid   (cm_valid),
    .in_data    (cm_data),
    .in_branch  (cm_branch),
    .in_first   (cm_first),
    .in_last    (cm_last),
    .out_valid  (fi_valid),
    .out_data   (fi_data),
    .out_branch (fi_branch),
    .out_first  (fi_first),
    .out_last   (fi_last)
  );

  // ---- phase shifter --------------------------------------------------------
  logic          ps_valid, ps_first, ps_last;
  cplx_t         ps_data;
  logic [BW-1:0] ps_branch;

  phase_shifter #(.M(M)) u_ps (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (fi_valid),
    .in_data   (fi_data),
    .in_branch (fi_branch),
    .in_first  (fi_first),
    .in_last   (fi_last),
    .out_valid (ps_valid),
    .out_data  (ps_data),
    .out_branch(ps_branch),
    .out_first (ps_first),
    .out_last  (ps_last)
  );

  // ---- FFT --------------------------------------------------------------------
  logic          ff_valid, ff_last;
  cplx_t         ff_data;
  logic [BW-1:0] ff_index;
  logic          ps_first_unused;
  assign ps_first_unused = ps_first;

  fft_pipeline #(.N(M)) u_fft (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (ps_valid),
    .in_addr  (BW'(M - 1) - ps_branch),   // position of the sample in its block
    .in_data  (ps_data),
    .in_last  (ps_last),
    .out_valid(ff_valid),
    .out_data (ff_data),
    .out_index(ff_index),
    .out_last (ff_last),
    .overrun  (overrun)
  );

  // ---- multiplication by a constant ----------------------------------------
  logic          cx_valid, cx_last;
  cplx_t         cx_data;
  logic [BW-1:0] cx_index;

  const_mult #(.IW(BW), .OUT_SHIFT(BW)) u_cmul (
    .clk      (clk),
    .rst_n    (rst_n),
    .coef     (out_const),
    .in_valid (ff_valid),
    .in_data  (ff_data),
    .in_index (ff_index),
    .in_last  (ff_last),
    .out_valid(cx_valid),
    .out_data (cx_data),
    .out_index(cx_index),
    .out_last (cx_last)
  );

  // Channels are bins 0 .. NUM_CHANNELS-1; the rest is guard band.
  assign ch_valid  = cx_valid && (cx_index < BW'(NUM_CHANNELS));
  assign ch_index  = cx_index;
  assign ch_data   = cx_data;
  assign frame_out = cx_valid && cx_last;

  // ---- demodulator of the selected channel ----------------------------------
  qpsk_demod #(.PRE_LEN(PRE_LEN), .MU_W(MU_W), .PH_W(PH_W)) u_demod (
    .clk        (clk),
    .rst_n      (rst_n),
    .burst_start(burst_start),
    .in_valid   (ch_valid && (cx_index == ch_sel)),
    .in_data    (cx_data),
    .k1_ts      (k1_ts),
    .k2_ts      (k2_ts),
    .kt_gain    (kt_gain),
    .acq_done   (dm_acq_done),
    .tracking   (dm_tracking),
    .sym_valid  (dm_sym_valid),
    .sym_bits   (dm_sym_bits),
    .uw_found   (dm_uw_found),
    .data_valid (dm_data_valid),
    .data_bits  (dm_data_bits),
    .phase_est  (dm_phase),
    .mu_est     (dm_mu)
  );
endmodule
