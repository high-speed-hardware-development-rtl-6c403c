// tb_fdma_tdm_top_full: the end-to-end test of tb_fdma_tdm_top with the
// converter at its full size (1024 branches and FFT points, 800 channels).
//
// The composite input carries two QPSK bursts on channels CH and CH+2 (centre
// frequencies (k - 1/2) * fs/M) with independent data, at two samples per
// symbol of the channel rate fs/M. The prototype filter (a Hamming-windowed
// sinc of 9*M taps, cut off at half the channel spacing) is computed here and
// loaded with the alternating tap signs the half-bin bank needs. After the
// filter lines have filled, the demodulator is pointed at channel CH and
// started on its preamble; it must find the unique word and recover all data
// symbols. The test also checks that the neighbouring channel's energy stays
// in its own bin (an empty bin between them stays near zero), that frames
// come out once every M clocks, and counts each mechanism: frames, bank
// swaps without overrun, acquisition, unique word, carrier and timing loop
// updates.
module tb_fdma_tdm_top_full;
  import fdma_pkg::*;
  localparam int M = FFT_N;
  localparam int NCH = NUM_CHANNELS;
  localparam int TAPS = 9;
  localparam int BW = $clog2(M);
  localparam int CH = 5;
  localparam int PRE = 32, UWL = 16, NDATA = 64;
  localparam logic [31:0] UW = 32'hE4B1_1D2F;
  localparam int M0 = 12;                  // frame in which the bursts start
  localparam real PI = 3.14159265358979323846;
  localparam real AMP = 8000.0;
  localparam real TLATE = 0.08;            // sampling instant late by this many symbols

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0;
  cplx_t in_data = '0;
  logic coef_we = 0;
  logic [BW-1:0] coef_branch = '0;
  logic [$clog2(TAPS)-1:0] coef_tap = '0;
  sample_t coef_data = '0;
  cplx_t out_const;
  logic ch_valid, frame_out, overrun;
  logic [BW-1:0] ch_index;
  cplx_t ch_data;
  logic [BW-1:0] ch_sel = BW'(CH);
  logic burst_start = 0;
  logic signed [15:0] k1_ts = 16'sd2800, k2_ts = 16'sd60, kt_gain = 16'sd200;
  logic dm_acq_done, dm_tracking, dm_sym_valid, dm_uw_found, dm_data_valid;
  logic [1:0] dm_sym_bits, dm_data_bits;
  logic [11:0] dm_phase;
  logic [12:0] dm_mu;

  fdma_tdm_top dut (.*);

  localparam int NSYM = PRE / 2 + UWL + NDATA;
  localparam int FRAMES = M0 + 2 * NSYM + 12;

  initial begin
    repeat ((FRAMES + 40) * M + 20 * TAPS * M) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- burst symbols for the two channels ---------------------------------
  real sa [2][NSYM + 8];
  real sb [2][NSYM + 8];
  logic [1:0] exp_data [$];

  function automatic real wave(int c, real t, bit q);
    int k;
    real fr, v0, v1;
    if (t < 0.0 || t >= NSYM + 6) return 0.0;
    k = $rtoi($floor(t));
    fr = t - k;
    v0 = q ? sb[c][k] : sa[c][k];
    v1 = q ? sb[c][k+1] : sa[c][k+1];
    return v0 + fr * (v1 - v0);
  endfunction

  function automatic sample_t qz(real v);
    return sample_t'($rtoi(v + ((v >= 0) ? 0.5 : -0.5)));
  endfunction

  // ---- mechanism counters ----------------------------------------------------
  int n_frames = 0, n_acq = 0, n_uw = 0, n_data = 0, n_err = 0, n_sym = 0;
  int last_frame_cyc = -1, frame_gap_err = 0, cyc = 0;
  real e_ch = 0.0, e_nb = 0.0, e_gap = 0.0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    if (frame_out) begin
      n_frames++;
      if (last_frame_cyc >= 0 && cyc - last_frame_cyc != M) frame_gap_err++;
      last_frame_cyc = cyc;
    end
    if (dm_acq_done) n_acq++;
    if (dm_uw_found) n_uw++;
    if (dm_sym_valid) n_sym++;
    if (dm_data_valid) begin
      n_data++;
      if (n_data <= NDATA && dm_data_bits != exp_data.pop_front()) n_err++;
    end
    if (ch_valid && n_frames > M0 + 10 && n_frames < M0 + 2 * NSYM) begin
      real p;
      p = real'(ch_data.re) * ch_data.re + real'(ch_data.im) * ch_data.im;
      if (int'(ch_index) == CH) e_ch += p;
      if (int'(ch_index) == CH + 2) e_nb += p;
      if (int'(ch_index) == CH + 1) e_gap += p;
    end
  end

  // burst_start just before the output sample that holds symbol 0's centre
  initial begin
    wait (n_frames == M0 + 2);
    @(negedge clk) burst_start = 1;
    @(negedge clk) burst_start = 0;
  end

  logic [11:0] ph_acq;
  logic [12:0] mu_acq;
  initial begin
    @(posedge dm_acq_done);
    @(posedge clk); #1;
    ph_acq = dm_phase;
    mu_acq = dm_mu;
  end

  initial begin
    real h [TAPS * M];
    real hs;
    out_const.re = 16'sd32767; out_const.im = 16'sd0;
    // prototype low-pass filter
    hs = 0.0;
    for (int n = 0; n < TAPS * M; n++) begin
      real x, w;
      x = real'(n) - real'(TAPS * M - 1) / 2.0;
      w = 0.54 - 0.46 * $cos(2.0 * PI * n / (TAPS * M - 1));
      h[n] = ((x == 0.0) ? 1.0 : $sin(PI * x / M) / (PI * x / M)) * w;
      hs += h[n];
    end
    // channel data: preamble, unique word, random data
    for (int c = 0; c < 2; c++) begin
      for (int k = 0; k < PRE / 2; k++) begin
        sa[c][k] = (k % 2) ? -1.0 : 1.0;
        sb[c][k] = sa[c][k];
      end
      for (int k = 0; k < UWL; k++) begin
        sa[c][PRE/2 + k] = UW[2*(UWL-1-k) + 1] ? -1.0 : 1.0;
        sb[c][PRE/2 + k] = UW[2*(UWL-1-k)]     ? -1.0 : 1.0;
      end
      for (int k = PRE / 2 + UWL; k < NSYM + 8; k++) begin
        logic [1:0] d;
        d = 2'($urandom);
        sa[c][k] = d[1] ? -1.0 : 1.0;
        sb[c][k] = d[0] ? -1.0 : 1.0;
        if (c == 0 && k < NSYM) exp_data.push_back(d);
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < TAPS; k++)
      for (int b = 0; b < M; b++) begin
        @(negedge clk);
        coef_we = 1; coef_tap = ($clog2(TAPS))'(k); coef_branch = BW'(b);
        coef_data = qz(32768.0 * h[k * M + b] / hs * ((k % 2) ? -1.0 : 1.0));
      end
    @(negedge clk) coef_we = 0;
    // composite input: one sample per clock
    for (int c = 0; c < FRAMES * M; c++) begin
      real re, im;
      re = 0.0; im = 0.0;
      for (int ch = 0; ch < 2; ch++) begin
        real t, f, a, i0, q0;
        // time in symbols; chosen so that symbol centres meet output samples
        t = real'(c - M0 * M) / (2.0 * M) - 1.25 + TLATE;
        f = (real'(CH + 2 * ch) - 0.5) / M;
        a = 2.0 * PI * f * c + ((ch == 0) ? 0.7 : 2.0);
        i0 = AMP * wave(ch, t, 0);
        q0 = AMP * wave(ch, t, 1);
        re += i0 * $cos(a) - q0 * $sin(a);
        im += i0 * $sin(a) + q0 * $cos(a);
      end
      @(negedge clk);
      in_valid = 1;
      in_data.re = qz(re);
      in_data.im = qz(im);
    end
    @(negedge clk) in_valid = 0;
    repeat (14 * M) @(posedge clk);

    $display("frames %0d acq %0d uw %0d symbols %0d data %0d errors %0d", n_frames, n_acq, n_uw, n_sym, n_data, n_err);
    $display("energy: channel %e, neighbour %e, empty bin between %e", e_ch, e_nb, e_gap);
    $display("carrier phase %0d -> %0d, timing %0d -> %0d", ph_acq, dm_phase, mu_acq, dm_mu);
    checks++; if (n_frames < FRAMES - 2 || frame_gap_err != 0) begin failures++; $display("frame rate wrong"); end
    checks++; if (overrun) begin failures++; $display("overrun"); end
    checks++; if (n_acq != 1) begin failures++; $display("preamble acquisition happened %0d times", n_acq); end
    checks++; if (n_uw != 1) begin failures++; $display("unique word found %0d times", n_uw); end
    checks++; if (n_data < NDATA - 2 || n_err != 0) begin failures++; $display("data symbols wrong"); end
    checks++; if (dm_phase == ph_acq) begin failures++; $display("carrier tracking never moved"); end
    checks++; if (dm_mu == mu_acq) begin failures++; $display("timing tracking never moved"); end
    checks++; if (!(e_nb > 0.5 * e_ch && e_gap < 0.05 * e_ch)) begin failures++; $display("channels not separated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
