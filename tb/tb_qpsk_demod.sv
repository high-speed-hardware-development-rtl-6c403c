// tb_qpsk_demod: two complete TDMA bursts (alternating preamble, unique word,
// random data) at two samples per symbol, each with a carrier phase offset, a
// small carrier frequency offset and a late sampling instant, the second with
// the symbols on the odd sample phase. The demodulator must acquire on the
// preamble, find the unique word once, and deliver every data symbol
// correctly; the carrier and timing loops must both have moved.
module tb_qpsk_demod;
  import fdma_pkg::*;
  localparam int PRE = 32, UWL = 16, NDATA = 64, GAP = 40;
  localparam logic [31:0] UW = 32'hE4B1_1D2F;
  localparam real PI = 3.14159265358979323846;
  localparam real AMP = 12000.0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic burst_start = 0, in_valid = 0;
  cplx_t in_data = '0;
  logic signed [15:0] k1_ts = 16'sd2800, k2_ts = 16'sd60, kt_gain = 16'sd200;
  logic acq_done, tracking, sym_valid, uw_found, data_valid;
  logic [1:0] sym_bits, data_bits;
  logic [11:0] phase_est;
  logic [12:0] mu_est;

  qpsk_demod #(.PRE_LEN(PRE), .UW_LEN(UWL), .UW(UW)) dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_acq = 0, n_uw = 0, n_data = 0, n_err = 0;
  logic [1:0] exp_data [$];
  always @(posedge clk) if (rst_n) begin
    if (acq_done) n_acq++;
    if (uw_found) n_uw++;
    if (data_valid) begin
      n_data++;
      if (exp_data.size() == 0 || data_bits != exp_data.pop_front()) n_err++;
    end
  end

  // symbol k of the burst as +/-1 values
  real sa [PRE/2 + UWL + NDATA + 4];
  real sb [PRE/2 + UWL + NDATA + 4];

  // piecewise-linear waveform through the symbol centres t = 0, 1, 2, ...
  function automatic real wave(real t, bit q);
    int k;
    real fr, v0, v1;
    if (t < 0.0) return 0.0;
    k = $rtoi($floor(t));
    fr = t - k;
    v0 = q ? sb[k] : sa[k];
    v1 = q ? sb[k+1] : sa[k+1];
    return v0 + fr * (v1 - v0);
  endfunction

  function automatic sample_t qz(real v);
    return sample_t'($rtoi(v + ((v >= 0) ? 0.5 : -0.5)));
  endfunction

  task automatic burst(real phi, real dphi, real tau, int shift);
    int nsym;
    int nsmp;
    nsym = PRE / 2 + UWL + NDATA;
    exp_data.delete();
    for (int k = 0; k < PRE / 2; k++) begin
      sa[k] = (k % 2) ? -1.0 : 1.0;
      sb[k] = sa[k];
    end
    for (int k = 0; k < UWL; k++) begin
      sa[PRE/2 + k] = UW[2*(UWL-1-k) + 1] ? -1.0 : 1.0;
      sb[PRE/2 + k] = UW[2*(UWL-1-k)]     ? -1.0 : 1.0;
    end
    for (int k = 0; k < NDATA + 4; k++) begin
      logic [1:0] d;
      d = 2'($urandom);
      sa[PRE/2 + UWL + k] = d[1] ? -1.0 : 1.0;
      sb[PRE/2 + UWL + k] = d[0] ? -1.0 : 1.0;
      if (k < NDATA) exp_data.push_back(d);
    end
    @(negedge clk) burst_start = 1;
    @(negedge clk) burst_start = 0;
    nsmp = 2 * nsym;
    for (int n = 0; n < nsmp; n++) begin
      real t, ph, i0, q0;
      t = real'(n - shift) / 2.0 + tau;
      ph = phi + dphi * t;
      i0 = AMP * wave(t, 0);
      q0 = AMP * wave(t, 1);
      @(negedge clk);
      in_valid = 1;
      in_data.re = qz(i0 * $cos(ph) - q0 * $sin(ph));
      in_data.im = qz(i0 * $sin(ph) + q0 * $cos(ph));
      @(negedge clk) in_valid = 0;
      repeat (GAP) @(negedge clk);
    end
  endtask

  initial begin
    logic [11:0] ph0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 2; b++) begin
      int acq0, uw0, data0, err0;
      acq0 = n_acq; uw0 = n_uw; data0 = n_data; err0 = n_err;
      fork
        burst((b == 0) ? 0.45 : -0.6, (b == 0) ? 0.004 : -0.003, (b == 0) ? 0.08 : 0.12, b);
        begin
          @(posedge acq_done);
          @(posedge clk); #1;
          ph0 = phase_est;
        end
      join
      repeat (20) @(posedge clk);
      checks += 5;
      if (n_acq - acq0 != 1) begin failures++; $display("burst %0d: acquisitions %0d", b, n_acq - acq0); end
      if (n_uw - uw0 != 1) begin failures++; $display("burst %0d: unique word found %0d times", b, n_uw - uw0); end
      if (n_data - data0 != NDATA || n_err != err0) begin
        failures++;
        $display("burst %0d: %0d data symbols, %0d wrong", b, n_data - data0, n_err - err0);
      end
      if (phase_est == ph0) begin failures++; $display("burst %0d: carrier loop never moved", b); end
      // the preamble estimate must be close to the mean phase over the preamble
      begin
        real pm;
        int ep, d;
        pm = (b == 0) ? (0.45 + 0.004 * 8.0) : (-0.6 - 0.003 * 8.0);
        ep = $rtoi(pm / (2.0 * PI) * 4096.0);
        d = (int'(ph0) - ep) & 12'hFFF;
        if (d > 2048) d -= 4096;
        checks++;
        if (d > 40 || d < -40) begin failures++; $display("burst %0d: acquired phase %0d, expected %0d", b, ph0, ep & 12'hFFF); end
      end
      if (mu_est >= 13'd4096 || mu_est < 13'd2800) begin
        failures++;
        $display("burst %0d: timing loop at %0d", b, mu_est);
      end
      $display("burst %0d: phase %0d mu %0d data %0d err %0d", b, phase_est, mu_est, n_data - data0, n_err - err0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
