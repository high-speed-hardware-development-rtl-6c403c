// tb_shared_fir: loads random branch coefficients, feeds several blocks of
// random samples in commutator order and compares every output with a
// per-branch 9-tap convolution computed here; also checks the 4-cycle latency.
module tb_shared_fir;
  import fdma_pkg::*;
  localparam int M = 8, TAPS = 9;
  localparam int BW = $clog2(M), TW = $clog2(TAPS);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic coef_we = 0;
  logic [BW-1:0] coef_branch = '0;
  logic [TW-1:0] coef_tap = '0;
  sample_t coef_data = '0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  cplx_t in_data = '0;
  logic [BW-1:0] in_branch = '0;
  logic out_valid, out_first, out_last;
  cplx_t out_data;
  logic [BW-1:0] out_branch;

  shared_fir #(.M(M), .TAPS(TAPS)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int h [M][TAPS];
  int xr [M][TAPS];   // history, index 0 newest
  int xi [M][TAPS];
  int exp_re [$], exp_im [$], exp_b [$], exp_t [$];

  function automatic int round15(longint v);
    longint r;
    r = (v + 16384) >>> 15;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  bit checking = 0;

  initial begin
    for (int b = 0; b < M; b++)
      for (int k = 0; k < TAPS; k++) begin
        h[b][k] = $urandom_range(0, 16000) - 8000;
        xr[b][k] = 0;
        xi[b][k] = 0;
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // clear delay lines by a few blocks of zeros, then load coefficients
    for (int b = 0; b < M; b++)
      for (int k = 0; k < TAPS; k++) begin
        @(negedge clk);
        coef_we = 1; coef_branch = BW'(b); coef_tap = TW'(k); coef_data = sample_t'(h[b][k]);
      end
    @(negedge clk) coef_we = 0;
    for (int n = 0; n < (TAPS + 1) * M; n++) begin
      @(negedge clk);
      in_valid = 1; in_branch = BW'(M - 1 - n % M); in_data = '0;
      in_first = 0; in_last = 0;
    end
    @(negedge clk) in_valid = 0;
    repeat (10) @(posedge clk);
    // random data, 14 blocks (longer than the filter)
    checking = 1;
    for (int n = 0; n < 14 * M; n++) begin
      int b;
      longint sr, si;
      @(negedge clk);
      b = M - 1 - n % M;
      in_valid = 1; in_branch = BW'(b);
      in_data.re = sample_t'($urandom_range(0, 40000) - 20000);
      in_data.im = sample_t'($urandom_range(0, 40000) - 20000);
      in_first = (b == M - 1); in_last = (b == 0);
      for (int k = TAPS - 1; k > 0; k--) begin xr[b][k] = xr[b][k-1]; xi[b][k] = xi[b][k-1]; end
      xr[b][0] = in_data.re; xi[b][0] = in_data.im;
      sr = 0; si = 0;
      for (int k = 0; k < TAPS; k++) begin
        sr += longint'(xr[b][k]) * h[b][k];
        si += longint'(xi[b][k]) * h[b][k];
      end
      exp_re.push_back(round15(sr)); exp_im.push_back(round15(si));
      exp_b.push_back(b); exp_t.push_back(int'($time) + 45);   // 4 clock periods after the sampling edge
    end
    @(negedge clk) in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (exp_re.size() != 0) begin failures++; $display("%0d outputs missing", exp_re.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (out_valid && checking) begin
      int er, ei, eb, et;
      checks++;
      if (exp_re.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
      er = exp_re.pop_front(); ei = exp_im.pop_front(); eb = exp_b.pop_front(); et = exp_t.pop_front();
      if (out_data.re != sample_t'(er) || out_data.im != sample_t'(ei) || int'($time) != et ||
          out_branch != BW'(eb) ||
          out_first != (eb == M - 1) || out_last != (eb == 0)) begin
        failures++;
        $display("branch %0d: got %0d,%0d exp %0d,%0d at cycle %0d exp %0d",
                 eb, out_data.re, out_data.im, er, ei, $time, et);
      end
      end
    end
  end
endmodule
