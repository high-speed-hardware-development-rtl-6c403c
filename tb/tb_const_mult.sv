// tb_const_mult: random bins over four frames; every output must equal
// (-1)^frame * C * X * 2**OUT_SHIFT rounded and saturated, computed here, two
// cycles after the input.
module tb_const_mult;
  import fdma_pkg::*;
  localparam int IW = 4, SH = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  cplx_t coef = '0;
  logic in_valid = 0, in_last = 0;
  cplx_t in_data = '0;
  logic [IW-1:0] in_index = '0;
  logic out_valid, out_last;
  cplx_t out_data;
  logic [IW-1:0] out_index;

  const_mult #(.IW(IW), .OUT_SHIFT(SH)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int r15(longint v);
    longint r;
    r = (v + 16384) >>> 15;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  cplx_t ex [$];
  int ei [$], et [$];

  initial begin
    coef.re = 16'sd23170; coef.im = -16'sd12000;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 4; f++)
      for (int k = 0; k < 16; k++) begin
        longint pr, pi;
        cplx_t x;
        @(negedge clk);
        in_valid = 1; in_index = IW'(k); in_last = (k == 15);
        in_data.re = sample_t'($urandom_range(0, 6000) - 3000);
        in_data.im = sample_t'($urandom_range(0, 6000) - 3000);
        pr = (longint'(in_data.re) * coef.re - longint'(in_data.im) * coef.im) * (1 << SH);
        pi = (longint'(in_data.re) * coef.im + longint'(in_data.im) * coef.re) * (1 << SH);
        if (f % 2 == 1) begin pr = -pr; pi = -pi; end
        x.re = sample_t'(r15(pr)); x.im = sample_t'(r15(pi));
        ex.push_back(x); ei.push_back(k); et.push_back(int'($time) + 25);
      end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (ex.size() != 0) begin failures++; $display("%0d outputs missing", ex.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (ex.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        cplx_t x;
        int k, t;
        x = ex.pop_front(); k = ei.pop_front(); t = et.pop_front();
        if (out_data != x || int'(out_index) != k || out_last != (k == 15) || int'($time) != t) begin
          failures++;
          $display("bin %0d got %0d,%0d exp %0d,%0d", k, out_data.re, out_data.im, x.re, x.im);
        end
      end
    end
  end
endmodule
