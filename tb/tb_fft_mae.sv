// tb_fft_mae: random operands and twiddles; the butterfly outputs must match
// y0 = floor((a+b)/2), y1 = round(floor((a-b)/2) * W / 2**15), computed here,
// three cycles after the operands, with the tag carried along.
module tb_fft_mae;
  import fdma_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0;
  cplx_t a = '0, b = '0, w = '0;
  logic [19:0] in_tag = '0;
  logic out_valid;
  cplx_t y0, y1;
  logic [19:0] out_tag;

  fft_mae #(.TAG_W(20)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int fl2(int v);   // floor(v/2)
    return (v >= 0) ? v / 2 : -((-v + 1) / 2);
  endfunction
  function automatic int r15(longint v);
    longint r;
    r = (v + 16384) >>> 15;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  cplx_t e0 [$], e1 [$];
  int etag [$], et [$];

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      int sr, si, dr, di;
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      a = cplx_t'($urandom); b = cplx_t'($urandom); w = cplx_t'($urandom);
      in_tag = 20'($urandom);
      if (in_valid) begin
        cplx_t x0, x1;
        sr = fl2(int'(a.re) + int'(b.re)); si = fl2(int'(a.im) + int'(b.im));
        dr = fl2(int'(a.re) - int'(b.re)); di = fl2(int'(a.im) - int'(b.im));
        x0.re = sample_t'(sr); x0.im = sample_t'(si);
        x1.re = sample_t'(r15(longint'(dr) * w.re - longint'(di) * w.im));
        x1.im = sample_t'(r15(longint'(dr) * w.im + longint'(di) * w.re));
        e0.push_back(x0); e1.push_back(x1); etag.push_back(int'(in_tag));
        et.push_back(int'($time) + 35);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (e0.size() != 0) begin failures++; $display("%0d outputs missing", e0.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (e0.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        cplx_t x0, x1;
        int tg, t;
        x0 = e0.pop_front(); x1 = e1.pop_front(); tg = etag.pop_front(); t = et.pop_front();
        if (y0 != x0 || y1 != x1 || int'(out_tag) != tg || int'($time) != t) begin
          failures++;
          $display("mismatch: y0 %h/%h y1 %h/%h", y0, x0, y1, x1);
        end
      end
    end
  end
endmodule
