// tb_coherent_demod: random samples with random interpolation instants mu and
// carrier phases theta; every output must equal the linear interpolation
// x[n-1] + mu*(x[n]-x[n-1]) rotated by exp(-j*2*pi*theta/4096), computed here
// in floating point (within 3 LSB), four cycles after its input, with the
// even/odd label following the selected symbol phase.
module tb_coherent_demod;
  import fdma_pkg::*;
  localparam int MU_W = 12, PH_W = 12;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic sync = 0, sym_phase = 0, in_valid = 0;
  logic [MU_W:0] mu = '0;
  logic [PH_W-1:0] theta = '0;
  cplx_t in_data = '0;
  logic out_valid, out_even;
  cplx_t out_data;

  coherent_demod #(.MU_W(MU_W), .PH_W(PH_W)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  real er [$], ei [$];
  bit  ee [$];
  int  et [$];

  initial begin
    cplx_t prev;
    int cnt;
    prev = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 4; blk++) begin
      @(negedge clk);
      sync = 1; sym_phase = blk[0];
      mu = (MU_W+1)'($urandom_range(0, 1 << MU_W));
      theta = PH_W'($urandom);
      @(negedge clk) sync = 0;
      cnt = 0;
      repeat (60) begin
        real ir, ii, a;
        @(negedge clk);
        in_valid = $urandom_range(0, 2) != 0;
        in_data.re = sample_t'($urandom_range(0, 40000) - 20000);
        in_data.im = sample_t'($urandom_range(0, 40000) - 20000);
        if (in_valid) begin
          ir = real'(prev.re) + real'(mu) / 4096.0 * (real'(in_data.re) - real'(prev.re));
          ii = real'(prev.im) + real'(mu) / 4096.0 * (real'(in_data.im) - real'(prev.im));
          a = 2.0 * PI * real'(theta) / 4096.0;
          er.push_back(ir * $cos(a) + ii * $sin(a));
          ei.push_back(ii * $cos(a) - ir * $sin(a));
          ee.push_back((cnt % 2) == int'(sym_phase));
          et.push_back(int'($time) + 45);
          prev = in_data;
          cnt++;
        end
      end
      @(negedge clk) in_valid = 0;
      repeat (8) @(posedge clk);
    end
    checks++;
    if (er.size() != 0) begin failures++; $display("%0d outputs missing", er.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (er.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        real r, i;
        bit e;
        int t;
        r = er.pop_front(); i = ei.pop_front(); e = ee.pop_front(); t = et.pop_front();
        if (absr(r - out_data.re) > 3.0 || absr(i - out_data.im) > 3.0 || out_even != e ||
            int'($time) != t) begin
          failures++;
          $display("got %0d,%0d exp %f,%f even %0d/%0d", out_data.re, out_data.im, r, i, out_even, e);
        end
      end
    end
  end
endmodule
