// tb_timing_tracking: random odd samples and decisions; the timing error must
// be I(A_prev - A_n) + Q(B_prev - B_n) with A, B = +1/-1, and S_n the clamped
// running sum of K*e / 2**16, both worked out here. Also checks load.
module tb_timing_tracking;
  import fdma_pkg::*;
  localparam int MU_W = 12, KS = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic load = 0;
  logic [MU_W:0] load_val = '0;
  logic signed [15:0] k_gain = 16'sd300;
  logic odd_valid = 0, sym_valid = 0, a_n = 0, b_n = 0, a_prev = 0, b_prev = 0;
  cplx_t odd_data = '0;
  logic signed [DW+2:0] err;
  logic [MU_W:0] s_n;

  timing_tracking #(.MU_W(MU_W), .KSHIFT(KS)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pm(bit b);
    return b ? -1 : 1;
  endfunction

  initial begin
    longint acc, one;
    int clamps;
    one = longint'(1) << (MU_W + KS);
    clamps = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    load = 1; load_val = (MU_W+1)'(1 << (MU_W - 1));
    acc = longint'(1 << (MU_W - 1)) << KS;
    @(negedge clk) load = 0;
    for (int n = 0; n < 400; n++) begin
      int e;
      @(negedge clk);
      odd_valid = 1; odd_data = cplx_t'($urandom);
      if (n > 200) begin odd_data.re = odd_data.re >>> 2; end
      @(negedge clk);
      odd_valid = 0;
      sym_valid = 1; a_n = $urandom_range(0, 1); b_n = $urandom_range(0, 1);
      a_prev = $urandom_range(0, 1); b_prev = $urandom_range(0, 1);
      e = int'(odd_data.re) * (pm(a_prev) - pm(a_n)) + int'(odd_data.im) * (pm(b_prev) - pm(b_n));
      acc = acc + longint'(e) * k_gain;
      if (acc < 0) begin acc = 0; clamps++; end
      if (acc > one) begin acc = one; clamps++; end
      @(posedge clk); #1;
      sym_valid = 0;
      checks++;
      if (int'(err) != e || s_n != (MU_W+1)'(acc >>> KS)) begin
        failures++;
        $display("n=%0d err %0d exp %0d, s %0d exp %0d", n, err, e, s_n, acc >>> KS);
      end
    end
    checks++;
    if (clamps == 0) begin failures++; $display("limit never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
