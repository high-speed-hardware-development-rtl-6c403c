// tb_carrier_tracking: random symbols and decisions; the phase error must be
// Y*A - X*B and the loop state f += K2*e, theta += K1*e + f (32-bit wrap),
// worked out here; also checks that load presets the phase.
module tb_carrier_tracking;
  import fdma_pkg::*;
  localparam int PH_W = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic load = 0;
  logic [PH_W-1:0] load_phase = '0;
  logic signed [15:0] k1_ts = 16'sd1200, k2_ts = 16'sd40;
  logic sym_valid = 0, a_n = 0, b_n = 0;
  cplx_t sym_data = '0;
  logic signed [DW+1:0] err;
  logic [PH_W-1:0] phase;

  carrier_tracking #(.PH_W(PH_W)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned theta;
    int f;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    load = 1; load_phase = 12'h3A5;
    @(negedge clk) load = 0;
    theta = 32'h3A5 << 20; f = 0;
    checks++;
    if (phase != 12'h3A5) begin failures++; $display("load failed"); end
    for (int n = 0; n < 300; n++) begin
      int e;
      @(negedge clk);
      sym_valid = 1; a_n = $urandom_range(0, 1); b_n = $urandom_range(0, 1);
      sym_data = cplx_t'($urandom);
      e = (a_n ? -int'(sym_data.im) : int'(sym_data.im)) - (b_n ? -int'(sym_data.re) : int'(sym_data.re));
      f = f + e * k2_ts;
      theta = theta + int'(e * k1_ts) + f;
      @(posedge clk); #1;
      sym_valid = 0;
      checks++;
      if (int'(err) != e || phase != theta[31:20]) begin
        failures++;
        $display("n=%0d err %0d exp %0d phase %0d exp %0d", n, err, e, phase, theta[31:20]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
