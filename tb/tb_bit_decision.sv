// tb_bit_decision: random even and odd samples; decisions must be the sign
// bits of the even samples only, with the previous decision kept alongside.
module tb_bit_decision;
  import fdma_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic sync = 0, in_valid = 0, in_even = 0;
  cplx_t in_data = '0;
  logic sym_valid, a_n, b_n, a_prev, b_prev;
  cplx_t sym_data;

  bit_decision dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit pa, pb;
    pa = 0; pb = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      bit ev, va;
      @(negedge clk);
      va = $urandom_range(0, 3) != 0;
      ev = $urandom_range(0, 1);
      in_valid = va; in_even = ev; in_data = cplx_t'($urandom);
      @(posedge clk); #1;
      checks++;
      if (sym_valid != (va && ev)) begin failures++; $display("sym_valid wrong"); end
      if (va && ev) begin
        checks++;
        if (a_n != (in_data.re < 0) || b_n != (in_data.im < 0) || a_prev != pa || b_prev != pb ||
            sym_data != in_data) begin
          failures++;
          $display("decision wrong at %0d", n);
        end
        pa = (in_data.re < 0); pb = (in_data.im < 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
