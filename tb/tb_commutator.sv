// tb_commutator: checks the branch order, block flags, data and one-cycle
// latency of the commutator over several blocks with gaps in the input.
module tb_commutator;
  import fdma_pkg::*;
  localparam int M = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0;
  cplx_t in_data = '0;
  logic out_valid, out_first, out_last;
  cplx_t out_data;
  logic [$clog2(M)-1:0] out_branch;

  commutator #(.M(M)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sent = 0, got = 0;
  cplx_t hist [$];
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (sent < 5 * M) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0) && sent < 5 * M;
      in_data.re = sample_t'($urandom);
      in_data.im = sample_t'($urandom);
      if (in_valid) begin
        hist.push_back(in_data);
        sent++;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    if (got != 5 * M) begin failures++; $display("got %0d outputs", got); end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one-cycle latency: output valid mirrors input valid of the previous cycle
  logic prev_valid = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid !== prev_valid) begin failures++; $display("latency mismatch"); end
      if (out_valid) begin
        int exp_b;
        cplx_t e;
        exp_b = M - 1 - (got % M);
        e = hist.pop_front();
        checks++;
        if (out_branch != exp_b || out_data != e ||
            out_first != (exp_b == M - 1) || out_last != (exp_b == 0)) begin
          failures++;
          $display("sample %0d: branch %0d exp %0d", got, out_branch, exp_b);
        end
        got++;
      end
    end
    prev_valid <= in_valid && rst_n;
  end
endmodule
