// tb_phase_shifter: random branch samples; each output must equal the input
// rotated by exp(j*pi*(M-1-b)/M), computed here in floating point (within 2
// LSB), three cycles after the input, with branch and flags carried along.
module tb_phase_shifter;
  import fdma_pkg::*;
  localparam int M = 16;
  localparam int BW = $clog2(M);
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_first = 0, in_last = 0;
  cplx_t in_data = '0;
  logic [BW-1:0] in_branch = '0;
  logic out_valid, out_first, out_last;
  cplx_t out_data;
  logic [BW-1:0] out_branch;

  phase_shifter #(.M(M)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real er [$], ei [$];
  int eb [$], et [$];

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 8 * M; n++) begin
      real a;
      @(negedge clk);
      in_valid = 1;
      in_branch = BW'($urandom_range(0, M - 1));
      in_data.re = sample_t'($urandom_range(0, 60000) - 30000);
      in_data.im = sample_t'($urandom_range(0, 60000) - 30000);
      in_first = (in_branch == BW'(M - 1));
      in_last = (in_branch == 0);
      a = PI * real'(M - 1 - int'(in_branch)) / M;
      er.push_back(in_data.re * $cos(a) - in_data.im * $sin(a));
      ei.push_back(in_data.re * $sin(a) + in_data.im * $cos(a));
      eb.push_back(int'(in_branch));
      et.push_back(int'($time) + 35);
    end
    @(negedge clk) in_valid = 0;
    repeat (8) @(posedge clk);
    checks++;
    if (er.size() != 0) begin failures++; $display("%0d outputs missing", er.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction
  function automatic real clip(real v);
    if (v > 32767.0) return 32767.0;
    if (v < -32768.0) return -32768.0;
    return v;
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real r, i;
      int b, t;
      checks++;
      if (er.size() == 0) begin
        failures++;
      end else begin
        r = clip(er.pop_front()); i = clip(ei.pop_front()); b = eb.pop_front(); t = et.pop_front();
        if (absr(real'(out_data.re) - r) > 2.0 || absr(real'(out_data.im) - i) > 2.0 ||
            int'(out_branch) != b || int'($time) != t ||
            out_first != (b == M - 1) || out_last != (b == 0)) begin
          failures++;
          $display("b=%0d got %0d,%0d exp %f,%f t=%0d/%0d", b, out_data.re, out_data.im, r, i, $time, t);
        end
      end
    end
  end
endmodule
