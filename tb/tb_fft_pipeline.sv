// tb_fft_pipeline: streams frames of random complex points into the pipelined
// FFT, one point per clock and one frame every N clocks, and compares every
// output bin with a floating-point DFT scaled by 1/N (within TOL LSB). It
// checks the natural output order, the latency from the last input write to
// the first output bin, STAGES*(N/2+4)+2 cycles, that frames leave as fast as
// they enter, and that a frame arriving too early raises overrun.
module tb_fft_pipeline;
  import fdma_pkg::*;
  localparam int N = 64;
  localparam int ST = $clog2(N);
  localparam int AW = $clog2(N);
  localparam int FRAMES = 5;
  localparam real TOL = 12.0;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_last = 0;
  logic [AW-1:0] in_addr = '0;
  cplx_t in_data = '0;
  logic out_valid, out_last, overrun;
  cplx_t out_data;
  logic [AW-1:0] out_index;

  fft_pipeline #(.N(N)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  real xr [FRAMES][N], xi [FRAMES][N];
  int last_cyc [FRAMES];
  int first_out [FRAMES];
  int out_frame = 0;

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        in_valid = 1;
        in_addr = AW'(n);
        in_data.re = sample_t'($urandom_range(0, 32000) - 16000);
        in_data.im = sample_t'($urandom_range(0, 32000) - 16000);
        if (f == 0 && n < 3) begin  // a pure tone frame start for readability
          in_data.re = in_data.re;
        end
        xr[f][n] = in_data.re;
        xi[f][n] = in_data.im;
        in_last = (n == N - 1);
        if (in_last) last_cyc[f] = cyc;
      end
    end
    @(negedge clk) in_valid = 0; in_last = 0;
    wait (out_frame == FRAMES);
    repeat (5) @(posedge clk);
    checks++;
    if (overrun) begin failures++; $display("overrun at the nominal frame rate"); end
    for (int f = 0; f < FRAMES; f++) begin
      checks++;
      if (first_out[f] - last_cyc[f] != ST * (N / 2 + 4) + 2) begin
        failures++;
        $display("frame %0d latency %0d", f, first_out[f] - last_cyc[f]);
      end
      if (f > 0) begin
        checks++;
        if (first_out[f] - first_out[f-1] != N) begin failures++; $display("frame spacing"); end
      end
    end
    // overrun: hand over a second frame after only a few writes
    for (int n = 0; n < 8; n++) begin
      @(negedge clk);
      in_valid = 1; in_addr = AW'(n); in_data = '0; in_last = (n == 3 || n == 7);
    end
    @(negedge clk) in_valid = 0; in_last = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (!overrun) begin failures++; $display("overrun not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int k_exp = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_frame < FRAMES) begin
      real er, ei;
      int f;
      f = out_frame;
      if (out_index == 0) first_out[f] = cyc;
      er = 0.0; ei = 0.0;
      for (int n = 0; n < N; n++) begin
        real a;
        a = -2.0 * PI * real'(int'(out_index) * n) / N;
        er += xr[f][n] * $cos(a) - xi[f][n] * $sin(a);
        ei += xr[f][n] * $sin(a) + xi[f][n] * $cos(a);
      end
      er /= N; ei /= N;
      checks++;
      if (int'(out_index) != k_exp || absr(er - out_data.re) > TOL || absr(ei - out_data.im) > TOL
          || out_last != (k_exp == N - 1)) begin
        failures++;
        $display("frame %0d bin %0d got %0d,%0d exp %f,%f", f, out_index, out_data.re, out_data.im, er, ei);
      end
      k_exp = (k_exp + 1) % N;
      if (out_last) out_frame++;
    end
  end
endmodule
