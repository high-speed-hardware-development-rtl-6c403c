// tb_preamble_proc: alternating-symbol preambles at two samples per symbol,
// with the symbols on either sample phase, several carrier phase offsets and
// a little noise. The module must report the symbol sample phase and the
// carrier phase (within 3 of 4096 steps per turn), within log2(PRE_LEN/2)+20
// cycles of the last preamble sample.
module tb_preamble_proc;
  import fdma_pkg::*;
  localparam int PRE = 32, PH_W = 12;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, in_valid = 0;
  cplx_t in_data = '0;
  logic done, sym_phase;
  logic [PH_W-1:0] phase;

  preamble_proc #(.PRE_LEN(PRE), .PH_W(PH_W)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sample_t q(real v);
    return sample_t'($rtoi(v + ((v >= 0) ? 0.5 : -0.5)));
  endfunction

  initial begin
    real phis [6] = '{0.0, 0.3, -0.5, 0.7, -0.76, 0.1};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      real phi, amp;
      int sp, lat, ep, diff;
      phi = phis[t % 6];
      sp = t % 2;
      amp = 12000.0 + 2000.0 * (t % 3);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      for (int n = 0; n < PRE; n++) begin
        real re, im, s;
        @(negedge clk);
        // symbol k alternates (1+j) and -(1+j); zero crossings in between
        if ((n % 2) == sp) s = ((n / 2) % 2 == 0) ? 1.0 : -1.0;
        else s = 0.0;
        re = amp * s * ($cos(phi) - $sin(phi)) + real'($urandom_range(0, 200)) - 100.0;
        im = amp * s * ($sin(phi) + $cos(phi)) + real'($urandom_range(0, 200)) - 100.0;
        in_valid = 1; in_data.re = q(re); in_data.im = q(im);
        @(negedge clk) in_valid = 0;
      end
      lat = 0;
      while (!done) begin @(posedge clk); #1; lat++; end
      ep = $rtoi(phi / (2.0 * PI) * 4096.0 + ((phi >= 0) ? 0.5 : -0.5));
      diff = (int'(phase) - ep) & 12'hFFF;
      if (diff > 2048) diff -= 4096;
      checks += 3;
      if (sym_phase != 1'(sp)) begin failures++; $display("t=%0d sym_phase %0d exp %0d", t, sym_phase, sp); end
      if (diff > 3 || diff < -3) begin failures++; $display("t=%0d phase %0d exp %0d", t, phase, ep & 12'hFFF); end
      if (lat > $clog2(PRE / 2) + 21) begin failures++; $display("latency %0d", lat); end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
