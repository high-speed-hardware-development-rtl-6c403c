// tb_fft_dual_mem: fills one bank through both write ports, swaps, and reads
// the frame back through both read ports while a second frame is written to
// the other bank; the reads must return the first frame, one cycle after the
// address, and the second frame after the next swap.
module tb_fft_dual_mem;
  import fdma_pkg::*;
  localparam int D = 32;
  localparam int AW = $clog2(D);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic swap = 0, we_a = 0, we_b = 0;
  logic [AW-1:0] wa_a = '0, wa_b = '0, ra_a = '0, ra_b = '0;
  cplx_t wd_a = '0, wd_b = '0, rd_a, rd_b;
  logic wbank;

  fft_dual_mem #(.DEPTH(D)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cplx_t frame [3][D];

  task automatic write_and_read(int wf, int rf, bit do_read);
    for (int i = 0; i < D / 2; i++) begin
      @(negedge clk);
      we_a = 1; wa_a = AW'(2 * i);     wd_a = frame[wf][2 * i];
      we_b = 1; wa_b = AW'(2 * i + 1); wd_b = frame[wf][2 * i + 1];
      ra_a = AW'(D - 1 - i); ra_b = AW'(i);
      swap = (i == D / 2 - 1);
      @(posedge clk);
      #1;
      if (do_read) begin
        checks += 2;
        if (rd_a != frame[rf][D - 1 - i] || rd_b != frame[rf][i]) begin
          failures++;
          $display("read %0d mismatch", i);
        end
      end
    end
    @(negedge clk);
    we_a = 0; we_b = 0; swap = 0;
  endtask

  initial begin
    for (int f = 0; f < 3; f++)
      for (int i = 0; i < D; i++) frame[f][i] = cplx_t'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    checks++;
    if (wbank != 0) failures++;
    write_and_read(0, 0, 0);
    checks++;
    if (wbank != 1) failures++;
    write_and_read(1, 0, 1);
    write_and_read(2, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
