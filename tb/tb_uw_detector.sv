// tb_uw_detector: random symbol streams with the unique word inserted with
// 0..4 bit errors; it must be found (once) when at most 2 bits differ, not
// found otherwise, and the symbols after it must come out as data.
module tb_uw_detector;
  localparam logic [31:0] UW = 32'hE4B1_1D2F;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic sync = 0, sym_valid = 0;
  logic [1:0] sym_bits = '0;
  logic uw_found, data_valid;
  logic [1:0] data_bits;

  uw_detector #(.UW_LEN(16), .UW(UW), .MAX_ERR(2)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int found = 0, ndata = 0, data_err = 0;
  logic [1:0] exp_data [$];
  always @(posedge clk) if (rst_n) begin
    if (uw_found) found++;
    if (data_valid) begin
      ndata++;
      if (exp_data.size() == 0 || data_bits != exp_data.pop_front()) data_err++;
    end
  end

  task automatic send(logic [1:0] s);
    @(negedge clk);
    sym_valid = 1; sym_bits = s;
    @(negedge clk);
    sym_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int nerr = 0; nerr <= 4; nerr++) begin
      logic [31:0] w;
      @(negedge clk) sync = 1;
      @(negedge clk) sync = 0;
      found = 0; ndata = 0; data_err = 0; exp_data.delete();
      w = UW;
      for (int e = 0; e < nerr; e++) w[e * 7 + 3] = ~w[e * 7 + 3];
      // preamble-like alternating symbols never match the word
      for (int i = 0; i < 20; i++) send((i % 2) ? 2'b11 : 2'b00);
      for (int i = 15; i >= 0; i--) send(w[2*i +: 2]);
      for (int i = 0; i < 30; i++) begin
        logic [1:0] d;
        d = 2'($urandom);
        if (nerr <= 2) exp_data.push_back(d);
        send(d);
      end
      repeat (3) @(posedge clk);
      checks += 2;
      if (nerr <= 2) begin
        if (found != 1) begin failures++; $display("nerr=%0d found=%0d", nerr, found); end
        if (ndata != 30 || data_err != 0) begin failures++; $display("data %0d err %0d", ndata, data_err); end
      end else begin
        // random data may by chance contain a near-copy of the word; accept only none
        if (found > 1) begin failures++; $display("nerr=%0d found=%0d", nerr, found); end
        if (found == 0 && ndata != 0) begin failures++; $display("data without word"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
