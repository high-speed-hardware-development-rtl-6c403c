// cordic_atan: iterative CORDIC in vectoring mode, angle of a vector (x, y).
//
// After start, the vector is first folded into the right half plane (adding
// half a turn when x < 0), then rotated towards the x axis by ITER
// micro-rotations of atan(2**-i), one per clock, accumulating the angle. The
// result is a binary angle: a full turn is 2**AW_OUT, so the output wraps
// naturally. Used by the preamble module to turn the summed fourth-power
// vector into the carrier phase. done pulses ITER+1 cycles after start.
module cordic_atan #(
  parameter int unsigned XW     = 24,
  parameter int unsigned AW_OUT = 16,
  parameter int unsigned ITER   = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic signed [XW-1:0]     x_in,
  input  logic signed [XW-1:0]     y_in,
  output logic                     done,
  output logic [AW_OUT-1:0]        angle     // valid while done is high
);
  localparam real PI = 3.14159265358979323846;
  localparam int unsigned GW = XW + 2;         // growth guard
  localparam int unsigned ZW = AW_OUT + 4;     // angle guard bits

  logic [ZW-1:0] atan_tab [ITER];
  initial begin
    for (int i = 0; i < int'(ITER); i++)
      atan_tab[i] = ZW'($rtoi($floor($atan(2.0 ** (-i)) / (2.0 * PI) * (2.0 ** ZW) + 0.5)));
  end

  logic signed [GW-1:0] x_q, y_q;
  logic [ZW-1:0]        z_q;
  logic [$clog2(ITER)-1:0] i_q;
  logic                 run_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q <= 1'b0;
      done  <= 1'b0;
      i_q   <= '0;
      x_q   <= '0;
      y_q   <= '0;
      z_q   <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        run_q <= 1'b1;
        i_q   <= '0;
        if (x_in < 0) begin
          x_q <= -GW'(x_in);
          y_q <= -GW'(y_in);
          z_q <= ZW'(1) << (ZW - 1);
        end else begin
          x_q <= GW'(x_in);
          y_q <= GW'(y_in);
          z_q <= '0;
        end
      end else if (run_q) begin
        if (y_q > 0) begin
          x_q <= x_q + (y_q >>> i_q);
          y_q <= y_q - (x_q >>> i_q);
          z_q <= z_q + atan_tab[i_q];
        end else begin
          x_q <= x_q - (y_q >>> i_q);
          y_q <= y_q + (x_q >>> i_q);
          z_q <= z_q - atan_tab[i_q];
        end
        if (i_q == ($clog2(ITER))'(ITER - 1)) begin
          run_q <= 1'b0;
          done  <= 1'b1;
        end
        i_q <= i_q + 1'b1;
      end
    end
  end

  // Round the guarded angle to the output width.
  logic [ZW-1:0] z_rnd;
  assign z_rnd = z_q + (ZW'(1) << (ZW - AW_OUT - 1));
  assign angle = z_rnd[ZW-1 -: AW_OUT];
endmodule
