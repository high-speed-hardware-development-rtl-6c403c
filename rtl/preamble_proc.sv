// preamble_proc: carrier-phase and symbol-timing acquisition on the burst preamble.
//
// The preamble is taken to be an alternating symbol pattern sampled at two
// samples per symbol; the sample phase that carries the symbols then has full
// amplitude and the other phase sits on the zero crossings. During the
// PRE_LEN samples that follow start, the module works on each pair of samples
// (x[2n], x[2n+1]):
//   * timing: a subtractor forms |I[2n]|+|Q[2n]| - |I[2n+1]|-|Q[2n+1]|;
//   * carrier: each sample is raised to the fourth power, z^4 = (z^2)^2, which
//     removes the QPSK modulation and leaves exp(j*(pi + 4*phi)).
// All per-pair values are held in registers and added by an adder tree, one
// tree level per clock. The sign of the timing sum selects which sample phase
// holds the symbols (sym_phase), and a CORDIC turns the fourth-power sum into
// the carrier phase  phi = (angle - pi) / 4, a binary angle of PH_W bits
// (full turn 2**PH_W), unique up to the usual quarter-turn ambiguity of QPSK.
//
// Timing: samples are accepted with in_valid; done pulses
// log2(PRE_LEN/2) + 19 cycles after the last preamble sample.
// Tree structure, subtractors on sample values and the two outputs follow the
// document; the preamble pattern, its length and the two estimators are this
// implementation's own.
module preamble_proc #(
  parameter int unsigned PRE_LEN = 32,
  parameter int unsigned PH_W    = fdma_pkg::PH_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,       // first preamble sample follows
  input  logic              in_valid,
  input  fdma_pkg::cplx_t   in_data,
  output logic              done,
  output logic              sym_phase,   // 0: even samples carry the symbols
  output logic [PH_W-1:0]   phase        // carrier phase estimate
);
  import fdma_pkg::*;

  localparam int unsigned NP  = PRE_LEN / 2;        // sample pairs
  localparam int unsigned LV  = $clog2(NP);         // tree levels
  localparam int unsigned VW  = DW + 2 + LV + 2;    // accumulated width
  typedef logic signed [VW-1:0] acc_t;

  // ---- fourth power of one sample ------------------------------------------
  function automatic cplx_t pow4(input cplx_t z);
    logic signed [47:0] r2, i2;
    cplx_t z2;
    cplx_t z4;
    r2 = 48'(z.re * z.re) - 48'(z.im * z.im);
    i2 = 48'(z.re * z.im) <<< 1;
    z2.re = rnd15(r2);
    z2.im = rnd15(i2);
    r2 = 48'(z2.re * z2.re) - 48'(z2.im * z2.im);
    i2 = 48'(z2.re * z2.im) <<< 1;
    z4.re = rnd15(r2);
    z4.im = rnd15(i2);
    return z4;
  endfunction

  function automatic acc_t mag1(input cplx_t z);
    acc_t a, b;
    a = (z.re < 0) ? -acc_t'(z.re) : acc_t'(z.re);
    b = (z.im < 0) ? -acc_t'(z.im) : acc_t'(z.im);
    return a + b;
  endfunction

  typedef enum logic [1:0] {S_IDLE, S_COLLECT, S_TREE, S_ATAN} state_t;
  state_t state;

  logic [$clog2(PRE_LEN)-1:0] cnt;
  cplx_t first_q;                // first sample of the current pair
  acc_t  tim_v [NP];             // timing subtractor outputs
  acc_t  car_re [NP];            // fourth-power sums per pair
  acc_t  car_im [NP];
  logic [$clog2(LV+1)-1:0] lvl;

  logic                         cordic_start, cordic_done;
  logic [15:0]                  cordic_angle;

  // per-pair arithmetic on the first sample of the pair and the current one
  cplx_t       p0, p1;
  logic [15:0] quarter;       // (angle - pi) / 4 as a 16-bit binary angle
  logic [LV-1:0] pair;        // index of the current pair
  assign p0      = pow4(first_q);
  assign p1      = pow4(in_data);
  assign quarter = 16'($signed(cordic_angle - 16'h8000) >>> 2);
  assign pair    = LV'(cnt >> 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      cnt          <= '0;
      lvl          <= '0;
      done         <= 1'b0;
      sym_phase    <= 1'b0;
      phase        <= '0;
      cordic_start <= 1'b0;
      first_q      <= '0;
      for (int i = 0; i < int'(NP); i++) begin
        tim_v[i]  <= '0;
        car_re[i] <= '0;
        car_im[i] <= '0;
      end
    end else begin
      done         <= 1'b0;
      cordic_start <= 1'b0;
      case (state)
        S_IDLE: begin
          if (start) begin
            state <= S_COLLECT;
            cnt   <= '0;
          end
        end
        S_COLLECT: begin
          if (in_valid) begin
            cnt <= cnt + 1'b1;
            if (!cnt[0]) begin
              first_q <= in_data;
            end else begin
              tim_v[pair]  <= mag1(first_q) - mag1(in_data);
              car_re[pair] <= acc_t'(p0.re) + acc_t'(p1.re);
              car_im[pair] <= acc_t'(p0.im) + acc_t'(p1.im);
            end
            if (cnt == ($clog2(PRE_LEN))'(PRE_LEN - 1)) begin
              state <= S_TREE;
              lvl   <= '0;
            end
          end
        end
        S_TREE: begin
          // one adder-tree level per clock: element i <- element 2i + 2i+1
          for (int i = 0; i < int'(NP) / 2; i++) begin
            tim_v[i]  <= tim_v[2*i]  + tim_v[2*i+1];
            car_re[i] <= car_re[2*i] + car_re[2*i+1];
            car_im[i] <= car_im[2*i] + car_im[2*i+1];
          end
          lvl <= lvl + 1'b1;
          if (lvl == ($clog2(LV+1))'(LV - 1)) begin
            state        <= S_ATAN;
            cordic_start <= 1'b1;
          end
        end
        S_ATAN: begin
          if (cordic_done) begin
            phase     <= quarter[15 -: PH_W];
            sym_phase <= (tim_v[0] < 0);
            done      <= 1'b1;
            state     <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  cordic_atan #(.XW(VW), .AW_OUT(16), .ITER(16)) u_cordic (
    .clk  (clk),
    .rst_n(rst_n),
    .start(cordic_start),
    .x_in (car_re[0]),
    .y_in (car_im[0]),
    .done (cordic_done),
    .angle(cordic_angle)
  );
endmodule
