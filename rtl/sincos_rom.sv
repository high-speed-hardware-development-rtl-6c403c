// sincos_rom: registered look-up table of cos and sin of a binary angle.
//
// Entry k holds AMP*cos(2*pi*k/ENTRIES) and AMP*sin(2*pi*k/ENTRIES), rounded to
// the nearest integer. The table is computed at elaboration from the formula,
// so no data file is needed. One read per clock, output one cycle after the
// address. Used for the FFT twiddle factors, the phase shifter before the FFT
// and the carrier derotator of the coherent demodulator; all three use it the
// same way, which is this implementation's choice.
module sincos_rom #(
  parameter int unsigned ENTRIES = 1024,
  parameter int unsigned AW      = $clog2(ENTRIES),
  parameter int          AMP     = 32767
) (
  input  logic                 clk,
  input  logic [AW-1:0]        addr,
  output fdma_pkg::sample_t    cos_o,
  output fdma_pkg::sample_t    sin_o
);
  import fdma_pkg::*;

  localparam real PI = 3.14159265358979323846;

  sample_t cos_tab [ENTRIES];
  sample_t sin_tab [ENTRIES];

  initial begin
    for (int k = 0; k < int'(ENTRIES); k++) begin
      cos_tab[k] = sample_t'($rtoi($floor(real'(AMP) * $cos(2.0 * PI * k / ENTRIES) + 0.5)));
      sin_tab[k] = sample_t'($rtoi($floor(real'(AMP) * $sin(2.0 * PI * k / ENTRIES) + 0.5)));
    end
  end

  always_ff @(posedge clk) begin
    cos_o <= cos_tab[addr];
    sin_o <= sin_tab[addr];
  end
endmodule
