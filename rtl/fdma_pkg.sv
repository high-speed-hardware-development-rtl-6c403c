// fdma_pkg: constants and types shared by the FDMA/TDM transmultiplexer and
// the burst QPSK demodulator.
//
// The system separates 800 uniformly spaced 45 kHz carriers with a polyphase
// filter bank (commutator, shared 9-tap FIR, phase shifter), a 1024-point
// pipelined FFT and a constant multiplier, then demodulates one channel with
// a QPSK burst demodulator. Channel count, tap count, FFT size and stage count
// are the design's figures; the 16-bit word length, the complex sample type and
// the binary angle format are this implementation's own choices.
package fdma_pkg;

  // Word length of one real sample component (two's complement, Q1.15).
  localparam int unsigned DW = 16;
  // Number of carriers separated by the transmultiplexer.
  localparam int unsigned NUM_CHANNELS = 800;
  // Number of filter-bank branches and FFT points.
  localparam int unsigned FFT_N = 1024;
  // Radix-2 stages of the pipelined FFT.
  localparam int unsigned FFT_STAGES = 10;
  // Taps of each polyphase branch filter.
  localparam int unsigned FIR_TAPS = 9;
  // Width of a binary angle (a full turn is 2**PH_W).
  localparam int unsigned PH_W = 12;

  typedef logic signed [DW-1:0] sample_t;

  // One complex sample: real part (I) and imaginary part (Q).
  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  // Saturate a wide signed value to DW bits.
  function automatic sample_t sat(input logic signed [47:0] v);
    if (v > 48'sd32767) return 16'sd32767;
    if (v < -48'sd32768) return -16'sd32768;
    return v[DW-1:0];
  endfunction

  // Round a Q.15 product sum to the sample grid and saturate.
  function automatic sample_t rnd15(input logic signed [47:0] v);
    logic signed [47:0] r;
    r = (v + 48'sd16384) >>> 15;
    return sat(r);
  endfunction

endpackage
