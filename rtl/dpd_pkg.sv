// dpd_pkg: types and constants shared by the multi-standard LUT predistorter.
//
// Samples are complex 16-bit fixed point (Q1.15 for I and Q), eight of them
// packed into one 256-bit AXI-Stream beat, lane 0 in bits [31:0] holding the
// earliest sample of the beat, with I in the low half-word and Q in the high
// half-word of each 32-bit lane. The predistorter is a memory polynomial of
// nonlinear order 5 and memory depth 5 taps, so it has 25 complex
// coefficients per set; the look-up table holds eight such sets. Coefficients
// are 16-bit signed with 12 fractional bits (Q4.12), so that gains above one
// can be represented. The lane packing, I/Q order and coefficient format are
// this design's choices; the widths, lane count, order, depth and number of
// sets follow the published design.
package dpd_pkg;

  localparam int unsigned SAMPLE_W  = 16;  // I or Q word width
  localparam int unsigned LANES     = 8;   // samples per AXI-Stream beat
  localparam int unsigned BEAT_W    = 2 * SAMPLE_W * LANES;  // 256
  localparam int unsigned MP_ORDER  = 5;   // nonlinear order P
  localparam int unsigned MP_TAPS   = 5;   // memory taps
  localparam int unsigned NUM_COEF  = MP_ORDER * MP_TAPS;    // 25
  localparam int unsigned COEF_AW   = 5;   // coefficient index width (32 slots per set)
  localparam int unsigned NUM_SETS  = 8;   // coefficient sets in the LUT
  localparam int unsigned SET_W     = 3;
  localparam int unsigned COEF_FRAC = 12;  // fractional bits of a coefficient

  typedef logic signed [SAMPLE_W-1:0] sample_t;

  typedef struct packed {
    sample_t q;   // imaginary part, high half-word
    sample_t i;   // real part, low half-word
  } cplx_t;

  // Signal standards handled by the address selection.
  typedef enum logic [1:0] {
    STD_3G = 2'd0,
    STD_4G = 2'd1,
    STD_5G = 2'd2
  } std_e;

  // Coefficient index of basis order p (1..P) at memory tap m (0..taps-1).
  function automatic int unsigned coef_index(int unsigned m, int unsigned p);
    return m * MP_ORDER + (p - 1);
  endfunction

endpackage
