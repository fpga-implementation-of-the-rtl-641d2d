// mpa_pkg: shared constants and types of the multiple-precision multiplier.
//
// The multiplier splits each operand into X-bit words (limbs) and runs the
// schoolbook product through one pipelined multiply-add per multiplying unit.
// The DSP pipeline is LAT = 4 deep; with one register in front of it (after the
// channel multiplexer) and one cycle in the data unit to turn a result into the
// next operands, a result comes back exactly 6 cycles after its operands were
// issued, so 6 independent channels keep the DSP busy every cycle.
// X = 16, DSP_LAT = 4 and 6 channels are the figures of the reference design;
// the 2048-word accumulator is one 32 kbit block RAM of 16-bit words.
package mpa_pkg;

  localparam int unsigned X         = 16;           // limb / multiplier operand width
  localparam int unsigned DSP_LAT   = 4;            // multiply-add pipeline depth
  localparam int unsigned N_CH      = DSP_LAT + 2;  // channels per multiplying unit
  localparam int unsigned BRAM_BITS = 32768;        // one block RAM
  localparam int unsigned ACC_WORDS = BRAM_BITS / X; // accumulator words per channel

  // Operands handed from a data unit to the DSP: (Cout,R) = A*B + C + Cin.
  typedef struct packed {
    logic             valid;
    logic [X-1:0]     a;
    logic [X-1:0]     b;
    logic [2*X-1:0]   c;
    logic             cin;
  } dsp_op_t;

endpackage
