// rfir_pkg -- shared widths and the per-DPU control word of the digit-based
// reconfigurable FIR filter.
//
// Number format: samples are DATA_W-bit two's complement. A coefficient is a
// sum of signed digits d * 2^-p with d in {-1,0,+1} and p in 0..2^SHIFT_W-1.
// Each DPU produces d * x * 2^(MAXP-p) as a (ADDEND_W+1)-bit term, so the
// filter output is 2^MAXP * sum(h_i * x[n-i]) held in ACC_W bits.
// The widths (8-bit data, 3-bit shift, 14-bit addend, 24-bit sum, 10-bit sign
// extension, 32-bit test accumulator) are the document's; the bit order of
// the control word is this design's own choice.
package rfir_pkg;

  localparam int DATA_W   = 8;                  // sample width
  localparam int SHIFT_W  = 3;                  // digit position field
  localparam int MAXP     = (1 << SHIFT_W) - 1; // largest p (7)
  localparam int MAG_W    = DATA_W - 1;         // product bits without the MSB
  localparam int ADDEND_W = MAG_W + MAXP;       // 14
  localparam int ACC_W    = 24;                 // accumulated sum
  localparam int SEXT_W   = ACC_W - ADDEND_W;   // 10
  localparam int TEST_W   = 32;                 // test module accumulator
  localparam int CTRL_W   = 3 + SHIFT_W;        // bits per DPU in the control chain

  // Control word of one DPU, shifted in MSB first (cfg enters first).
  //   cfg   : 1 = pass the buffered (registered) sample on; last digit of a tap
  //   zero  : digit is 0
  //   plus  : digit is +1 (0 with zero=0 means -1)
  //   shift : digit position p; the shifter shifts left by MAXP-p
  typedef struct packed {
    logic               cfg;   // "config"
    logic               zero;
    logic               plus;
    logic [SHIFT_W-1:0] shift;
  } dpu_ctrl_t;

endpackage
