// Shared constants and types of the low-power flexible Rake receivers.
//
// The received signal arrives as complex baseband samples, N_SPC samples per
// chip, each component a SAMPLE_W-bit two's-complement number, so one I/Q
// sample is an 8-bit word.  The stream buffer of the SRAM-based receiver
// covers a delay spread of DEPTH samples.  These numbers (4-bit samples,
// 4 samples per chip, 512 samples of delay spread) are the synthesis
// parameters of the design.  The code generators use two 25-bit scrambling
// code registers and a 10-bit OVSF chip counter.
//
// A code chip is carried as sign bits: a set bit means -1.  The complex code
// value is (neg_i ? -1 : +1) + j*(neg_q ? -1 : +1); sym_start and sym_end mark
// the first and last chip of a data symbol (from the OVSF counter).
package rake_pkg;

  localparam int SAMPLE_W = 4;    // bits per I or Q component
  localparam int N_SPC    = 4;    // samples per chip
  localparam int DEPTH    = 512;  // delay spread in samples
  localparam int PN_W     = 25;   // scrambling code register length
  localparam int OVSF_W   = 10;   // OVSF chip counter width
  localparam int ACC_W    = 16;   // integration register width (own choice)
  localparam int PROD_W   = SAMPLE_W + 2;  // width of one despread product

  typedef struct packed {
    logic signed [SAMPLE_W-1:0] i;
    logic signed [SAMPLE_W-1:0] q;
  } iq_sample_t;

  typedef struct packed {
    logic neg_i;      // real part of the code chip is -1
    logic neg_q;      // imaginary part of the code chip is -1
    logic sym_start;  // first chip of a symbol
    logic sym_end;    // last chip of a symbol
  } code_chip_t;

endpackage
