// One code generator: a scrambling (PN) generator and an OVSF generator
// stepped together, their +-1 codes multiplied into one complex code chip.
//
// Multiplying +-1 values is an XOR of their sign bits, so the chip is
// (c_i XOR ovsf) + j*(c_q XOR ovsf) in sign-bit form, together with the
// symbol start/end flags of the OVSF counter.  The pairing of the two
// generators and their product follow the design's code generator; a single
// `load` sets the whole code phase (both PN registers and the OVSF counter),
// while code_idx and sf_log2 select the channel code (code select).
//
// Timing: the chip output shows the current state; `en` moves to the next
// chip at the clock edge, `load` takes priority.  The register states
// (x_state, y_state, cnt) are brought out so that a phase can be saved and
// reloaded later, as a receiver that switches one generator between several
// multipaths needs.
module rake_code_gen
  import rake_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              load,
  input  logic [PN_W-1:0]   load_x,
  input  logic [PN_W-1:0]   load_y,
  input  logic [OVSF_W-1:0] load_cnt,
  input  logic [OVSF_W-1:0] code_idx,
  input  logic [3:0]        sf_log2,
  output code_chip_t        chip,
  output logic [PN_W-1:0]   x_state,
  output logic [PN_W-1:0]   y_state,
  output logic [OVSF_W-1:0] cnt
);

  logic c_i, c_q, ovsf, sym_start, sym_end;

  rake_pn_gen u_pn (
    .clk, .rst_n, .en, .load, .load_x, .load_y,
    .c_i, .c_q, .x_state, .y_state
  );

  rake_ovsf_gen u_ovsf (
    .clk, .rst_n, .en, .load, .load_cnt, .code_idx, .sf_log2,
    .chip(ovsf), .cnt, .sym_start, .sym_end
  );

  always_comb begin
    chip.neg_i     = c_i ^ ovsf;
    chip.neg_q     = c_q ^ ovsf;
    chip.sym_start = sym_start;
    chip.sym_end   = sym_end;
  end

endmodule
