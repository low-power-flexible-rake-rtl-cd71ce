// Low-power flexible Rake receivers for WCDMA: the three receiver
// architectures side by side.
//
// Architecture A (a_*) keeps a 512-sample SRAM stream buffer but writes only
// the samples of sample slots that some multipath uses (tag buffer), and
// decodes all fingers with one time-shared correlator.  Architecture B (b_*)
// has no SRAM: each of three parallel engines keeps the one sample per chip
// of its slot in a register and reaches its multipath's delay through the
// phase of its own code generator.  Architecture C (c_*) is the single-engine
// form of B: N_SPC sample registers and one correlator whose one code
// generator is reloaded with each path's code phase in turn.  They are
// alternatives for different channel conditions and share nothing but the
// clock and reset; each has its own sample input.  Delays, slots, code phases, code selection and engine
// enables come from a multipath searcher outside this block.
//
// Default sizes: 4-bit I/Q samples, 4 samples per chip, 512-sample delay
// spread, 4 fingers for A (the design considers 3 and 4 paths), 3 engines
// for B and C.  See rake_tagged_rx, rake_parallel_rx and rake_switched_rx
// for timing.
module rake_top
  import rake_pkg::*;
#(
  parameter int A_FINGERS  = 4,
  parameter int B_ENGINES  = 3,
  parameter int C_FINGERS  = 3,
  parameter int BUF_DEPTH  = DEPTH,
  parameter int SPC        = N_SPC,
  parameter int ACC_BITS   = ACC_W,
  parameter int FIFO_DEPTH = 8
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // architecture A: tag-buffered SRAM stream buffer
  input  logic                           a_sample_valid,
  input  iq_sample_t                     a_sample,
  input  logic                           a_cfg_we,
  input  logic [$clog2(A_FINGERS)-1:0]   a_cfg_idx,
  input  logic [$clog2(BUF_DEPTH)-1:0]   a_cfg_delay,
  input  logic                           a_cfg_active,
  input  logic                           a_code_load,
  input  logic [PN_W-1:0]                a_code_x,
  input  logic [PN_W-1:0]                a_code_y,
  input  logic [OVSF_W-1:0]              a_code_cnt,
  input  logic [OVSF_W-1:0]              a_code_idx,
  input  logic [3:0]                     a_code_sf_log2,
  output logic                           a_sym_valid,
  input  logic                           a_sym_ready,
  output logic [$clog2(A_FINGERS)-1:0]   a_sym_finger,
  output logic signed [ACC_BITS-1:0]     a_sym_i,
  output logic signed [ACC_BITS-1:0]     a_sym_q,
  output logic                           a_sym_overflow,
  output logic                           a_sram_we,
  output logic                           a_sram_re,
  output logic [SPC-1:0]                 a_tags,
  output logic [A_FINGERS-1:0]           a_finger_ready,
  // architecture B: sample-slot registers and parallel engines
  input  logic                           b_sample_valid,
  input  iq_sample_t                     b_sample,
  input  logic [B_ENGINES-1:0]           b_eng_en,
  input  logic                           b_cfg_we,
  input  logic [$clog2(B_ENGINES)-1:0]   b_cfg_idx,
  input  logic [$clog2(SPC)-1:0]         b_cfg_slot,
  input  logic [PN_W-1:0]                b_cfg_x,
  input  logic [PN_W-1:0]                b_cfg_y,
  input  logic [OVSF_W-1:0]              b_cfg_cnt,
  input  logic [OVSF_W-1:0]              b_cfg_code_idx,
  input  logic [3:0]                     b_cfg_sf_log2,
  output logic [$clog2(SPC)-1:0]         b_phase,
  output logic [B_ENGINES-1:0]           b_sym_valid,
  output logic signed [ACC_BITS-1:0]     b_sym_i [B_ENGINES],
  output logic signed [ACC_BITS-1:0]     b_sym_q [B_ENGINES],
  // architecture C: sample-slot registers, one switched code generator
  input  logic                           c_sample_valid,
  input  iq_sample_t                     c_sample,
  input  logic                           c_cfg_we,
  input  logic [$clog2(C_FINGERS)-1:0]   c_cfg_idx,
  input  logic                           c_cfg_active,
  input  logic [$clog2(SPC)-1:0]         c_cfg_slot,
  input  logic [PN_W-1:0]                c_cfg_x,
  input  logic [PN_W-1:0]                c_cfg_y,
  input  logic [OVSF_W-1:0]              c_cfg_cnt,
  input  logic [OVSF_W-1:0]              c_code_idx,
  input  logic [3:0]                     c_code_sf_log2,
  output logic [$clog2(SPC)-1:0]         c_phase,
  output logic                           c_sym_valid,
  input  logic                           c_sym_ready,
  output logic [$clog2(C_FINGERS)-1:0]   c_sym_finger,
  output logic signed [ACC_BITS-1:0]     c_sym_i,
  output logic signed [ACC_BITS-1:0]     c_sym_q,
  output logic                           c_sym_overflow,
  output logic                           c_code_switch
);

  rake_tagged_rx #(
    .N_FINGERS(A_FINGERS), .BUF_DEPTH(BUF_DEPTH), .SPC(SPC),
    .ACC_BITS(ACC_BITS), .FIFO_DEPTH(FIFO_DEPTH)
  ) u_arch_a (
    .clk, .rst_n,
    .sample_valid(a_sample_valid), .sample(a_sample),
    .cfg_we(a_cfg_we), .cfg_idx(a_cfg_idx), .cfg_delay(a_cfg_delay), .cfg_active(a_cfg_active),
    .code_load(a_code_load), .code_x(a_code_x), .code_y(a_code_y), .code_cnt(a_code_cnt),
    .code_idx(a_code_idx), .code_sf_log2(a_code_sf_log2),
    .sym_valid(a_sym_valid), .sym_ready(a_sym_ready), .sym_finger(a_sym_finger),
    .sym_i(a_sym_i), .sym_q(a_sym_q), .sym_overflow(a_sym_overflow),
    .sram_we(a_sram_we), .sram_re(a_sram_re), .tags(a_tags), .finger_ready(a_finger_ready)
  );

  rake_parallel_rx #(
    .N_ENG(B_ENGINES), .SPC(SPC), .ACC_BITS(ACC_BITS)
  ) u_arch_b (
    .clk, .rst_n,
    .sample_valid(b_sample_valid), .sample(b_sample), .eng_en(b_eng_en),
    .cfg_we(b_cfg_we), .cfg_idx(b_cfg_idx), .cfg_slot(b_cfg_slot),
    .cfg_x(b_cfg_x), .cfg_y(b_cfg_y), .cfg_cnt(b_cfg_cnt),
    .cfg_code_idx(b_cfg_code_idx), .cfg_sf_log2(b_cfg_sf_log2),
    .phase(b_phase), .sym_valid(b_sym_valid), .sym_i(b_sym_i), .sym_q(b_sym_q)
  );

  rake_switched_rx #(
    .N_FINGERS(C_FINGERS), .SPC(SPC), .ACC_BITS(ACC_BITS), .FIFO_DEPTH(FIFO_DEPTH)
  ) u_arch_c (
    .clk, .rst_n,
    .sample_valid(c_sample_valid), .sample(c_sample),
    .cfg_we(c_cfg_we), .cfg_idx(c_cfg_idx), .cfg_active(c_cfg_active), .cfg_slot(c_cfg_slot),
    .cfg_x(c_cfg_x), .cfg_y(c_cfg_y), .cfg_cnt(c_cfg_cnt),
    .code_idx(c_code_idx), .code_sf_log2(c_code_sf_log2),
    .phase(c_phase), .sym_valid(c_sym_valid), .sym_ready(c_sym_ready), .sym_finger(c_sym_finger),
    .sym_i(c_sym_i), .sym_q(c_sym_q), .sym_overflow(c_sym_overflow), .code_switch(c_code_switch)
  );

endmodule
