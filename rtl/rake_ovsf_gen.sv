// OVSF (channelisation) code generator with a loadable phase.
//
// A 10-bit chip counter i runs modulo the spreading factor SF = 2**sf_log2.
// The code chip of code number k is the parity of (i AND r), where r is k
// with its sf_log2 low bits reversed; this is the usual closed form of the
// OVSF code tree.  Changing the code phase is a load of the counter, as the
// design describes; the closed form and run-time spreading factor are this
// design's choice.
//
// Interface: `en` advances one chip, `load` (priority) sets the counter.
// chip (1 means -1), sym_start (counter = 0) and sym_end (counter = SF-1)
// are combinational from the counter.  sf_log2 must not exceed OVSF_W.
module rake_ovsf_gen
  import rake_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              load,
  input  logic [OVSF_W-1:0] load_cnt,
  input  logic [OVSF_W-1:0] code_idx,
  input  logic [3:0]        sf_log2,
  output logic              chip,
  output logic [OVSF_W-1:0] cnt,
  output logic              sym_start,
  output logic              sym_end
);

  logic [OVSF_W-1:0] cnt_q, sf_mask, rev_idx;

  // sf_mask = SF - 1
  always_comb begin
    sf_mask = '0;
    for (int b = 0; b < OVSF_W; b++)
      if (b < int'(sf_log2)) sf_mask[b] = 1'b1;
  end

  // bit b of rev_idx is bit (sf_log2-1-b) of the code number
  always_comb begin
    rev_idx = '0;
    for (int b = 0; b < OVSF_W; b++)
      if (b < int'(sf_log2)) rev_idx[b] = code_idx[int'(sf_log2) - 1 - b];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      cnt_q <= '0;
    else if (load)   cnt_q <= load_cnt & sf_mask;
    else if (en)     cnt_q <= (cnt_q + 1'b1) & sf_mask;
  end

  assign chip      = ^(cnt_q & rev_idx);
  assign cnt       = cnt_q;
  assign sym_start = (cnt_q == '0);
  assign sym_end   = (cnt_q == sf_mask);

endmodule
