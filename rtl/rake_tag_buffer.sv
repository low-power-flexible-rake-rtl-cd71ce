// Sample-slot tag buffer of the SRAM stream buffer.
//
// Each chip has N_SPC sample slots, and a multipath with delay d (in samples)
// only ever uses slot d mod N_SPC.  The tag buffer keeps one bit per slot,
// set when at least one active finger uses that slot, and lets only samples
// of tagged slots be written into the SRAM.  With L paths in fewer than
// N_SPC distinct slots, the untagged slots' write accesses (and address bus
// toggles) are saved.  The tag table and its use as write and bus enable
// follow the design; recomputing the table every cycle from the finger table
// is this design's choice.
//
// Timing: tags follow a change of the finger table one cycle later.
// write_en and bus_en are combinational from sample_valid and phase.
module rake_tag_buffer
  import rake_pkg::*;
#(
  parameter int N_FINGERS = 4,
  parameter int SPC       = N_SPC
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [N_FINGERS-1:0]   finger_active,
  input  logic [$clog2(SPC)-1:0] finger_slot [N_FINGERS],
  input  logic                   sample_valid,
  input  logic [$clog2(SPC)-1:0] phase,
  output logic [SPC-1:0]         tags,
  output logic                   write_en,
  output logic                   bus_en
);

  logic [SPC-1:0] tags_d;

  always_comb begin
    tags_d = '0;
    for (int f = 0; f < N_FINGERS; f++)
      if (finger_active[f]) tags_d[finger_slot[f]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tags <= '0;
    else        tags <= tags_d;
  end

  assign write_en = sample_valid && tags[phase];
  assign bus_en   = write_en;

endmodule
