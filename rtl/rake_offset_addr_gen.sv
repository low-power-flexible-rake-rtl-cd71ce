// Offset address generator of the stream buffer.
//
// Holds, per finger, the multipath delay d (in samples, 0..DEPTH-1) given by
// the multipath tracker and forms the finger's read address as
//   read address = base + d + 1  (mod DEPTH),
// where base is the write address of the last sample of a chip.  Reading at
// that moment gives every finger the sample of the same transmitted chip
// (the oldest buffered sample belongs to d = 0), so all fingers can share
// one code chip.  After a finger's delay is (re)loaded it stays not ready
// for DEPTH/N_SPC chips, until the newly tagged slot holds a full delay
// spread of written samples.  The offset generator and the adder follow the
// design; the offset rule and the warm-up are this design's choices.
//
// Interface: cfg_we writes finger cfg_idx (delay, active).  chip_tick counts
// warm-up chips.  sel selects the finger whose read address is shown.
module rake_offset_addr_gen
  import rake_pkg::*;
#(
  parameter int N_FINGERS = 4,
  parameter int BUF_DEPTH = DEPTH,
  parameter int SPC       = N_SPC
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           cfg_we,
  input  logic [$clog2(N_FINGERS)-1:0]   cfg_idx,
  input  logic [$clog2(BUF_DEPTH)-1:0]   cfg_delay,
  input  logic                           cfg_active,
  input  logic                           chip_tick,
  input  logic [$clog2(BUF_DEPTH)-1:0]   base,
  input  logic [$clog2(N_FINGERS)-1:0]   sel,
  output logic [$clog2(BUF_DEPTH)-1:0]   rd_addr,
  output logic [N_FINGERS-1:0]           active,
  output logic [N_FINGERS-1:0]           ready,
  output logic [$clog2(SPC)-1:0]         slot [N_FINGERS]
);

  localparam int AW     = $clog2(BUF_DEPTH);
  localparam int WARM   = BUF_DEPTH / SPC;
  localparam int WARM_W = $clog2(WARM + 1);

  logic [AW-1:0]     delay_q [N_FINGERS];
  logic [WARM_W-1:0] warm_q  [N_FINGERS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int f = 0; f < N_FINGERS; f++) begin
        delay_q[f] <= '0;
        warm_q[f]  <= WARM_W'(WARM);
        active[f]  <= 1'b0;
      end
    end else begin
      for (int f = 0; f < N_FINGERS; f++) begin
        if (cfg_we && int'(cfg_idx) == f) begin
          delay_q[f] <= cfg_delay;
          active[f]  <= cfg_active;
          warm_q[f]  <= WARM_W'(WARM);
        end else if (chip_tick && active[f] && warm_q[f] != '0) begin
          warm_q[f] <= warm_q[f] - 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int f = 0; f < N_FINGERS; f++) begin
      ready[f] = active[f] && (warm_q[f] == '0);
      slot[f]  = delay_q[f][$clog2(SPC)-1:0];
    end
  end

  // the adder of the figure: write base plus offset, modulo the buffer size
  assign rd_addr = AW'((int'(base) + int'(delay_q[sel]) + 1) % BUF_DEPTH);

endmodule
