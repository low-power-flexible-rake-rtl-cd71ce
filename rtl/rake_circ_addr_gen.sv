// Circular write-address generator of the stream buffer.
//
// A modulo-DEPTH counter advances once per received sample, so the address
// of a sample is its arrival time modulo the delay spread and the buffer
// always holds the last DEPTH samples.  The address bus toward the SRAM only
// changes when bus_en is set (a write of a tagged sample); otherwise it
// keeps its last value so that skipped writes do not toggle it.  The counter
// itself runs every sample, so read addresses stay simple.  The counter is
// the design's circular address generator; the bus-hold reading of its
// bus-enable input is this design's choice.
//
// Timing: addr is the address of the sample presented in the current cycle;
// it steps at the clock edge of a sample_valid cycle.
module rake_circ_addr_gen
  import rake_pkg::*;
#(
  parameter int BUF_DEPTH = DEPTH
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         sample_valid,
  input  logic                         bus_en,
  output logic [$clog2(BUF_DEPTH)-1:0] addr,
  output logic [$clog2(BUF_DEPTH)-1:0] bus_addr
);

  localparam int AW = $clog2(BUF_DEPTH);
  logic [AW-1:0] held_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr   <= '0;
      held_q <= '0;
    end else begin
      if (sample_valid) addr   <= (int'(addr) == BUF_DEPTH - 1) ? '0 : addr + 1'b1;
      if (bus_en)       held_q <= addr;
    end
  end

  assign bus_addr = bus_en ? addr : held_q;

endmodule
