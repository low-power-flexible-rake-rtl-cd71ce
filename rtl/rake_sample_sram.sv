// Single-port sample memory of the stream buffer (DEPTH x WIDTH bits).
//
// One access per cycle: a write when we is set, otherwise a read when re is
// set; read data is registered and appears the cycle after the read.  The
// contents are not reset (like an SRAM); the receiver never uses a word
// before writing it.  The single-port organisation and the 512 x 8-bit size
// follow the design; it is written as an array so that a tool may map it to
// a memory macro.
module rake_sample_sram
  import rake_pkg::*;
#(
  parameter int BUF_DEPTH = DEPTH,
  parameter int WIDTH     = 2 * SAMPLE_W
) (
  input  logic                         clk,
  input  logic                         we,
  input  logic                         re,
  input  logic [$clog2(BUF_DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]             wdata,
  output logic [WIDTH-1:0]             rdata
);

  logic [WIDTH-1:0] mem [BUF_DEPTH];

  always_ff @(posedge clk) begin
    if (we)      mem[addr] <= wdata;
    else if (re) rdata     <= mem[addr];
  end

endmodule
