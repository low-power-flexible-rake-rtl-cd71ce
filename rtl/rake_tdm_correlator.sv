// Time-shared correlator engine of the SRAM-based receiver.
//
// One ALU serves all fingers.  For each sample read from the stream buffer
// it despreads the sample with the shared code chip and adds the product to
// that finger's pair of integration registers.  All fingers use the same
// code chip because the stream buffer hands them samples of the same
// transmitted chip.  A finger starts integrating on the first chip of a
// symbol after it became ready; on the last chip of a symbol its sum is
// pushed into the FIFO symbol buffer together with the finger number, and
// the integration registers restart with the next symbol.  Structure (code
// generator, multiplier, adder, integration registers, FIFO) follows the
// design; the start/restart rules and widths are this design's choice.
//
// Interface: in_valid/in_finger/in_sample carry one read per cycle; code is
// the chip of the current burst; ready[f] low clears finger f's state.
// Symbol dumps leave through the FIFO (out_valid/out_ready); a dump that
// finds the FIFO full is lost and flagged on `overflow` for one cycle.
// Timing: a dump is pushed in the cycle its last chip is presented and is
// visible on the FIFO output the next cycle.
module rake_tdm_correlator
  import rake_pkg::*;
#(
  parameter int N_FINGERS  = 4,
  parameter int ACC_BITS   = ACC_W,
  parameter int FIFO_DEPTH = 8
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  input  logic [$clog2(N_FINGERS)-1:0]   in_finger,
  input  iq_sample_t                     in_sample,
  input  code_chip_t                     code,
  input  logic [N_FINGERS-1:0]           ready,
  output logic                           out_valid,
  input  logic                           out_ready,
  output logic [$clog2(N_FINGERS)-1:0]   out_finger,
  output logic signed [ACC_BITS-1:0]     out_i,
  output logic signed [ACC_BITS-1:0]     out_q,
  output logic                           overflow
);

  localparam int FW = $clog2(N_FINGERS);

  typedef struct packed {
    logic [FW-1:0]              finger;
    logic signed [ACC_BITS-1:0] i;
    logic signed [ACC_BITS-1:0] q;
  } dump_t;

  logic signed [PROD_W-1:0]   prod_i, prod_q;
  logic signed [ACC_BITS-1:0] acc_i [N_FINGERS];
  logic signed [ACC_BITS-1:0] acc_q [N_FINGERS];
  logic [N_FINGERS-1:0]       integ;
  logic signed [ACC_BITS-1:0] sum_i, sum_q;
  logic                       running, dump, in_ready;
  dump_t                      dump_d, dump_o;

  rake_despread_alu u_alu (.sample(in_sample), .code, .prod_i, .prod_q);

  assign running = integ[in_finger] || code.sym_start;

  always_comb begin
    if (code.sym_start) begin
      sum_i = ACC_BITS'(prod_i);
      sum_q = ACC_BITS'(prod_q);
    end else begin
      sum_i = acc_i[in_finger] + ACC_BITS'(prod_i);
      sum_q = acc_q[in_finger] + ACC_BITS'(prod_q);
    end
  end

  assign dump          = in_valid && ready[in_finger] && running && code.sym_end;
  assign dump_d.finger = in_finger;
  assign dump_d.i      = sum_i;
  assign dump_d.q      = sum_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ <= '0;
      for (int f = 0; f < N_FINGERS; f++) begin
        acc_i[f] <= '0;
        acc_q[f] <= '0;
      end
    end else begin
      integ <= integ & ready;
      if (in_valid && ready[in_finger] && running) begin
        acc_i[in_finger] <= sum_i;
        acc_q[in_finger] <= sum_q;
        integ[in_finger] <= 1'b1;
      end
    end
  end

  rake_symbol_fifo #(.WIDTH($bits(dump_t)), .FIFO_DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .in_valid(dump), .in_ready, .in_data(dump_d),
    .out_valid, .out_ready, .out_data(dump_o),
    .overflow
  );

  assign out_finger = dump_o.finger;
  assign out_i      = dump_o.i;
  assign out_q      = dump_o.q;

endmodule
