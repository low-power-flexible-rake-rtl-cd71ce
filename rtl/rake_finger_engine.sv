// Parallel correlation engine: despreading ALU plus integration registers.
//
// Each `valid` cycle the engine despreads one sample with its code chip and
// adds the product to the I and Q integration registers.  Integration
// control comes with the code chip: on a sym_start chip the registers are
// overwritten instead of added to, and on a sym_end chip the finished sum is
// copied to the output registers and sym_valid pulses for one cycle.  A
// symbol is only dumped if its first chip was seen since the last `restart`
// (pulsed on a code-phase change), so a partial symbol is never reported.
// The ALU/integration-register structure follows the design; the restart
// rule and ACC_W are this design's choice.
//
// Timing: a symbol whose last chip is presented in cycle n appears on
// sym_i/sym_q with sym_valid in cycle n+1.  `en` low (power down) freezes
// the engine.
module rake_finger_engine
  import rake_pkg::*;
#(
  parameter int ACC_BITS = ACC_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  input  logic                       restart,
  input  logic                       valid,
  input  iq_sample_t                 sample,
  input  code_chip_t                 code,
  output logic                       sym_valid,
  output logic signed [ACC_BITS-1:0] sym_i,
  output logic signed [ACC_BITS-1:0] sym_q
);

  logic signed [PROD_W-1:0]   prod_i, prod_q;
  logic signed [ACC_BITS-1:0] acc_i, acc_q, sum_i, sum_q;
  logic                       full;

  rake_despread_alu u_alu (.sample, .code, .prod_i, .prod_q);

  always_comb begin
    if (code.sym_start) begin
      sum_i = ACC_BITS'(prod_i);
      sum_q = ACC_BITS'(prod_q);
    end else begin
      sum_i = acc_i + ACC_BITS'(prod_i);
      sum_q = acc_q + ACC_BITS'(prod_q);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_i     <= '0;
      acc_q     <= '0;
      full      <= 1'b0;
      sym_valid <= 1'b0;
      sym_i     <= '0;
      sym_q     <= '0;
    end else begin
      sym_valid <= 1'b0;
      if (restart) begin
        full  <= 1'b0;
        acc_i <= '0;
        acc_q <= '0;
      end else if (en && valid) begin
        acc_i <= sum_i;
        acc_q <= sum_q;
        if (code.sym_start) full <= 1'b1;
        if (code.sym_end && (full || code.sym_start)) begin
          sym_valid <= 1'b1;
          sym_i     <= sum_i;
          sym_q     <= sum_q;
        end
      end
    end
  end

endmodule
