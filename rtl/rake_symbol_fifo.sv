// FIFO symbol buffer between the time-shared correlator and the symbol
// output.
//
// A circular buffer of DEPTH entries with valid/ready handshakes on both
// sides: an entry is written when in_valid && in_ready and read when
// out_valid && out_ready; both may happen in the same cycle.  A push while
// full is refused (in_ready low) and flagged on `overflow`.  The FIFO is
// named by the design; its depth and handshake are this design's choice.
module rake_symbol_fifo #(
  parameter int WIDTH     = 8,
  parameter int FIFO_DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic             overflow
);

  localparam int PW = $clog2(FIFO_DEPTH);

  logic [WIDTH-1:0] mem [FIFO_DEPTH];
  logic [PW-1:0]    wr_q, rd_q;
  logic [PW:0]      cnt_q;
  logic             push, pop;

  assign in_ready  = (int'(cnt_q) < FIFO_DEPTH);
  assign out_valid = (cnt_q != '0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rd_q];
  assign overflow  = in_valid && !in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q  <= '0;
      rd_q  <= '0;
      cnt_q <= '0;
      for (int k = 0; k < FIFO_DEPTH; k++) mem[k] <= '0;
    end else begin
      if (push) begin
        mem[wr_q] <= in_data;
        wr_q      <= (int'(wr_q) == FIFO_DEPTH - 1) ? '0 : wr_q + 1'b1;
      end
      if (pop) rd_q <= (int'(rd_q) == FIFO_DEPTH - 1) ? '0 : rd_q + 1'b1;
      cnt_q <= cnt_q + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) int'(cnt_q) <= FIFO_DEPTH);

endmodule
