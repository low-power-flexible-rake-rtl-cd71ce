// Scrambling (pseudonoise) code generator with a loadable phase.
//
// Two 25-bit shift registers run the m-sequences
//   x(i+25) = x(i+3) + x(i)                  (polynomial x^25 + x^3 + 1)
//   y(i+25) = y(i+3) + y(i+2) + y(i+1) + y(i) (x^25 + x^3 + x^2 + x + 1)
// with register bit k holding x(i+k).  The I code bit is x(i) + y(i); the Q
// code bit is the same Gold sequence advanced by 16777232 chips, which is
// obtained without a second generator through the masks
//   x(i+4) + x(i+7) + x(i+18)  and  y(i+4) + y(i+6) + y(i+17).
// The use of two 25-bit registers follows the design; the polynomials and
// masks are those of the WCDMA long scrambling code and are this design's
// choice, as is forming the complex code as c_i + j*c_q.
//
// Interface: `en` advances one chip per cycle, `load` (priority over `en`)
// writes a new phase into both registers; c_i/c_q are combinational from the
// current state (1 means -1).  Reset state is code number 0: x = 0..01 with
// x(24) = 1, y(0..23) = 1 and y(24) = 0.
module rake_pn_gen
  import rake_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic            load,
  input  logic [PN_W-1:0] load_x,
  input  logic [PN_W-1:0] load_y,
  output logic            c_i,
  output logic            c_q,
  output logic [PN_W-1:0] x_state,
  output logic [PN_W-1:0] y_state
);

  logic [PN_W-1:0] x_q, y_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= PN_W'(1) << (PN_W - 1);
      y_q <= {1'b0, {(PN_W-1){1'b1}}};
    end else if (load) begin
      x_q <= load_x;
      y_q <= load_y;
    end else if (en) begin
      x_q <= {x_q[0] ^ x_q[3], x_q[PN_W-1:1]};
      y_q <= {y_q[0] ^ y_q[1] ^ y_q[2] ^ y_q[3], y_q[PN_W-1:1]};
    end
  end

  assign c_i     = x_q[0] ^ y_q[0];
  assign c_q     = (x_q[4] ^ x_q[7] ^ x_q[18]) ^ (y_q[4] ^ y_q[6] ^ y_q[17]);
  assign x_state = x_q;
  assign y_state = y_q;

endmodule
