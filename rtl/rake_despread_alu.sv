// Despreading ALU: multiplies an I/Q sample by the conjugate of a code chip.
//
// With code c = a + j*b, a and b in {+1,-1}, the product
//   (s_i + j*s_q) * (a - j*b) = (a*s_i + b*s_q) + j*(a*s_q - b*s_i)
// needs no multiplier: each term is the sample component or its negation,
// and one adder per output sums them.  Purely combinational; the result of
// two SAMPLE_W-bit terms fits in PROD_W = SAMPLE_W+2 bits.  The figure only
// names this unit "ALU"; the conjugate product is the standard despreading
// operation chosen here.
module rake_despread_alu
  import rake_pkg::*;
(
  input  iq_sample_t                 sample,
  input  code_chip_t                 code,
  output logic signed [PROD_W-1:0]   prod_i,
  output logic signed [PROD_W-1:0]   prod_q
);

  logic signed [PROD_W-1:0] si, sq, ti, tq, ui, uq;

  always_comb begin
    si = PROD_W'(sample.i);
    sq = PROD_W'(sample.q);
    ti = code.neg_i ? -si : si;   // a*s_i
    tq = code.neg_q ? -sq : sq;   // b*s_q
    ui = code.neg_i ? -sq : sq;   // a*s_q
    uq = code.neg_q ? -si : si;   // b*s_i
    prod_i = ti + tq;
    prod_q = ui - uq;
  end

endmodule
