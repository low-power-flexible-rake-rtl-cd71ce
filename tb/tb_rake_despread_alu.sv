// Testbench of the despreading ALU: every 8-bit I/Q sample with every code
// chip, compared with an integer complex multiply by the conjugate code.
module tb_rake_despread_alu;
  import rake_pkg::*;

  iq_sample_t sample;
  code_chip_t code;
  logic signed [PROD_W-1:0] prod_i, prod_q;
  int checks = 0, failures = 0;

  rake_despread_alu dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 256; s++) begin
      for (int c = 0; c < 4; c++) begin
        int si, sq, a, b, ri, rq;
        sample = iq_sample_t'(s);
        code   = '{neg_i: c[0], neg_q: c[1], sym_start: 1'b0, sym_end: 1'b0};
        #1;
        si = int'(sample.i); sq = int'(sample.q);
        a  = c[0] ? -1 : 1;  b = c[1] ? -1 : 1;
        // (si + j sq)(a - j b)
        ri = si * a + sq * b;
        rq = sq * a - si * b;
        checks++;
        if (int'(prod_i) != ri || int'(prod_q) != rq) begin
          failures++;
          if (failures < 10) $display("s=%0d,%0d c=%0d got %0d,%0d want %0d,%0d", si, sq, c, prod_i, prod_q, ri, rq);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
