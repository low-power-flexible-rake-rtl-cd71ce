// Testbench of the combined code generator: after a phase load (scrambling
// chip k, OVSF counter value) every output chip must equal the reference
// scrambling code times the reference OVSF code, with the symbol flags of
// the OVSF counter; en low must hold the chip.
module tb_rake_code_gen;
  import rake_tb_pkg::*;
  import rake_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, load = 0;
  logic [24:0] load_x = '0, load_y = '0;
  logic [9:0] load_cnt = '0, code_idx = '0;
  logic [3:0] sf_log2 = '0;
  code_chip_t chip;
  logic [24:0] x_state, y_state;
  logic [9:0] cnt;
  int checks = 0, failures = 0;

  rake_code_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int k0, int n, int code, int c0, int len);
    int sf = 1 << n;
    @(negedge clk);
    load = 1; load_x = x_at(k0); load_y = y_at(k0); load_cnt = 10'(c0);
    code_idx = 10'(code); sf_log2 = 4'(n);
    @(negedge clk);
    load = 0;
    checks++;
    if (x_state !== x_at(k0) || y_state !== y_at(k0) || int'(cnt) != c0 % sf) failures++;
    for (int cyc = 0, c = 0; cyc < len; cyc++) begin
      int i = (c0 + c) % sf;
      bit o = ovsf_ref(n, code, i);
      en = (cyc % 5 != 4);   // every fifth cycle a hold
      checks++;
      if (chip.neg_i !== (pn_i(k0) ^ o) || chip.neg_q !== (pn_q(k0) ^ o)
          || chip.sym_start !== (i == 0) || chip.sym_end !== (i == sf - 1)) begin
        failures++;
        if (failures < 10) $display("k=%0d i=%0d got %p", k0, i, chip);
      end
      @(negedge clk);
      if (en) begin
        k0++;
        c++;
      end
    end
    en = 0;
  endtask

  initial begin
    build_pn(5000);
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0, 2, 3, 0, 100);
    run(1234, 4, 9, 5, 200);
    run(3000, 8, 77, 250, 600);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
