// Testbench of the OVSF code generator: for several spreading factors and
// code numbers compares every chip with the code-tree reference, checks the
// symbol start/end flags and the counter load.
module tb_rake_ovsf_gen;
  import rake_tb_pkg::*;
  import rake_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, load = 0;
  logic [9:0] load_cnt = '0, code_idx = '0, cnt;
  logic [3:0] sf_log2 = '0;
  logic chip, sym_start, sym_end;
  int checks = 0, failures = 0;

  rake_ovsf_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_code(int n, int k, int start);
    int sf = 1 << n;
    @(negedge clk);
    sf_log2 = 4'(n); code_idx = 10'(k); load = 1; load_cnt = 10'(start); en = 0;
    @(negedge clk);
    load = 0; en = 1;
    for (int c = 0; c < 2 * sf + 3; c++) begin
      int i = (start + c) % sf;
      checks++;
      if (chip !== ovsf_ref(n, k, i) || sym_start !== (i == 0) || sym_end !== (i == sf - 1)
          || int'(cnt) != i) begin
        failures++;
        if (failures < 10) $display("n=%0d k=%0d i=%0d chip=%b want %b", n, k, i, chip, ovsf_ref(n, k, i));
      end
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 4; k++) run_code(2, k, 0);
    for (int k = 0; k < 16; k++) run_code(4, k, k);
    run_code(8, 1, 0);
    run_code(8, 200, 37);
    run_code(9, 333, 500);
    run_code(10, 1023, 1000);
    run_code(10, 517, 3);
    run_code(1, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
