// Testbench of the scrambling code generator: compares the I and Q code bits
// with the m-sequence recursions over 3000 chips, checks that `en` low holds
// the state and that a loaded phase continues the sequence from that chip.
module tb_rake_pn_gen;
  import rake_tb_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, load = 0;
  logic [24:0] load_x = '0, load_y = '0, x_state, y_state;
  logic c_i, c_q;
  int checks = 0, failures = 0;

  rake_pn_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_chip(int k);
    checks++;
    if (c_i !== pn_i(k) || c_q !== pn_q(k)) begin
      failures++;
      if (failures < 10) $display("chip %0d: got %b%b want %b%b", k, c_i, c_q, pn_i(k), pn_q(k));
    end
  endtask

  initial begin
    build_pn(6000);
    repeat (2) @(negedge clk);
    rst_n = 1;
    en = 1;
    for (int k = 0; k < 3000; k++) begin
      check_chip(k);
      @(negedge clk);
    end
    // hold
    en = 0;
    @(negedge clk);
    @(negedge clk);
    check_chip(3000);
    // a load takes priority over en
    // load the phase of chip 4321 and continue
    load = 1; load_x = x_at(4321); load_y = y_at(4321);
    @(negedge clk);
    load = 0; en = 1;
    checks++;
    if (x_state !== x_at(4321) || y_state !== y_at(4321)) failures++;
    for (int k = 4321; k < 4800; k++) begin
      check_chip(k);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
