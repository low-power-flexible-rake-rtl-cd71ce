// Testbench of the FIFO symbol buffer: random pushes and pops against a
// queue model, including runs with the output stalled so that the FIFO
// fills, refuses pushes and flags overflow.
module tb_rake_symbol_fifo;
  logic clk = 0, rst_n = 0, in_valid = 0, out_ready = 0;
  logic in_ready, out_valid, overflow;
  logic [7:0] in_data = '0, out_data;
  logic [7:0] q[$];
  int checks = 0, failures = 0, n_overflow = 0, n_pop = 0;

  rake_symbol_fifo dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      bit stall, do_pop, do_push;
      stall = (cyc / 200) % 3 == 1;
      in_valid  = ($urandom % 2) == 1;
      in_data   = 8'($urandom);
      out_ready = !stall && ($urandom % 3 != 0);
      #1;
      checks++;
      if (in_ready !== (q.size() < 8) || out_valid !== (q.size() > 0)
          || overflow !== (in_valid && q.size() == 8)
          || (q.size() > 0 && out_data !== q[0])) begin
        failures++;
        if (failures < 10) $display("cyc %0d size %0d ready %b valid %b data %h", cyc, q.size(), in_ready, out_valid, out_data);
      end
      if (overflow) n_overflow++;
      do_pop  = out_valid && out_ready;
      do_push = in_valid && in_ready;
      @(negedge clk);
      if (do_pop) begin
        void'(q.pop_front());
        n_pop++;
      end
      if (do_push) q.push_back(in_data);
    end
    checks++;
    if (n_overflow == 0 || n_pop < 500) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
