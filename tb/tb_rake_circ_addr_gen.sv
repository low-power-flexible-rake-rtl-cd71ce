// Testbench of the circular write-address generator: the address must count
// samples modulo 512 (wrapping), and the bus address must follow the counter
// only while the bus is enabled and hold its last enabled value otherwise.
module tb_rake_circ_addr_gen;
  logic clk = 0, rst_n = 0, sample_valid = 0, bus_en = 0;
  logic [8:0] addr, bus_addr;
  int checks = 0, failures = 0;

  rake_circ_addr_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n = 0, held = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      sample_valid = ($urandom % 4) != 0;
      bus_en = sample_valid && ($urandom % 2);
      #1;
      checks++;
      if (int'(addr) != n % 512 || int'(bus_addr) != (bus_en ? n % 512 : held)) begin
        failures++;
        if (failures < 10) $display("addr %0d want %0d bus %0d", addr, n % 512, bus_addr);
      end
      if (bus_en) held = n % 512;
      @(negedge clk);
      if (sample_valid) n++;
    end
    checks++;
    if (n < 1024) failures++;   // wrapped at least twice
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
