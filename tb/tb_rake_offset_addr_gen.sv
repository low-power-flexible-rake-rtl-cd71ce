// Testbench of the offset address generator: loads finger delays, checks
// read address = base + delay + 1 (mod 512) for every finger, the slot
// (delay mod 4), and that a finger becomes ready exactly 128 chip ticks
// after its delay was loaded.
module tb_rake_offset_addr_gen;
  logic clk = 0, rst_n = 0, cfg_we = 0, cfg_active = 0, chip_tick = 0;
  logic [1:0] cfg_idx = '0, sel = '0;
  logic [8:0] cfg_delay = '0, base = '0, rd_addr;
  logic [3:0] active, ready;
  logic [1:0] slot [4];
  int checks = 0, failures = 0;

  rake_offset_addr_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d[4] = '{0, 137, 511, 42};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      cfg_we = 1; cfg_idx = 2'(f); cfg_delay = 9'(d[f]); cfg_active = (f != 3);
      @(negedge clk);
    end
    cfg_we = 0;
    for (int t = 0; t < 130; t++) begin
      checks++;
      if (ready !== ((t >= 128) ? 4'b0111 : 4'b0000) || active !== 4'b0111) begin
        failures++;
        if (failures < 10) $display("tick %0d ready %b", t, ready);
      end
      chip_tick = 1;
      @(negedge clk);
      chip_tick = 0;
      @(negedge clk);
    end
    for (int k = 0; k < 200; k++) begin
      base = 9'($urandom);
      sel = 2'($urandom);
      #1;
      checks++;
      if (int'(rd_addr) != (int'(base) + d[sel] + 1) % 512 || int'(slot[sel]) != d[sel] % 4) begin
        failures++;
        if (failures < 10) $display("base %0d sel %0d rd %0d", base, sel, rd_addr);
      end
      @(negedge clk);
    end
    // reloading finger 1 restarts its warm-up
    cfg_we = 1; cfg_idx = 2'd1; cfg_delay = 9'd3; cfg_active = 1;
    @(negedge clk);
    cfg_we = 0;
    checks++;
    if (ready !== 4'b0101) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
