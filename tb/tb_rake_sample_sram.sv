// Testbench of the single-port sample memory: fills all 512 words, reads
// them back in random order against a model array, checks that a write
// cycle does not read and that read data appear one cycle after the read.
module tb_rake_sample_sram;
  logic clk = 0, we = 0, re = 0;
  logic [8:0] addr = '0;
  logic [7:0] wdata = '0, rdata;
  logic [7:0] model [512];
  int checks = 0, failures = 0;

  rake_sample_sram dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int a = 0; a < 512; a++) begin
      we = 1; addr = 9'(a); wdata = 8'($urandom); model[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int k = 0; k < 2000; k++) begin
      logic [7:0] prev;
      if ($urandom % 4 == 0) begin
        // write: rdata must keep its value
        prev = rdata;
        we = 1; re = 1; addr = 9'($urandom); wdata = 8'($urandom); model[addr] = wdata;
        @(negedge clk);
        checks++;
        if (rdata !== prev) failures++;
      end else begin
        we = 0; re = 1; addr = 9'($urandom);
        @(negedge clk);
        checks++;
        if (rdata !== model[addr]) begin
          failures++;
          if (failures < 10) $display("addr %0d got %h want %h", addr, rdata, model[addr]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
