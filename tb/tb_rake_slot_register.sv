// Testbench of a sample-slot register: a stream of random samples with a
// rotating slot number; the register must capture exactly the samples of its
// slot (one per chip), hold them in between, and capture nothing while
// disabled.
module tb_rake_slot_register;
  import rake_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, sample_valid = 0;
  iq_sample_t sample = '0, q, held = '0;
  logic [1:0] phase = '0, slot = 2'd2;
  logic captured;
  int checks = 0, failures = 0, n_cap = 0;

  rake_slot_register dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit hit;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      en = !(cyc >= 800 && cyc < 900);
      if (cyc == 1200) slot = 2'd0;
      sample_valid = (cyc % 2 == 0);
      sample = iq_sample_t'($urandom);
      hit = en && sample_valid && (phase == slot);
      @(negedge clk);
      if (hit) begin
        held = sample;
        n_cap++;
      end
      checks++;
      if (captured !== hit || q !== held) begin
        failures++;
        if (failures < 10) $display("cyc %0d captured=%b want %b q=%h want %h", cyc, captured, hit, q, held);
      end
      if (sample_valid) phase = phase + 1'b1;
    end
    checks++;
    if (n_cap < 200) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
