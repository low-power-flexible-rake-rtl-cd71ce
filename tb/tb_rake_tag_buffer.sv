// Testbench of the sample-slot tag buffer: random finger tables; the tags
// must equal the set of slots used by active fingers (one cycle later), and
// the write and bus enables must pass exactly the samples of tagged slots.
// Also checks the write count of three paths in distinct slots (3 of 4).
module tb_rake_tag_buffer;
  logic clk = 0, rst_n = 0;
  logic [3:0] finger_active = '0;
  logic [1:0] finger_slot [4];
  logic sample_valid = 0;
  logic [1:0] phase = '0;
  logic [3:0] tags;
  logic write_en, bus_en;
  int checks = 0, failures = 0;

  rake_tag_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] want;
    int writes;
    for (int f = 0; f < 4; f++) finger_slot[f] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      finger_active = 4'($urandom);
      for (int f = 0; f < 4; f++) finger_slot[f] = 2'($urandom);
      want = '0;
      for (int f = 0; f < 4; f++) if (finger_active[f]) want |= 4'(1) << finger_slot[f];
      @(negedge clk);
      for (int p = 0; p < 4; p++) begin
        phase = 2'(p);
        sample_valid = $urandom;
        #1;
        checks++;
        if (tags !== want || write_en !== (sample_valid && want[p]) || bus_en !== write_en) begin
          failures++;
          if (failures < 10) $display("tags %b want %b", tags, want);
        end
      end
    end
    // three paths with delays 5, 10, 15 samples: slots 1, 2, 3
    finger_active = 4'b0111;
    finger_slot[0] = 2'd1; finger_slot[1] = 2'd2; finger_slot[2] = 2'd3;
    @(negedge clk);
    writes = 0;
    sample_valid = 1;
    for (int s = 0; s < 400; s++) begin
      phase = 2'(s);
      #1;
      writes += int'(write_en);
    end
    checks++;
    if (writes != 300) begin
      failures++;
      $display("writes %0d of 400 samples, want 300", writes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
