// Testbench of the tag-buffered SRAM receiver at its default size (512-sample
// buffer, 4 samples per chip, 4 fingers).  A transmitter and multipath
// channel model feed one sample every 8 clock cycles.  Fingers 0-2 lock on
// paths at delays 13, 130 and 303 (three distinct slots): the SRAM must see
// exactly 3 writes per 4 samples, and every symbol dump must equal the
// reference despread sum of its path.  Finger 3 is then placed on a fourth
// path (slot 0): all slots are written, and the finger's dumps start only
// after its 128-chip warm-up.  Finally the symbol output is stalled until
// the FIFO overflows.
module tb_rake_tagged_rx;
  import rake_pkg::*;
  import rake_tb_pkg::*;

  localparam int SF_LOG2 = 4;
  localparam int SF = 1 << SF_LOG2;

  logic clk = 0, rst_n = 0;
  logic sample_valid = 0;
  iq_sample_t sample = '0;
  logic cfg_we = 0, cfg_active = 0;
  logic [1:0] cfg_idx = '0;
  logic [8:0] cfg_delay = '0;
  logic code_load = 0;
  logic [24:0] code_x = '0, code_y = '0;
  logic [9:0] code_cnt = '0, code_idx = '0;
  logic [3:0] code_sf_log2 = '0;
  logic sym_valid, sym_ready = 1, sym_overflow, sram_we, sram_re;
  logic [1:0] sym_finger;
  logic signed [ACC_W-1:0] sym_i, sym_q;
  logic [3:0] tags, finger_ready;

  int checks = 0, failures = 0;
  int fdelay[4] = '{13, 130, 303, 400};
  int cur_chip = -1;
  int n_dump[4] = '{0, 0, 0, 0};
  int n_overflow = 0, n_samples = 0, n_writes = 0;
  bit checking = 1;
  int cfg3_chip = 1 << 30;

  rake_tagged_rx dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (sym_overflow) n_overflow++;
    if (sram_we) n_writes++;
  end

  always @(negedge clk) if (rst_n) begin
    if (sym_valid && sym_ready && checking) begin
      automatic int m, ei, eq, f;
      f = int'(sym_finger);
      m = cur_chip / SF;
      expect_sym(fdelay[f], m, ei, eq);
      checks++;
      n_dump[f]++;
      if (cur_chip % SF != SF - 1 || int'(sym_i) != ei || int'(sym_q) != eq
          || (f == 3 && cur_chip < cfg3_chip + 128) || (f < 3 && cur_chip < 128)) begin
        failures++;
        if (failures < 10) $display("finger %0d chip %0d: %0d,%0d want %0d,%0d", f, cur_chip, sym_i, sym_q, ei, eq);
      end
    end
  end

  task automatic send(int t);
    sample_valid = 1;
    sample = iq_sample_t'(rx_word(t));
    n_samples++;
    @(negedge clk);
    sample_valid = 0;
    if (t % 4 == 3) cur_chip = t / 4;
    repeat (7) @(negedge clk);
  endtask

  task automatic set_finger(int f, int d, bit act);
    cfg_we = 1; cfg_idx = 2'(f); cfg_delay = 9'(d); cfg_active = act;
    @(negedge clk);
    cfg_we = 0;
    @(negedge clk);
  endtask

  initial begin
    automatic int t = 0, w0;
    build_pn(4000);
    path_d = '{13, 130, 303, 400};
    path_amp = '{1, 1, 1, 1};
    ch_sf_log2 = SF_LOG2;
    ch_code = 5;
    repeat (2) @(negedge clk);
    rst_n = 1;
    code_load = 1; code_x = x_at(0); code_y = y_at(0); code_cnt = '0;
    code_idx = 10'(ch_code); code_sf_log2 = 4'(SF_LOG2);
    @(negedge clk);
    code_load = 0;
    for (int f = 0; f < 3; f++) set_finger(f, fdelay[f], 1);
    set_finger(3, 0, 0);
    @(negedge clk);
    n_writes = 0; n_samples = 0;
    // phase 1: three paths in slots 1, 2, 3
    for (; t < 4 * 400; t++) send(t);
    checks++;
    if (n_writes * 4 != n_samples * 3 || tags !== 4'b1110) begin
      failures++;
      $display("writes %0d for %0d samples, tags %b", n_writes, n_samples, tags);
    end
    // phase 2: finger 3 on the path at delay 400 (slot 0)
    set_finger(3, fdelay[3], 1);
    cfg3_chip = cur_chip;
    w0 = n_writes;
    for (; t < 4 * 700; t++) send(t);
    checks++;
    if (n_writes - w0 != 4 * 300 || tags !== 4'b1111 || finger_ready !== 4'b1111) begin
      failures++;
      $display("phase 2 writes %0d tags %b ready %b", n_writes - w0, tags, finger_ready);
    end
    // phase 3: stall the symbol output until the FIFO overflows, then drain
    sym_ready = 0; checking = 0;
    for (; t < 4 * 760; t++) send(t);
    sym_ready = 1;
    repeat (20) @(negedge clk);
    checks++;
    if (n_overflow == 0 || n_dump[0] < 10 || n_dump[1] < 10 || n_dump[2] < 10 || n_dump[3] < 5) begin
      failures++;
      $display("overflow %0d dumps %0d %0d %0d %0d", n_overflow, n_dump[0], n_dump[1], n_dump[2], n_dump[3]);
    end
    $display("dumps %0d %0d %0d %0d, overflows %0d", n_dump[0], n_dump[1], n_dump[2], n_dump[3], n_overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
