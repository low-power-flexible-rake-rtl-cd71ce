// End-to-end testbench of the three receivers at their default sizes
// (512-sample SRAM buffer, 4 samples per chip, 4 fingers; 3 parallel
// engines; 3 fingers sharing one switched code generator).  One
// transmitter and multipath channel model (paths at delays 13, 130, 303 and
// 400 samples, spreading factor 16) drives both receivers, one sample every
// 8 clock cycles, and a model of the multipath tracker loads delays and
// code phases.  Every symbol dump of every receiver is compared with the
// reference despread sum of its path.
//
// Mechanisms that must each occur (counted, a failure if never seen):
//   A: skipped SRAM writes of untagged slots, SRAM writes, finger warm-up
//      completion, a new tag when a finger takes a new slot, symbol dumps
//      of every finger, FIFO overflow while the output stalls;
//   B: code-phase loads while running, partial symbols discarded after a
//      load, engine power-down, symbol dumps of every engine;
//   C: code-phase switches (three per chip), a finger moved to another
//      path, a finger switched off, symbol dumps of every finger.
// It also checks the write saving: with three paths in three of four slots
// the SRAM takes exactly 3 writes per 4 samples.
module tb_rake_top;
  import rake_pkg::*;
  import rake_tb_pkg::*;

  localparam int SF_LOG2 = 4;
  localparam int SF = 1 << SF_LOG2;

  logic clk = 0, rst_n = 0;
  // architecture A
  logic a_sample_valid = 0;
  iq_sample_t a_sample = '0;
  logic a_cfg_we = 0, a_cfg_active = 0;
  logic [1:0] a_cfg_idx = '0;
  logic [8:0] a_cfg_delay = '0;
  logic a_code_load = 0;
  logic [24:0] a_code_x = '0, a_code_y = '0;
  logic [9:0] a_code_cnt = '0, a_code_idx = '0;
  logic [3:0] a_code_sf_log2 = '0;
  logic a_sym_valid, a_sym_ready = 1, a_sym_overflow, a_sram_we, a_sram_re;
  logic [1:0] a_sym_finger;
  logic signed [ACC_W-1:0] a_sym_i, a_sym_q;
  logic [3:0] a_tags, a_finger_ready;
  // architecture B
  logic b_sample_valid = 0;
  iq_sample_t b_sample = '0;
  logic [2:0] b_eng_en = '0;
  logic b_cfg_we = 0;
  logic [1:0] b_cfg_idx = '0, b_cfg_slot = '0, b_phase;
  logic [24:0] b_cfg_x = '0, b_cfg_y = '0;
  logic [9:0] b_cfg_cnt = '0, b_cfg_code_idx = '0;
  logic [3:0] b_cfg_sf_log2 = '0;
  logic [2:0] b_sym_valid;
  logic signed [ACC_W-1:0] b_sym_i [3];
  logic signed [ACC_W-1:0] b_sym_q [3];

  // architecture C
  logic c_sample_valid = 0;
  iq_sample_t c_sample = '0;
  logic c_cfg_we = 0, c_cfg_active = 0;
  logic [1:0] c_cfg_idx = '0, c_cfg_slot = '0, c_phase, c_sym_finger;
  logic [24:0] c_cfg_x = '0, c_cfg_y = '0;
  logic [9:0] c_cfg_cnt = '0, c_code_idx = '0;
  logic [3:0] c_code_sf_log2 = '0;
  logic c_sym_valid, c_sym_ready = 1, c_sym_overflow, c_code_switch;
  logic signed [ACC_W-1:0] c_sym_i, c_sym_q;

  int checks = 0, failures = 0;
  int t = 0, cur_chip = -1;
  int fdelay[4] = '{13, 130, 303, 400};
  int cfg3_chip = 1 << 30;
  bit a_checking = 1;
  int edelay[3], next_m[3];
  // mechanism counters
  int n_skip = 0, n_write = 0, n_warm = 0, n_new_tag = 0, n_overflow = 0;
  int a_dumps[4] = '{0, 0, 0, 0};
  int n_reload = 0, n_partial = 0, n_powerdown = 0;
  int b_dumps[3] = '{0, 0, 0};
  logic [3:0] ready_q = '0, tags_q = '0;
  int cdelay[3], c_next_m[3];
  bit c_on[3] = '{0, 0, 0};
  int c_dumps[3] = '{0, 0, 0};
  int n_switch = 0, n_cmove = 0, n_coff = 0;

  rake_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (a_sample_valid && !a_sram_we) n_skip++;
    if (a_sram_we) n_write++;
    if (a_sym_overflow) n_overflow++;
    if (b_eng_en != 3'b111 && b_sample_valid) n_powerdown++;
    for (int f = 0; f < 4; f++) if (a_finger_ready[f] && !ready_q[f]) n_warm++;
    if ((a_tags & ~tags_q) != 0 && tags_q != 0) n_new_tag++;
    if (c_code_switch) n_switch++;
    ready_q <= a_finger_ready;
    tags_q  <= a_tags;
  end

  always @(negedge clk) if (rst_n) begin
    if (a_sym_valid && a_sym_ready && a_checking) begin
      automatic int m, ei, eq, f;
      f = int'(a_sym_finger);
      m = cur_chip / SF;
      expect_sym(fdelay[f], m, ei, eq);
      checks++;
      a_dumps[f]++;
      if (cur_chip % SF != SF - 1 || int'(a_sym_i) != ei || int'(a_sym_q) != eq
          || (f == 3 && cur_chip < cfg3_chip + 128) || (f < 3 && cur_chip < 128)) begin
        failures++;
        if (failures < 10) $display("A finger %0d chip %0d: %0d,%0d want %0d,%0d", f, cur_chip, a_sym_i, a_sym_q, ei, eq);
      end
    end
    for (int e = 0; e < 3; e++) if (b_sym_valid[e]) begin
      automatic int ei, eq;
      expect_sym(edelay[e], next_m[e], ei, eq);
      checks++;
      b_dumps[e]++;
      if (int'(b_sym_i[e]) != ei || int'(b_sym_q[e]) != eq || !b_eng_en[e]) begin
        failures++;
        if (failures < 10) $display("B engine %0d symbol %0d: %0d,%0d want %0d,%0d", e, next_m[e], b_sym_i[e], b_sym_q[e], ei, eq);
      end
      next_m[e]++;
    end
    if (c_sym_valid && c_sym_ready) begin
      automatic int f = int'(c_sym_finger), ei, eq;
      expect_sym(cdelay[f], c_next_m[f], ei, eq);
      checks++;
      c_dumps[f]++;
      if (int'(c_sym_i) != ei || int'(c_sym_q) != eq || !c_on[f]) begin
        failures++;
        if (failures < 10) $display("C finger %0d symbol %0d: %0d,%0d want %0d,%0d", f, c_next_m[f], c_sym_i, c_sym_q, ei, eq);
      end
      c_next_m[f]++;
    end
  end

  task automatic send_to(int t_end);
    for (; t < t_end; t++) begin
      a_sample_valid = 1; b_sample_valid = 1; c_sample_valid = 1;
      a_sample = iq_sample_t'(rx_word(t));
      b_sample = a_sample;
      c_sample = a_sample;
      @(negedge clk);
      a_sample_valid = 0; b_sample_valid = 0; c_sample_valid = 0;
      if (t % 4 == 3) cur_chip = t / 4;
      repeat (7) @(negedge clk);
    end
  endtask

  task automatic set_finger(int f, int d, bit act);
    a_cfg_we = 1; a_cfg_idx = 2'(f); a_cfg_delay = 9'(d); a_cfg_active = act;
    @(negedge clk);
    a_cfg_we = 0;
    @(negedge clk);
  endtask

  // load engine e for the path at delay d; the next sample is number t
  task automatic load_engine(int e, int d);
    int t1, j1;
    t1 = t;
    while (t1 % 4 != d % 4) t1++;
    j1 = (t1 + CH_OFF - d) / 4;
    b_cfg_we = 1; b_cfg_idx = 2'(e); b_cfg_slot = 2'(d % 4);
    b_cfg_x = x_at(j1); b_cfg_y = y_at(j1); b_cfg_cnt = 10'(j1 % SF);
    b_cfg_code_idx = 10'(ch_code); b_cfg_sf_log2 = 4'(SF_LOG2);
    edelay[e] = d;
    next_m[e] = (j1 + SF - 1) / SF;
    if (j1 % SF != 0) n_partial++;
    if (t > 0) n_reload++;
    @(negedge clk);
    b_cfg_we = 0;
  endtask

  // load C finger f for the path at delay d, between bursts; next sample is t
  task automatic load_cfinger(int f, int d, bit act);
    int j;
    j = t / 4 + (d % 4 + CH_OFF - d) / 4;
    c_cfg_we = 1; c_cfg_idx = 2'(f); c_cfg_active = act; c_cfg_slot = 2'(d % 4);
    c_cfg_x = x_at(j); c_cfg_y = y_at(j); c_cfg_cnt = 10'(j % SF);
    if (t > 0 && act && cdelay[f] != d) n_cmove++;
    if (!act) n_coff++;
    cdelay[f] = d;
    c_next_m[f] = (j + SF - 1) / SF;
    c_on[f] = act;
    @(negedge clk);
    c_cfg_we = 0;
  endtask

  task automatic need(string what, int n);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("mechanism never seen: %s", what);
    end
  endtask

  initial begin
    automatic int w0, s0;
    build_pn(4000);
    path_d = '{13, 130, 303, 400};
    path_amp = '{1, 1, 1, 1};
    ch_sf_log2 = SF_LOG2;
    ch_code = 7;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // A: shared code generator at chip 0, fingers 0-2 on three paths
    a_code_load = 1; a_code_x = x_at(0); a_code_y = y_at(0); a_code_cnt = '0;
    a_code_idx = 10'(ch_code); a_code_sf_log2 = 4'(SF_LOG2);
    @(negedge clk);
    a_code_load = 0;
    for (int f = 0; f < 3; f++) set_finger(f, fdelay[f], 1);
    // B: engines on the same three paths
    load_engine(0, 13);
    load_engine(1, 130);
    load_engine(2, 303);
    b_eng_en = 3'b111;
    // C: three fingers on the same paths
    c_code_idx = 10'(ch_code); c_code_sf_log2 = 4'(SF_LOG2);
    load_cfinger(0, 13, 1);
    load_cfinger(1, 130, 1);
    load_cfinger(2, 303, 1);
    @(negedge clk);
    w0 = n_write; s0 = t;
    send_to(4 * 400);
    checks++;
    if ((n_write - w0) * 4 != (t - s0) * 3) begin
      failures++;
      $display("A: %0d writes for %0d samples, want 3/4", n_write - w0, t - s0);
    end
    // A: a fourth finger on a new slot; B: engine 2 powered down
    set_finger(3, fdelay[3], 1);
    cfg3_chip = cur_chip;
    b_eng_en = 3'b011;
    load_cfinger(2, 303, 0);
    send_to(4 * 500);
    // B: engine 1 moves to the path at 400, engine 2 returns on 303
    load_engine(1, 400);
    load_engine(2, 303);
    b_eng_en = 3'b111;
    load_cfinger(1, 400, 1);
    load_cfinger(2, 303, 1);
    send_to(4 * 720);
    // A: stall the symbol output until the FIFO overflows, then drain
    a_sym_ready = 0; a_checking = 0;
    send_to(4 * 780);
    a_sym_ready = 1;
    repeat (20) @(negedge clk);
    $display("mechanisms:");
    need("A skipped SRAM writes", n_skip);
    need("A SRAM writes", n_write);
    need("A finger warm-ups completed", n_warm);
    need("A new slot tagged", n_new_tag);
    need("A FIFO overflows", n_overflow);
    for (int f = 0; f < 4; f++) need($sformatf("A dumps of finger %0d", f), a_dumps[f]);
    need("B code-phase loads while running", n_reload);
    need("B partial symbols discarded", n_partial);
    need("B samples while an engine is off", n_powerdown);
    for (int e = 0; e < 3; e++) need($sformatf("B dumps of engine %0d", e), b_dumps[e]);
    need("C code-phase switches", n_switch);
    need("C finger moved to another path", n_cmove);
    need("C finger switched off", n_coff);
    for (int f = 0; f < 3; f++) need($sformatf("C dumps of finger %0d", f), c_dumps[f]);
    checks++;
    if (n_switch != 3 * (t / 4)) begin
      failures++;
      $display("C: %0d code switches for %0d chips, want 3 per chip", n_switch, t / 4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
