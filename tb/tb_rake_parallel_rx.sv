// Testbench of the SRAM-less receiver with three parallel engines.  A
// transmitter and multipath channel model (paths at delays 13, 130, 303 and
// 400 samples) feed one sample every 2 cycles.  Each engine is loaded with
// the slot and code phase of one path, as the multipath tracker would; every
// symbol dump is compared with the reference despread sum of that path, in
// order, with the first (partial) symbol discarded.  Mid-run engine 2 is
// powered down (no dumps may appear), engine 1 is moved to the path at 400,
// and engine 2 is powered up again with a fresh code phase.
module tb_rake_parallel_rx;
  import rake_pkg::*;
  import rake_tb_pkg::*;

  localparam int SF_LOG2 = 4;
  localparam int SF = 1 << SF_LOG2;

  logic clk = 0, rst_n = 0;
  logic sample_valid = 0;
  iq_sample_t sample = '0;
  logic [2:0] eng_en = '0;
  logic cfg_we = 0;
  logic [1:0] cfg_idx = '0, cfg_slot = '0, phase;
  logic [24:0] cfg_x = '0, cfg_y = '0;
  logic [9:0] cfg_cnt = '0, cfg_code_idx = '0;
  logic [3:0] cfg_sf_log2 = '0;
  logic [2:0] sym_valid;
  logic signed [ACC_W-1:0] sym_i [3];
  logic signed [ACC_W-1:0] sym_q [3];

  int checks = 0, failures = 0;
  int edelay[3];
  int next_m[3];
  int n_dump[3] = '{0, 0, 0};
  int n_off_dump = 0;
  int t = 0;

  rake_parallel_rx dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    for (int e = 0; e < 3; e++) if (sym_valid[e]) begin
      automatic int ei, eq;
      expect_sym(edelay[e], next_m[e], ei, eq);
      checks++;
      n_dump[e]++;
      if (!eng_en[e]) n_off_dump++;
      if (int'(sym_i[e]) != ei || int'(sym_q[e]) != eq) begin
        failures++;
        if (failures < 10) $display("engine %0d symbol %0d: %0d,%0d want %0d,%0d", e, next_m[e], sym_i[e], sym_q[e], ei, eq);
      end
      next_m[e]++;
    end
  end

  // load engine e for the path at delay d; the next sample is number t
  task automatic load_engine(int e, int d);
    int t1, j1;
    t1 = t;
    while (t1 % 4 != d % 4) t1++;
    j1 = (t1 + CH_OFF - d) / 4;
    cfg_we = 1; cfg_idx = 2'(e); cfg_slot = 2'(d % 4);
    cfg_x = x_at(j1); cfg_y = y_at(j1); cfg_cnt = 10'(j1 % SF);
    cfg_code_idx = 10'(ch_code); cfg_sf_log2 = 4'(SF_LOG2);
    edelay[e] = d;
    next_m[e] = (j1 + SF - 1) / SF;   // first complete symbol
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic run(int t_end);
    for (; t < t_end; t++) begin
      sample_valid = 1;
      sample = iq_sample_t'(rx_word(t));
      @(negedge clk);
      sample_valid = 0;
      @(negedge clk);
    end
    repeat (4) @(negedge clk);
  endtask

  initial begin
    int d2;
    build_pn(4000);
    path_d = '{13, 130, 303, 400};
    path_amp = '{1, 1, 1, 1};
    ch_sf_log2 = SF_LOG2;
    ch_code = 9;
    repeat (2) @(negedge clk);
    rst_n = 1;
    load_engine(0, 13);
    load_engine(1, 130);
    load_engine(2, 303);
    eng_en = 3'b111;
    run(1200);
    // power down engine 2
    eng_en = 3'b011;
    d2 = n_dump[2];
    run(1600);
    checks++;
    if (n_dump[2] != d2) failures++;
    // move engine 1 to the path at 400, bring engine 2 back on 303
    load_engine(1, 400);
    load_engine(2, 303);
    eng_en = 3'b111;
    run(2800);
    checks++;
    if (n_dump[0] < 40 || n_dump[1] < 30 || n_dump[2] < 25 || n_off_dump != 0) begin
      failures++;
      $display("dumps %0d %0d %0d", n_dump[0], n_dump[1], n_dump[2]);
    end
    $display("dumps %0d %0d %0d", n_dump[0], n_dump[1], n_dump[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
