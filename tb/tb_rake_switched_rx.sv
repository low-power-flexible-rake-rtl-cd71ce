// Testbench of the receiver with N_SPC sample registers and one code
// generator switched between three multipaths.  The channel model (paths at
// delays 13, 130, 303 and 400 samples, spreading factor 16) feeds one sample
// every 8 cycles, the slowest rate the 3-finger burst allows.  Each finger
// is loaded with the slot and code phase of a path; every symbol leaving the
// FIFO is compared with the reference despread sum of that finger's path, in
// order.  Mid-run finger 1 moves to the path at 400 and finger 2 is switched
// off and on again; the test also counts the code-phase reloads (three per
// chip).
module tb_rake_switched_rx;
  import rake_pkg::*;
  import rake_tb_pkg::*;

  localparam int SF_LOG2 = 4;
  localparam int SF = 1 << SF_LOG2;

  logic clk = 0, rst_n = 0;
  logic sample_valid = 0;
  iq_sample_t sample = '0;
  logic cfg_we = 0, cfg_active = 0;
  logic [1:0] cfg_idx = '0, cfg_slot = '0, phase, sym_finger;
  logic [24:0] cfg_x = '0, cfg_y = '0;
  logic [9:0] cfg_cnt = '0, code_idx = '0;
  logic [3:0] code_sf_log2 = '0;
  logic sym_valid, sym_ready = 1, sym_overflow, code_switch;
  logic signed [ACC_W-1:0] sym_i, sym_q;

  int checks = 0, failures = 0;
  int fdelay[3], next_m[3];
  int n_dump[3] = '{0, 0, 0};
  int n_switch = 0, t = 0;
  bit on[3] = '{0, 0, 0};

  rake_switched_rx dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && code_switch) n_switch++;

  always @(negedge clk) if (rst_n && sym_valid && sym_ready) begin
    automatic int f = int'(sym_finger), ei, eq;
    expect_sym(fdelay[f], next_m[f], ei, eq);
    checks++;
    n_dump[f]++;
    if (int'(sym_i) != ei || int'(sym_q) != eq || !on[f]) begin
      failures++;
      if (failures < 10) $display("finger %0d symbol %0d: %0d,%0d want %0d,%0d", f, next_m[f], sym_i, sym_q, ei, eq);
    end
    next_m[f]++;
  end

  // load finger f for the path at delay d, between bursts; next sample is t
  task automatic load_finger(int f, int d, bit act);
    int j;
    j = t / 4 + (d % 4 + CH_OFF - d) / 4;
    cfg_we = 1; cfg_idx = 2'(f); cfg_active = act; cfg_slot = 2'(d % 4);
    cfg_x = x_at(j); cfg_y = y_at(j); cfg_cnt = 10'(j % SF);
    fdelay[f] = d;
    next_m[f] = (j + SF - 1) / SF;
    on[f] = act;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic run(int t_end);
    for (; t < t_end; t++) begin
      sample_valid = 1;
      sample = iq_sample_t'(rx_word(t));
      @(negedge clk);
      sample_valid = 0;
      repeat (7) @(negedge clk);
    end
  endtask

  initial begin
    int sw0, ch0;
    build_pn(4000);
    path_d = '{13, 130, 303, 400};
    path_amp = '{1, 1, 1, 1};
    ch_sf_log2 = SF_LOG2;
    ch_code = 3;
    code_idx = 10'(ch_code); code_sf_log2 = 4'(SF_LOG2);
    repeat (2) @(negedge clk);
    rst_n = 1;
    load_finger(0, 13, 1);
    load_finger(1, 130, 1);
    load_finger(2, 303, 1);
    sw0 = n_switch; ch0 = t;
    run(1202);
    checks++;
    if (n_switch - sw0 != 3 * ((t / 4) - (ch0 / 4))) begin
      failures++;
      $display("code switches %0d for %0d chips", n_switch - sw0, t / 4 - ch0 / 4);
    end
    load_finger(1, 400, 1);
    load_finger(2, 303, 0);
    run(1601);
    load_finger(2, 303, 1);
    run(2800);
    repeat (10) @(negedge clk);
    checks++;
    if (n_dump[0] < 40 || n_dump[1] < 35 || n_dump[2] < 25) begin
      failures++;
    end
    $display("dumps %0d %0d %0d, code switches %0d", n_dump[0], n_dump[1], n_dump[2], n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
