// Testbench of the time-shared correlator engine.  Bursts of four reads (one
// per finger) share a random code chip; the spreading factor is 8.  Finger 3
// becomes ready only later and finger 1 is briefly un-readied mid-run.  An
// integer model of the per-finger integration and of the 8-entry FIFO gives
// the expected dumps (finger, I, Q) in order; stalls of the output make the
// FIFO overflow, and a dump refused by a full FIFO is expected to be lost.
module tb_rake_tdm_correlator;
  import rake_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [1:0] in_finger = '0, out_finger;
  iq_sample_t in_sample = '0;
  code_chip_t code = '0;
  logic [3:0] ready = '0;
  logic out_valid, out_ready = 1, overflow;
  logic signed [ACC_W-1:0] out_i, out_q;

  typedef struct { int f; int i; int q; } dump_t;
  dump_t fifo[$];
  int acc_i[4], acc_q[4];
  bit integ[4];
  int checks = 0, failures = 0, n_overflow = 0, n_dumps = 0;

  rake_tdm_correlator dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one clock cycle: check outputs against the model, then advance both
  task automatic cycle();
    bit do_pop, push;
    int s_i, s_q;
    #1;
    do_pop = 0; push = 0;
    if (out_valid !== (fifo.size() > 0)) failures++;
    if (fifo.size() > 0 && out_valid && out_ready) begin
      checks++;
      if (int'(out_finger) != fifo[0].f || int'(out_i) != fifo[0].i || int'(out_q) != fifo[0].q) begin
        failures++;
        if (failures < 10) $display("dump f%0d %0d,%0d want f%0d %0d,%0d", out_finger, out_i, out_q, fifo[0].f, fifo[0].i, fifo[0].q);
      end
      do_pop = 1;
    end
    // model of the engine
    for (int f = 0; f < 4; f++) if (!ready[f]) integ[f] = 0;
    if (in_valid && ready[in_finger] && (integ[in_finger] || code.sym_start)) begin
      automatic int a = code.neg_i ? -1 : 1, b = code.neg_q ? -1 : 1;
      automatic int pi = int'(in_sample.i) * a + int'(in_sample.q) * b;
      automatic int pq = int'(in_sample.q) * a - int'(in_sample.i) * b;
      automatic int f = int'(in_finger);
      s_i = code.sym_start ? pi : acc_i[f] + pi;
      s_q = code.sym_start ? pq : acc_q[f] + pq;
      acc_i[f] = s_i; acc_q[f] = s_q; integ[f] = 1;
      if (code.sym_end) begin
        checks++;
        if (fifo.size() - int'(do_pop) >= 8 || (fifo.size() == 8)) begin
          if (!overflow) failures++;
          n_overflow++;
        end else begin
          if (overflow) failures++;
          push = 1;
        end
        if (push) begin
          automatic dump_t d = '{f, s_i, s_q};
          fifo.push_back(d);
          n_dumps++;
        end
      end
    end
    @(negedge clk);
    if (do_pop) void'(fifo.pop_front());
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 4; f++) begin acc_i[f] = 0; acc_q[f] = 0; integ[f] = 0; end
    for (int chip = 0; chip < 1500; chip++) begin
      ready = 4'b0111;
      if (chip >= 300) ready[3] = 1;
      if (chip >= 600 && chip < 620) ready[1] = 0;
      out_ready = !((chip / 100) % 4 == 3) && ($urandom % 4 != 0);
      code.neg_i = 1'($urandom); code.neg_q = 1'($urandom);
      code.sym_start = (chip % 8 == 0);
      code.sym_end   = (chip % 8 == 7);
      for (int f = 0; f < 4; f++) begin
        in_valid = 1; in_finger = 2'(f); in_sample = iq_sample_t'($urandom);
        cycle();
      end
      in_valid = 0;
      cycle();
    end
    out_ready = 1;
    for (int k = 0; k < 12; k++) cycle();
    checks++;
    if (n_overflow == 0 || n_dumps < 400 || fifo.size() != 0) begin
      failures++;
      $display("overflow %0d dumps %0d left %0d", n_overflow, n_dumps, fifo.size());
    end
    $display("dumps %0d overflows %0d", n_dumps, n_overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
