// Testbench of one correlation engine: random samples and code chips with
// symbol flags of spreading factor 8, random idle cycles, a restart in the
// middle of a symbol and a power-down period.  Every dump is compared with
// an integer model of despreading and integration, and the dump count with
// the number of complete symbols.
module tb_rake_finger_engine;
  import rake_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, restart = 0, valid = 0;
  iq_sample_t sample = '0;
  code_chip_t code = '0;
  logic sym_valid;
  logic signed [ACC_W-1:0] sym_i, sym_q;
  int checks = 0, failures = 0;
  int exp_i[$], exp_q[$];
  int n_dumps = 0;

  rake_finger_engine dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && sym_valid) begin
    checks++;
    n_dumps++;
    if (exp_i.size() == 0) begin
      failures++;
      $display("unexpected dump");
    end else begin
      int ei, eq;
      ei = exp_i.pop_front();
      eq = exp_q.pop_front();
      if (int'(sym_i) != ei || int'(sym_q) != eq) begin
        failures++;
        if (failures < 10) $display("dump %0d,%0d want %0d,%0d", sym_i, sym_q, ei, eq);
      end
    end
  end

  initial begin
    int ai = 0, aq = 0, chip_no = 0;
    bit full = 0;
    int expected = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    en = 1;
    chip_no = 3;   // start in the middle of a symbol: first symbol is partial
    for (int cyc = 0; cyc < 3000; cyc++) begin
      valid = ($urandom % 3) != 0;
      if (cyc == 1500) begin
        restart = 1;   // discard the running symbol
        valid = 0;
      end else restart = 0;
      en = !(cyc >= 2000 && cyc < 2100);
      sample = iq_sample_t'($urandom);
      code.neg_i = 1'($urandom); code.neg_q = 1'($urandom);
      code.sym_start = (chip_no % 8 == 0);
      code.sym_end   = (chip_no % 8 == 7);
      if (restart) begin
        full = 0;
      end else if (valid && en) begin
        int a, b, pi, pq;
        a  = code.neg_i ? -1 : 1;
        b  = code.neg_q ? -1 : 1;
        pi = int'(sample.i) * a + int'(sample.q) * b;
        pq = int'(sample.q) * a - int'(sample.i) * b;
        if (code.sym_start) begin
          ai = pi; aq = pq; full = 1;
        end else begin
          ai += pi; aq += pq;
        end
        if (code.sym_end && full) begin
          exp_i.push_back(ai); exp_q.push_back(aq);
          expected++;
        end
        chip_no++;
      end
      @(negedge clk);
    end
    valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (n_dumps != expected || expected < 100) begin
      failures++;
      $display("dumps %0d expected %0d", n_dumps, expected);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
