// Flexible Rake receiver with a tag-buffered SRAM stream buffer.
//
// The stream buffer stores the received I/Q samples of one delay spread
// (DEPTH samples) in a single-port SRAM; fingers find their multipath by
// reading at an offset from the write address, and one time-shared
// correlator engine despreads them.  A multipath with delay d only uses
// sample slot d mod N_SPC of every chip, so a tag buffer marks the slots in
// use and only those samples are written: with L paths in fewer than N_SPC
// slots the SRAM write accesses drop (to 3/4 of the samples for three paths
// in distinct slots).  The tag buffer, circular and offset address
// generators, SRAM and correlator follow the design.  The read schedule, the
// warm-up after a delay change and the configuration ports are this design's
// choices.
//
// Schedule: the circular address counts every sample, so its low bits are
// the sample slot.  After the last sample of a chip (slot N_SPC-1, address
// `base`) the controller reads finger 0..N_FINGERS-1 at base+delay+1, one per
// cycle, skipping fingers that are not ready; the reads form the fingers'
// samples of one transmitted chip, which all use the code chip of that
// burst.  The code generator steps once per burst.  Writes take the single
// SRAM port first, and the burst must finish before the next sample: the
// clock must run at least N_FINGERS+1 cycles per sample (asserted).
//
// Interface: sample_valid/sample in; cfg_* loads a finger's delay; code_*
// loads the code phase for the next burst and selects the OVSF code;
// symbol dumps (finger, I, Q) leave through a FIFO with valid/ready.
// sram_we/sram_re/tags show the buffer's activity.
module rake_tagged_rx
  import rake_pkg::*;
#(
  parameter int N_FINGERS  = 4,
  parameter int BUF_DEPTH  = DEPTH,
  parameter int SPC        = N_SPC,
  parameter int ACC_BITS   = ACC_W,
  parameter int FIFO_DEPTH = 8
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           sample_valid,
  input  iq_sample_t                     sample,
  // multipath delays from the tracker
  input  logic                           cfg_we,
  input  logic [$clog2(N_FINGERS)-1:0]   cfg_idx,
  input  logic [$clog2(BUF_DEPTH)-1:0]   cfg_delay,
  input  logic                           cfg_active,
  // code phase and code select
  input  logic                           code_load,
  input  logic [PN_W-1:0]                code_x,
  input  logic [PN_W-1:0]                code_y,
  input  logic [OVSF_W-1:0]              code_cnt,
  input  logic [OVSF_W-1:0]              code_idx,
  input  logic [3:0]                     code_sf_log2,
  // symbol dumps
  output logic                           sym_valid,
  input  logic                           sym_ready,
  output logic [$clog2(N_FINGERS)-1:0]   sym_finger,
  output logic signed [ACC_BITS-1:0]     sym_i,
  output logic signed [ACC_BITS-1:0]     sym_q,
  output logic                           sym_overflow,
  // activity
  output logic                           sram_we,
  output logic                           sram_re,
  output logic [SPC-1:0]                 tags,
  output logic [N_FINGERS-1:0]           finger_ready
);

  localparam int AW   = $clog2(BUF_DEPTH);
  localparam int FW   = $clog2(N_FINGERS);
  localparam int PH_W = $clog2(SPC);

  logic [AW-1:0]        wr_addr, bus_addr, rd_addr, base_q, sram_addr;
  logic [PH_W-1:0]      phase;
  logic                 write_en, bus_en;
  logic [N_FINGERS-1:0] active;
  logic [PH_W-1:0]      slot [N_FINGERS];
  logic                 burst_q, step;
  logic [FW-1:0]        sel_q;
  logic                 rd_v_q, rd_use_q, rd_last_q;
  logic [FW-1:0]        rd_f_q;
  logic                 chip_tick;
  logic [2*SAMPLE_W-1:0] rdata;
  code_chip_t           chip;
  logic [OVSF_W-1:0]    code_idx_q;
  logic [3:0]           sf_log2_q;

  rake_circ_addr_gen #(.BUF_DEPTH(BUF_DEPTH)) u_circ (
    .clk, .rst_n, .sample_valid, .bus_en, .addr(wr_addr), .bus_addr
  );

  assign phase = wr_addr[PH_W-1:0];

  rake_tag_buffer #(.N_FINGERS(N_FINGERS), .SPC(SPC)) u_tags (
    .clk, .rst_n, .finger_active(active), .finger_slot(slot),
    .sample_valid, .phase, .tags, .write_en, .bus_en
  );

  rake_offset_addr_gen #(.N_FINGERS(N_FINGERS), .BUF_DEPTH(BUF_DEPTH), .SPC(SPC)) u_offs (
    .clk, .rst_n, .cfg_we, .cfg_idx, .cfg_delay, .cfg_active,
    .chip_tick, .base(base_q), .sel(sel_q), .rd_addr,
    .active, .ready(finger_ready), .slot
  );

  // read burst after the last sample of every chip; writes have priority
  assign step    = burst_q && !sample_valid;
  assign sram_we = write_en;
  assign sram_re = step && finger_ready[sel_q];
  assign sram_addr = write_en ? bus_addr : rd_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      burst_q   <= 1'b0;
      sel_q     <= '0;
      base_q    <= '0;
      rd_v_q    <= 1'b0;
      rd_use_q  <= 1'b0;
      rd_last_q <= 1'b0;
      rd_f_q    <= '0;
    end else begin
      rd_v_q    <= step;
      rd_use_q  <= sram_re;
      rd_f_q    <= sel_q;
      rd_last_q <= step && (int'(sel_q) == N_FINGERS - 1);
      if (sample_valid && int'(phase) == SPC - 1) begin
        burst_q <= 1'b1;
        sel_q   <= '0;
        base_q  <= wr_addr;
      end else if (step) begin
        if (int'(sel_q) == N_FINGERS - 1) burst_q <= 1'b0;
        else                              sel_q   <= sel_q + 1'b1;
      end
    end
  end

  rake_sample_sram #(.BUF_DEPTH(BUF_DEPTH), .WIDTH(2*SAMPLE_W)) u_sram (
    .clk, .we(write_en), .re(sram_re), .addr(sram_addr), .wdata(sample), .rdata
  );

  // the code generator moves to the next chip after the last read of a burst
  assign chip_tick = rd_v_q && rd_last_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code_idx_q <= '0;
      sf_log2_q  <= 4'd8;
    end else if (code_load) begin
      code_idx_q <= code_idx;
      sf_log2_q  <= code_sf_log2;
    end
  end

  rake_code_gen u_code (
    .clk, .rst_n, .en(chip_tick), .load(code_load),
    .load_x(code_x), .load_y(code_y), .load_cnt(code_cnt),
    .code_idx(code_idx_q), .sf_log2(sf_log2_q), .chip,
    .x_state(), .y_state(), .cnt()
  );

  rake_tdm_correlator #(.N_FINGERS(N_FINGERS), .ACC_BITS(ACC_BITS), .FIFO_DEPTH(FIFO_DEPTH)) u_corr (
    .clk, .rst_n,
    .in_valid(rd_v_q && rd_use_q), .in_finger(rd_f_q), .in_sample(iq_sample_t'(rdata)),
    .code(chip), .ready(finger_ready),
    .out_valid(sym_valid), .out_ready(sym_ready), .out_finger(sym_finger),
    .out_i(sym_i), .out_q(sym_q), .overflow(sym_overflow)
  );

  // the read burst must end before the next sample may overwrite the oldest
  assert property (@(posedge clk) disable iff (!rst_n) !(sample_valid && burst_q))
    else $error("sample arrived during a read burst: clock too slow for N_FINGERS");

endmodule
