// Flexible Rake receiver without an SRAM stream buffer and with a single,
// time-shared correlator that switches its code phase between multipaths.
//
// The stream buffer is N_SPC sample registers holding the samples of the
// current chip, one per sample slot.  A multipath with delay d uses slot
// d mod N_SPC; its delay beyond that is absorbed into the phase of its
// scrambling and OVSF codes.  After the last sample of a chip the controller
// visits the fingers in turn.  For each finger it loads the finger's saved
// code phase (two 25-bit PN registers and the OVSF counter) into the one
// code generator, despreads the finger's slot register with the resulting
// chip, steps the generator, and writes the stepped phase back to the
// finger's context on the next cycle.  That per-path reload is the price
// paid for removing the SRAM.  Despreading, integration and symbol dumps go
// through the same time-shared correlator and FIFO as the SRAM receiver.
// The register buffer and the code-phase switching follow the design; the
// two-cycle load/compute schedule, the context store and the configuration
// port are this design's choices.
//
// Interface: one sample per sample_valid; a counter numbers the samples of a
// chip 0..N_SPC-1 from reset (`phase`).  cfg_we loads finger cfg_idx with its
// slot, its activity and the code phase of the next chip the finger will
// process; this discards the finger's partial symbol.  code_idx/code_sf_log2
// select the common OVSF code.  Symbol dumps leave through the FIFO
// (valid/ready); code_switch pulses for every code-phase reload.
//
// Timing: a burst takes 2*N_FINGERS+1 cycles from the cycle after the last
// sample of a chip and must end before the next sample arrives (asserted),
// so the clock must run at least 2*N_FINGERS+2 cycles per sample.
module rake_switched_rx
  import rake_pkg::*;
#(
  parameter int N_FINGERS  = 3,
  parameter int SPC        = N_SPC,
  parameter int ACC_BITS   = ACC_W,
  parameter int FIFO_DEPTH = 8
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           sample_valid,
  input  iq_sample_t                     sample,
  input  logic                           cfg_we,
  input  logic [$clog2(N_FINGERS)-1:0]   cfg_idx,
  input  logic                           cfg_active,
  input  logic [$clog2(SPC)-1:0]         cfg_slot,
  input  logic [PN_W-1:0]                cfg_x,
  input  logic [PN_W-1:0]                cfg_y,
  input  logic [OVSF_W-1:0]              cfg_cnt,
  input  logic [OVSF_W-1:0]              code_idx,
  input  logic [3:0]                     code_sf_log2,
  output logic [$clog2(SPC)-1:0]         phase,
  output logic                           sym_valid,
  input  logic                           sym_ready,
  output logic [$clog2(N_FINGERS)-1:0]   sym_finger,
  output logic signed [ACC_BITS-1:0]     sym_i,
  output logic signed [ACC_BITS-1:0]     sym_q,
  output logic                           sym_overflow,
  output logic                           code_switch
);

  localparam int FW   = $clog2(N_FINGERS);
  localparam int PH_W = $clog2(SPC);

  typedef struct packed {
    logic [PN_W-1:0]   x;
    logic [PN_W-1:0]   y;
    logic [OVSF_W-1:0] cnt;
  } code_ctx_t;

  iq_sample_t           cells [SPC];
  code_ctx_t            ctx   [N_FINGERS];
  logic [PH_W-1:0]      slot_q [N_FINGERS];
  logic [N_FINGERS-1:0] active_q, fresh_q;
  logic                 burst_q, compute_q, save_q;
  logic [FW-1:0]        f_q, save_f_q;
  logic                 gen_load, gen_en;
  code_chip_t           chip;
  logic [PN_W-1:0]      x_state, y_state;
  logic [OVSF_W-1:0]    cnt;
  code_ctx_t            cur_ctx;

  // sample registers, one per slot
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      for (int s = 0; s < SPC; s++) cells[s] <= '0;
    end else if (sample_valid) begin
      cells[phase] <= sample;
      phase        <= (int'(phase) == SPC - 1) ? '0 : phase + 1'b1;
    end
  end

  // burst: LOAD finger f (and save f-1), COMPUTE finger f, ..., final save
  assign gen_load    = burst_q && !compute_q;
  assign gen_en      = burst_q && compute_q;
  assign code_switch = gen_load;
  assign cur_ctx     = ctx[f_q];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      burst_q   <= 1'b0;
      compute_q <= 1'b0;
      save_q    <= 1'b0;
      f_q       <= '0;
      save_f_q  <= '0;
    end else begin
      save_q <= 1'b0;
      if (sample_valid && int'(phase) == SPC - 1) begin
        burst_q   <= 1'b1;
        compute_q <= 1'b0;
        f_q       <= '0;
      end else if (burst_q && !compute_q) begin
        compute_q <= 1'b1;
      end else if (burst_q) begin
        compute_q <= 1'b0;
        save_q    <= 1'b1;
        save_f_q  <= f_q;
        if (int'(f_q) == N_FINGERS - 1) burst_q <= 1'b0;
        else                            f_q     <= f_q + 1'b1;
      end
    end
  end

  // finger contexts: configuration has priority over the write-back
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int f = 0; f < N_FINGERS; f++) begin
        ctx[f]    <= '0;
        slot_q[f] <= '0;
      end
      active_q <= '0;
      fresh_q  <= '0;
    end else begin
      fresh_q <= '0;
      if (save_q) ctx[save_f_q] <= '{x: x_state, y: y_state, cnt: cnt};
      if (cfg_we) begin
        ctx[cfg_idx]      <= '{x: cfg_x, y: cfg_y, cnt: cfg_cnt};
        slot_q[cfg_idx]   <= cfg_slot;
        active_q[cfg_idx] <= cfg_active;
        fresh_q[cfg_idx]  <= 1'b1;
      end
    end
  end

  rake_code_gen u_code (
    .clk, .rst_n, .en(gen_en), .load(gen_load),
    .load_x(cur_ctx.x), .load_y(cur_ctx.y), .load_cnt(cur_ctx.cnt),
    .code_idx, .sf_log2(code_sf_log2), .chip,
    .x_state, .y_state, .cnt
  );

  rake_tdm_correlator #(.N_FINGERS(N_FINGERS), .ACC_BITS(ACC_BITS), .FIFO_DEPTH(FIFO_DEPTH)) u_corr (
    .clk, .rst_n,
    .in_valid(gen_en && active_q[f_q]), .in_finger(f_q), .in_sample(cells[slot_q[f_q]]),
    .code(chip), .ready(active_q & ~fresh_q),
    .out_valid(sym_valid), .out_ready(sym_ready), .out_finger(sym_finger),
    .out_i(sym_i), .out_q(sym_q), .overflow(sym_overflow)
  );

  assert property (@(posedge clk) disable iff (!rst_n) !(sample_valid && burst_q))
    else $error("sample arrived during a finger burst: clock too slow for N_FINGERS");
  assert property (@(posedge clk) disable iff (!rst_n) !(cfg_we && burst_q))
    else $error("finger configured during a burst");

endmodule
