// Flexible Rake receiver without an SRAM stream buffer, with parallel
// correlation engines.
//
// Instead of storing the whole delay spread, every engine keeps only the one
// sample per chip that belongs to its multipath (its sample slot) and reaches
// the right delay by running its own code generator at the matching code
// phase.  Per engine there is a sample-slot register, a code generator whose
// current chip is latched into a code buffer together with the sample, and a
// correlation engine (ALU and integration registers).  Engines not in use are
// powered down with eng_en.  This structure (one register, one code
// generator, one ALU/integrator per engine; three engines) follows the
// design.  How slots are counted and how the searcher loads an engine are
// this design's choices.
//
// Interface: one I/Q sample per sample_valid; a shared counter numbers the
// samples of each chip 0..N_SPC-1 from reset.  cfg_we loads engine cfg_idx
// with a sample slot, a code phase (PN registers and OVSF counter, the code
// chip for the engine's next captured sample) and its OVSF code/spreading
// factor; this also discards the engine's partial symbol.  Each engine
// outputs its symbol dumps (sym_valid pulse, I and Q sums) toward channel
// compensation and combining.
//
// Timing: the sample of chip k is captured in cycle n, despread in cycle n+1
// and, if it is the symbol's last chip, dumped in cycle n+2.
module rake_parallel_rx
  import rake_pkg::*;
#(
  parameter int N_ENG    = 3,
  parameter int SPC      = N_SPC,
  parameter int ACC_BITS = ACC_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       sample_valid,
  input  iq_sample_t                 sample,
  input  logic [N_ENG-1:0]           eng_en,
  input  logic                       cfg_we,
  input  logic [$clog2(N_ENG)-1:0]   cfg_idx,
  input  logic [$clog2(SPC)-1:0]     cfg_slot,
  input  logic [PN_W-1:0]            cfg_x,
  input  logic [PN_W-1:0]            cfg_y,
  input  logic [OVSF_W-1:0]          cfg_cnt,
  input  logic [OVSF_W-1:0]          cfg_code_idx,
  input  logic [3:0]                 cfg_sf_log2,
  output logic [$clog2(SPC)-1:0]     phase,
  output logic [N_ENG-1:0]           sym_valid,
  output logic signed [ACC_BITS-1:0] sym_i [N_ENG],
  output logic signed [ACC_BITS-1:0] sym_q [N_ENG]
);

  localparam int PH_W = $clog2(SPC);

  // slot number of the incoming sample
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            phase <= '0;
    else if (sample_valid) phase <= (int'(phase) == SPC - 1) ? '0 : phase + 1'b1;
  end

  for (genvar e = 0; e < N_ENG; e++) begin : g_eng
    logic              load;
    logic [PH_W-1:0]   slot_q;
    logic [OVSF_W-1:0] code_idx_q;
    logic [3:0]        sf_log2_q;
    logic              hit;
    iq_sample_t        slot_sample;
    logic              captured;
    code_chip_t        chip, code_buf;

    assign load = cfg_we && (int'(cfg_idx) == e);
    assign hit  = eng_en[e] && sample_valid && (phase == slot_q);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        slot_q     <= PH_W'(e % SPC);
        code_idx_q <= '0;
        sf_log2_q  <= 4'd8;
      end else if (load) begin
        slot_q     <= cfg_slot;
        code_idx_q <= cfg_code_idx;
        sf_log2_q  <= cfg_sf_log2;
      end
    end

    rake_slot_register #(.SPC(SPC)) u_slot (
      .clk, .rst_n, .en(eng_en[e]), .sample_valid, .sample, .phase,
      .slot(slot_q), .q(slot_sample), .captured
    );

    // code generator steps once per captured sample
    rake_code_gen u_code (
      .clk, .rst_n, .en(hit), .load,
      .load_x(cfg_x), .load_y(cfg_y), .load_cnt(cfg_cnt),
      .code_idx(code_idx_q), .sf_log2(sf_log2_q), .chip,
      .x_state(), .y_state(), .cnt()
    );

    // code buffer: the chip that belongs to the captured sample
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)   code_buf <= '0;
      else if (hit) code_buf <= chip;
    end

    rake_finger_engine #(.ACC_BITS(ACC_BITS)) u_engine (
      .clk, .rst_n, .en(eng_en[e]), .restart(load),
      .valid(captured && !load), .sample(slot_sample), .code(code_buf),
      .sym_valid(sym_valid[e]), .sym_i(sym_i[e]), .sym_q(sym_q[e])
    );
  end

endmodule
