// Sample-slot register of one parallel correlation engine.
//
// The receiver numbers the N_SPC samples of every chip 0..N_SPC-1 (the sample
// slots).  This 8-bit register captures the incoming I/Q sample whenever its
// slot number equals the slot assigned to the engine by the multipath
// tracker, i.e. once per chip, and holds it until the next chip.  This is the
// whole stream buffer of the SRAM-less receiver: one register per engine.
//
// Timing: a sample presented with sample_valid in cycle n and phase == slot
// is on `q` from cycle n+1, and `captured` pulses in cycle n+1.  `en` low
// (power down) blocks the capture.
module rake_slot_register
  import rake_pkg::*;
#(
  parameter int SPC = N_SPC
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic                   sample_valid,
  input  iq_sample_t             sample,
  input  logic [$clog2(SPC)-1:0] phase,
  input  logic [$clog2(SPC)-1:0] slot,
  output iq_sample_t             q,
  output logic                   captured
);

  logic hit;
  assign hit = en && sample_valid && (phase == slot);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q        <= '0;
      captured <= 1'b0;
    end else begin
      captured <= hit;
      if (hit) q <= sample;
    end
  end

endmodule
