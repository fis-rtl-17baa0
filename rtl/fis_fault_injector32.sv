// fis_fault_injector32: the 32-bit fault word generator.
//
// Four 8-bit fault injectors (fis_fault_injector8) run in parallel, one per
// lane, each with its own seed and tap byte, all sharing the same controls
// and upset count, as the document describes. Lane j uses bits [8j+7:8j] of
// seed, taps and manual_word. A host-given fault word can replace the LFSR
// data: with manual set, capture stores manual_word instead of the masked
// LFSR patterns (this path, for a designer-defined fault list, is this
// design's choice).
//
// Timing: as fis_fault_injector8. serial_out[j] is the MSB of lane j's fault
// register; fault_word is the four fault registers, lane-major.
module fis_fault_injector32 #(
  parameter int unsigned LANES = fis_pkg::LANES,
  parameter int unsigned W     = fis_pkg::LFSR_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic               step,
  input  logic               capture,
  input  logic               shift,
  input  logic               manual,
  input  logic [2:0]         upset_count,
  input  logic [LANES*W-1:0] seed,
  input  logic [LANES*W-1:0] taps,
  input  logic [LANES*W-1:0] manual_word,
  output logic [LANES*W-1:0] fault_word,
  output logic [LANES-1:0]   serial_out
);

  logic [LANES*W-1:0] lane_fault;

  for (genvar j = 0; j < LANES; j++) begin : g_lane
    logic [W-1:0] lfsr_state, masked;
    logic [W-1:0] r;

    fis_fault_injector8 #(.W(W)) u_inj (
      .clk, .rst_n, .load, .step,
      .seed        (seed[j*W +: W]),
      .taps        (taps[j*W +: W]),
      .upset_count,
      .capture     (capture && !manual),
      .shift       (shift && !manual),
      .lfsr_state,
      .masked,
      .fault       (lane_fault[j*W +: W]),
      .serial_out  ()
    );

    // Manual word register for this lane, shifted like the LFSR path.
    always_ff @(posedge clk) begin
      if (!rst_n)                 r <= '0;
      else if (capture && manual) r <= manual_word[j*W +: W];
      else if (shift && manual)   r <= {r[W-2:0], 1'b0};
    end

    assign fault_word[j*W +: W] = manual ? r : lane_fault[j*W +: W];
    assign serial_out[j]        = fault_word[j*W + W - 1];
  end

endmodule
