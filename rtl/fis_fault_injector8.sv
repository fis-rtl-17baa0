// fis_fault_injector8: one 8-bit lane of the fault word generator.
//
// A programmable LFSR (fis_lfsr) produces a pseudo-random word; masking logic
// turns it into a fault pattern with a chosen number of upset bits. With
// upset_count = 0 the raw LFSR word is used (a random multi-bit fault). With
// upset_count = K in 1..4 the pattern is a burst of K adjacent ones, wrapping
// around inside the lane, whose lowest bit is at the position given by the
// LFSR's low log2(W) bits, so every bit position is hit about equally often.
// Counts above 4 are treated as 4. The LFSR, its seed/taps, burst errors and
// the 1..4-bit upset counts follow the document; placing the burst with the
// LFSR's low bits is this design's choice.
//
// Timing: load/step drive the LFSR. capture registers the masked pattern
// into the fault register one clock later; shift then moves that register
// left one bit per clock, presenting the MSB on serial_out, so a lane is
// sent MSB first. capture has priority over shift.
module fis_fault_injector8 #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         step,
  input  logic [W-1:0] seed,
  input  logic [W-1:0] taps,
  input  logic [2:0]   upset_count,
  input  logic         capture,
  input  logic         shift,
  output logic [W-1:0] lfsr_state,
  output logic [W-1:0] masked,       // pattern that capture would store
  output logic [W-1:0] fault,        // fault register
  output logic         serial_out
);

  localparam int unsigned MAX_UPSET = 4;

  fis_lfsr #(.W(W)) u_lfsr (
    .clk, .rst_n, .load, .step, .seed, .taps, .state(lfsr_state)
  );

  localparam int unsigned POS_W = $clog2(W);

  // Masking logic: burst of K adjacent bits at an LFSR-chosen position.
  logic [2:0]       k;
  logic [POS_W-1:0] pos;
  logic [2*W-1:0]   burst;

  always_comb begin
    k     = (upset_count > 3'(MAX_UPSET)) ? 3'(MAX_UPSET) : upset_count;
    pos   = lfsr_state[POS_W-1:0];
    burst = (((2*W)'(1) << k) - (2*W)'(1)) << pos;
    if (k == 0) masked = lfsr_state;
    else        masked = burst[W-1:0] | burst[2*W-1:W];
  end

  always_ff @(posedge clk) begin
    if (!rst_n)       fault <= '0;
    else if (capture) fault <= masked;
    else if (shift)   fault <= {fault[W-2:0], 1'b0};
  end

  assign serial_out = fault[W-1];

endmodule
