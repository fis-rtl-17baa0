// fis_lfsr: Fibonacci LFSR with programmable taps, shifting right.
//
// The feedback bit is the XOR of the tapped stages, u = XOR_j b_j S_j. Stages
// are counted from the left: the polynomial term x^i taps stage i, which is
// state bit W-i, so taps[i-1] is the coefficient of x^i. Each step shifts the
// register right and enters u at the MSB. With taps x^7 + x^6 + 1 (the
// default) stages 1..7 run through all 127 nonzero states. The programmable
// tap vector and the right shift follow the document; taking the tap vector
// one bit wider (up to x^8) is this design's choice. A zero state stays zero.
//
// Interface: load (seed -> state) has priority over step; both take effect at
// the rising clock edge. state is the register itself.
module fis_lfsr #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,   // synchronous, active low: state <= 0
  input  logic         load,
  input  logic         step,
  input  logic [W-1:0] seed,
  input  logic [W-1:0] taps,
  output logic [W-1:0] state
);

  logic fb;

  always_comb begin
    fb = 1'b0;
    for (int i = 1; i <= int'(W); i++)
      fb ^= taps[i-1] & state[W-i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n)      state <= '0;
    else if (load)   state <= seed;
    else if (step)   state <= {fb, state[W-1:1]};
  end

endmodule
