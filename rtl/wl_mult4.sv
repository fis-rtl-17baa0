// wl_mult4: 4-bit multiplier workload for fault injection.
//
// The operands are registered and multiplied; the 8-bit product wire between
// the multiplier and the output register is the instrumented net (tap_o is
// the fault-free product, tap_i the value that is registered into y). The
// document names this workload; the instrumented net is this design's
// choice.
//
// Timing: y is the product of the operands presented two clocks earlier.
module wl_mult4 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] tap_o,
  input  logic [7:0] tap_i,
  output logic [7:0] y
);

  logic [3:0] a_q, b_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
      y   <= '0;
    end else begin
      a_q <= a;
      b_q <= b;
      y   <= tap_i;
    end
  end

  assign tap_o = 8'(a_q) * 8'(b_q);

endmodule
