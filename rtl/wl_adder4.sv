// wl_adder4: 4-bit adder workload for fault injection.
//
// The operands a and b are registered; the wires from the operand registers
// to the adder are the instrumented nets (tap_o = {b_q, a_q}, tap_i returns
// them). The 5-bit sum of the returned operands is registered into y. The
// document names this workload; the instrumented nets are this design's
// choice.
//
// Timing: y is the sum of the operands presented two clocks earlier.
module wl_adder4 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] tap_o,
  input  logic [7:0] tap_i,
  output logic [4:0] y
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
      y   <= {1'b0, tap_i[3:0]} + {1'b0, tap_i[7:4]};
    end
  end

  assign tap_o = {b_q, a_q};

endmodule
