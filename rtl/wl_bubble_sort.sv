// wl_bubble_sort: bubble sort workload for fault injection.
//
// Four 2-bit values (d[1:0] is value 0) are registered and sorted into
// ascending order by a bubble-sort network: three passes of adjacent
// compare-exchange steps (3 + 2 + 1 steps). The wires from the input
// registers to the network are the instrumented nets (tap_o, tap_i). The
// sorted values are registered into y, smallest in y[1:0]. The document names
// this workload; its size is this design's choice, made so that it has eight
// instrumented nets.
//
// Timing: y is the sorted form of the d presented two clocks earlier.
module wl_bubble_sort (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] d,
  output logic [7:0] tap_o,
  input  logic [7:0] tap_i,
  output logic [7:0] y
);

  logic [7:0] d_q;
  logic [7:0] sorted;

  always_comb begin
    logic [1:0] v [4];
    logic [1:0] tmp;
    tmp    = '0;
    sorted = '0;
    for (int i = 0; i < 4; i++) v[i] = tap_i[2*i +: 2];
    for (int pass = 0; pass < 3; pass++)
      for (int i = 0; i < 3 - pass; i++)
        if (v[i] > v[i+1]) begin
          tmp    = v[i];
          v[i]   = v[i+1];
          v[i+1] = tmp;
        end
    for (int i = 0; i < 4; i++) sorted[2*i +: 2] = v[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d_q <= '0;
      y   <= '0;
    end else begin
      d_q <= d;
      y   <= sorted;
    end
  end

  assign tap_o = d_q;

endmodule
