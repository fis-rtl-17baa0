// wl_counter: counter workload for fault injection.
//
// An 8-bit counter. The wire from the count register to its loads (the
// incrementer and the output) is the instrumented net: it leaves on tap_o and
// comes back, possibly faulty, on tap_i. The register itself is never
// written by the injector, but while a fault is applied the incrementer sees
// the faulty count, so the error is stored on the next clock as it would be
// in the real circuit. The document names this workload; its width and the
// instrumented net are this design's choice.
//
// Timing: counts by one per clock when en is high; y = tap_i (combinational).
module wl_counter (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  output logic [7:0] tap_o,
  input  logic [7:0] tap_i,
  output logic [7:0] y
);

  logic [7:0] cnt_q;

  always_ff @(posedge clk) begin
    if (!rst_n)  cnt_q <= '0;
    else if (en) cnt_q <= tap_i + 8'd1;
  end

  assign tap_o = cnt_q;
  assign y     = tap_i;

endmodule
