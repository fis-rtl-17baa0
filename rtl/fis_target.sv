// fis_target: instrumented workloads with output monitor.
//
// Holds the four workload circuits, one per 8-bit lane of the fault word:
// lane 0 the counter, lane 1 the bubble sort, lane 2 the 4-bit adder and
// lane 3 the 4-bit multiplier. Each workload exists twice. The instrumented
// copy sends its eight tapped nets out on net_o (lane-major, net 8j+k) to the
// FI chain and uses what comes back on net_i; the golden copy feeds its nets
// straight back. Both copies get the same stimulus from a free-running 8-bit
// sequence (step 37 per clock). The output monitor compares the two copies'
// outputs every clock and counts, per workload, the clocks where they differ.
// Watching the outputs follows the document; the golden copy, the stimulus
// and the counters are this design's choice.
//
// Timing: restart (synchronous) resets the stimulus and both copies of every
// workload so that they agree again; clear zeroes the counters. wl_out shows
// the instrumented copies' outputs.
module fis_target
  import fis_pkg::*;
#(
  parameter int unsigned CNT_W = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               restart,
  input  logic               clear,
  output logic [31:0]        net_o,
  input  logic [31:0]        net_i,
  output logic [7:0]         wl_out [4],
  output logic [CNT_W-1:0]   mismatch_cnt [4]
);

  logic       wl_rst_n;
  logic [7:0] stim;
  logic [7:0] y_f [4];
  logic [7:0] y_g [4];
  logic [7:0] tap_g [4];
  logic [4:0] add_f, add_g;

  assign wl_rst_n = rst_n && !restart;

  always_ff @(posedge clk) begin
    if (!wl_rst_n) stim <= '0;
    else           stim <= stim + 8'd37;
  end

  // Instrumented copies.
  wl_counter u_cnt_f (.clk, .rst_n(wl_rst_n), .en(1'b1),
                      .tap_o(net_o[7:0]),   .tap_i(net_i[7:0]),   .y(y_f[0]));
  wl_bubble_sort u_bs_f (.clk, .rst_n(wl_rst_n), .d(stim),
                      .tap_o(net_o[15:8]),  .tap_i(net_i[15:8]),  .y(y_f[1]));
  wl_adder4 u_add_f  (.clk, .rst_n(wl_rst_n), .a(stim[3:0]), .b(stim[7:4]),
                      .tap_o(net_o[23:16]), .tap_i(net_i[23:16]), .y(add_f));
  wl_mult4 u_mul_f   (.clk, .rst_n(wl_rst_n), .a(stim[3:0]), .b(stim[7:4]),
                      .tap_o(net_o[31:24]), .tap_i(net_i[31:24]), .y(y_f[3]));
  assign y_f[2] = {3'd0, add_f};

  // Golden copies.
  wl_counter u_cnt_g (.clk, .rst_n(wl_rst_n), .en(1'b1),
                      .tap_o(tap_g[0]), .tap_i(tap_g[0]), .y(y_g[0]));
  wl_bubble_sort u_bs_g (.clk, .rst_n(wl_rst_n), .d(stim),
                      .tap_o(tap_g[1]), .tap_i(tap_g[1]), .y(y_g[1]));
  wl_adder4 u_add_g  (.clk, .rst_n(wl_rst_n), .a(stim[3:0]), .b(stim[7:4]),
                      .tap_o(tap_g[2]), .tap_i(tap_g[2]), .y(add_g));
  wl_mult4 u_mul_g   (.clk, .rst_n(wl_rst_n), .a(stim[3:0]), .b(stim[7:4]),
                      .tap_o(tap_g[3]), .tap_i(tap_g[3]), .y(y_g[3]));
  assign y_g[2] = {3'd0, add_g};

  // Output monitor.
  for (genvar w = 0; w < 4; w++) begin : g_mon
    always_ff @(posedge clk) begin
      if (!rst_n || clear)
        mismatch_cnt[w] <= '0;
      else if (y_f[w] != y_g[w] && mismatch_cnt[w] != '1)
        mismatch_cnt[w] <= mismatch_cnt[w] + 1'b1;
    end
  end

  assign wl_out = y_f;

endmodule
