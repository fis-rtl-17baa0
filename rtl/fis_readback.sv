// fis_readback: read-back data register and fault classifier.
//
// On capture the chain contents (the fault sequence that was fed into the
// design) are latched into the data register. In the same clock each lane's
// number of ones is counted and the classifier adds one to the counter of
// that size, so class_cnt[c] counts lane injections with c upset bits
// (c = 0..W): single, double, triple, quadruple and larger upsets. ones holds
// the per-lane counts of the last capture. The data register and the
// classification by number of ones follow the document; per-lane classes,
// counter width and saturation are this design's choice.
//
// Timing: data_reg, ones and class_cnt change at the clock edge where capture
// is high; clear zeroes the counters (clear wins over capture).
module fis_readback #(
  parameter int unsigned LANES = 4,
  parameter int unsigned W     = 8,
  parameter int unsigned CNT_W = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  capture,
  input  logic [LANES*W-1:0]    chain_data,
  output logic [LANES*W-1:0]    data_reg,
  output logic [3:0]            ones [LANES],
  output logic [CNT_W-1:0]      class_cnt [W+1]
);

  logic [3:0] ones_d [LANES];

  always_comb begin
    for (int j = 0; j < int'(LANES); j++) begin
      ones_d[j] = '0;
      for (int i = 0; i < int'(W); i++)
        ones_d[j] += 4'(chain_data[j*W + i]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      data_reg <= '0;
      for (int j = 0; j < int'(LANES); j++) ones[j] <= '0;
    end else if (capture) begin
      data_reg <= chain_data;
      for (int j = 0; j < int'(LANES); j++) ones[j] <= ones_d[j];
    end
  end

  for (genvar c = 0; c <= W; c++) begin : g_class
    logic [$clog2(LANES+1)-1:0] hits;
    always_comb begin
      hits = '0;
      for (int j = 0; j < int'(LANES); j++)
        if (ones_d[j] == 4'(c)) hits += 1'b1;
    end
    always_ff @(posedge clk) begin
      if (!rst_n || clear)
        class_cnt[c] <= '0;
      else if (capture) begin
        if (class_cnt[c] > {CNT_W{1'b1}} - CNT_W'(hits))
          class_cnt[c] <= '1;
        else
          class_cnt[c] <= class_cnt[c] + CNT_W'(hits);
      end
    end
  end

endmodule
