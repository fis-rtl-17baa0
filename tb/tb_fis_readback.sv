// tb_fis_readback: self-checking testbench for the read-back register and
// classifier.
//
// Random chain words with a chosen number of ones per lane are captured; the
// data register and per-lane ones must match, and the nine class counters
// must match a histogram kept here. A clear in the middle must zero them,
// and a clock without capture must change nothing.
module tb_fis_readback;
  localparam int L = 4, W = 8, CW = 32;
  logic clk = 0, rst_n = 0, clear = 0, capture = 0;
  logic [L*W-1:0] chain_data = '0, data_reg;
  logic [3:0] ones [L];
  logic [CW-1:0] class_cnt [W+1];
  int checks = 0, failures = 0;
  int hist [W+1];

  fis_readback #(.LANES(L), .W(W), .CNT_W(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [W-1:0] byte_with(int k);
    logic [W-1:0] b = '0;
    while ($countones(b) < k) b[$urandom % W] = 1'b1;
    return b;
  endfunction

  initial begin
    int c [L];
    logic [L*W-1:0] last;
    foreach (hist[i]) hist[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 1000; n++) begin
      if (n == 500) begin
        clear <= 1; @(posedge clk); clear <= 0; #1;
        foreach (hist[i]) hist[i] = 0;
        foreach (hist[i]) check(class_cnt[i] == 0, "clear");
      end
      for (int j = 0; j < L; j++) begin
        c[j] = $urandom % (W + 1);
        chain_data[j*W +: W] <= byte_with(c[j]);
      end
      capture <= 1;
      @(posedge clk);
      capture <= 0;
      #1;
      for (int j = 0; j < L; j++) begin
        hist[c[j]]++;
        check(ones[j] == 4'(c[j]), "ones per lane");
      end
      check(data_reg == chain_data, "data register");
      foreach (hist[i]) check(class_cnt[i] == CW'(hist[i]), $sformatf("class %0d cnt %0d exp %0d", i, class_cnt[i], hist[i]));
      last = data_reg;
      chain_data <= $urandom;
      @(posedge clk); #1;
      check(data_reg == last, "hold without capture");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
