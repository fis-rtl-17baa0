// tb_mbu_statistics: bit-position statistics of the LFSR fault model.
//
// Generates 1,000,000 single-bit lane faults (250,000 words of four lanes)
// with the 32-bit fault generator, sequenced as the controller does (8 LFSR
// shifts, then capture) with the seed loaded only once, and counts how often
// each bit position of a lane is hit. Every lane fault must have exactly one
// bit set, and each of the 8 positions must take between 6 % and 20 % of the
// faults, a near-uniform spread. A second run with raw random words
// (upset count 0) counts the share of lane faults with more than one bit.
// The percentages are printed.
module tb_mbu_statistics;
  localparam int L = 4, W = 8;
  localparam int WORDS = 250000;
  logic clk = 0, rst_n = 0, load = 0, step = 0, capture = 0, shift = 0, manual = 0;
  logic [2:0] upset_count = 3'd1;
  logic [L*W-1:0] seed = 32'h8155_2C03, taps = {L{8'h60}}, manual_word = '0, fault_word;
  logic [L-1:0] serial_out;
  int checks = 0, failures = 0;

  fis_fault_injector32 #(.LANES(L), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic one_word();
    step <= 1; repeat (W) @(posedge clk); step <= 0;
    capture <= 1; @(posedge clk); capture <= 0;
    #1;
  endtask

  initial begin
    longint pos [W];
    longint bad, multi, total;
    bad = 0;
    multi = 0;
    foreach (pos[i]) pos[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    load <= 1; @(posedge clk); load <= 0;
    for (int n = 0; n < WORDS; n++) begin
      one_word();
      for (int j = 0; j < L; j++) begin
        automatic logic [W-1:0] b = fault_word[j*W +: W];
        if ($countones(b) != 1) bad++;
        for (int i = 0; i < W; i++) if (b[i]) pos[i]++;
      end
    end
    total = longint'(WORDS) * L;
    check(bad == 0, $sformatf("%0d lane faults without exactly one bit", bad));
    for (int i = 0; i < W; i++) begin
      $display("bit %0d hit in %0.1f %% of single-bit faults", i, 100.0 * real'(pos[i]) / real'(total));
      check(pos[i] * 100 >= total * 6 && pos[i] * 100 <= total * 20, $sformatf("bit %0d share", i));
    end
    // raw random words
    upset_count <= 3'd0;
    load <= 1; @(posedge clk); load <= 0;
    for (int n = 0; n < WORDS / 10; n++) begin
      one_word();
      for (int j = 0; j < L; j++) if ($countones(fault_word[j*W +: W]) > 1) multi++;
    end
    $display("random-value faults: %0.1f %% of lane faults have more than one bit",
             100.0 * real'(multi) / real'(WORDS / 10 * L));
    check(multi > 0, "random words give multi-bit faults");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
