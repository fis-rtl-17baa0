// tb_fis_fault_injector8: self-checking testbench for one fault injector lane.
//
// Runs many injections with random seeds and the default polynomial: the LFSR
// is loaded, stepped 8 times, and the masked pattern captured, as the
// controller does. The captured pattern is compared with a reference mask
// computed here from a software LFSR: a burst of K adjacent ones placed by the LFSR low bits
// for K = 1..4 (clamped above 4), the raw word for K = 0. Then the fault register is shifted out
// and the serial bits are checked MSB first.
module tb_fis_fault_injector8;
  localparam int W = 8;
  logic clk = 0, rst_n = 0, load = 0, step = 0, capture = 0, shift = 0;
  logic [W-1:0] seed = '0, taps = 8'b0110_0000;
  logic [2:0] upset_count = '0;
  logic [W-1:0] lfsr_state, masked, fault;
  logic serial_out;
  int checks = 0, failures = 0;

  fis_fault_injector8 #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [W-1:0] sw_lfsr(logic [W-1:0] s, logic [W-1:0] tp, int n);
    for (int k = 0; k < n; k++) begin
      logic u = 0;
      for (int i = 0; i < W; i++) if (tp[i]) u ^= s[W-1-i];
      s = {u, s[W-1:1]};
    end
    return s;
  endfunction

  function automatic logic [W-1:0] ref_mask(logic [W-1:0] r, int k);
    logic [W-1:0] m = '0;
    int p = int'(r) % W;
    if (k > 4) k = 4;
    if (k == 0) return r;
    for (int i = 0; i < k; i++) m[(p + i) % W] = 1'b1;
    return m;
  endfunction

  initial begin
    logic [W-1:0] exp;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 400; n++) begin
      automatic int k = n % 8;
      seed        <= (n % 50 == 7) ? 8'h00 : 8'($urandom);
      upset_count <= 3'(k);
      @(posedge clk);
      load <= 1; @(posedge clk); load <= 0;
      step <= 1; repeat (8) @(posedge clk); step <= 0;
      capture <= 1; @(posedge clk); capture <= 0;
      #1;
      exp = ref_mask(sw_lfsr(seed, taps, 8), k);
      check(fault == exp, $sformatf("seed %h k %0d fault %b exp %b", seed, k, fault, exp));
      if (k >= 1) check($countones(fault) == ((k > 4) ? 4 : k), "exact upset count");
      for (int b = W-1; b >= 0; b--) begin
        check(serial_out == exp[b], "serial bit");
        shift <= 1; @(posedge clk); #1;
      end
      shift <= 0;
      check(fault == 0, "register empty after shifting out");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
