// tb_fis_fault_injector32: self-checking testbench for the 32-bit fault
// word generator.
//
// Each round picks random per-lane seeds and one of the table polynomials per
// lane, runs load / 8 steps / capture, and compares the 32-bit fault word
// with a software model of four independent LFSR lanes and the burst mask.
// Every third round uses the manual word instead. The word is then shifted
// out and the four serial outputs are checked, MSB of each lane first.
module tb_fis_fault_injector32;
  localparam int L = 4, W = 8;
  logic clk = 0, rst_n = 0, load = 0, step = 0, capture = 0, shift = 0, manual = 0;
  logic [2:0] upset_count = '0;
  logic [L*W-1:0] seed = '0, taps = '0, manual_word = '0, fault_word;
  logic [L-1:0] serial_out;
  int checks = 0, failures = 0;

  fis_fault_injector32 #(.LANES(L), .W(W)) dut (.*);

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

  logic [W-1:0] polys [6] = '{8'h60, 8'h30, 8'h14, 8'h0c, 8'h06, 8'h03};

  initial begin
    logic [L*W-1:0] exp;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 200; n++) begin
      automatic int k = n % 5;
      for (int j = 0; j < L; j++) begin
        seed[j*W +: W] <= 8'($urandom);
        taps[j*W +: W] <= polys[$urandom % 6];
      end
      manual_word <= $urandom;
      manual      <= (n % 3 == 2);
      upset_count <= 3'(k);
      @(posedge clk);
      load <= 1; @(posedge clk); load <= 0;
      step <= 1; repeat (8) @(posedge clk); step <= 0;
      capture <= 1; @(posedge clk); capture <= 0;
      #1;
      if (manual) exp = manual_word;
      else for (int j = 0; j < L; j++)
        exp[j*W +: W] = ref_mask(sw_lfsr(seed[j*W +: W], taps[j*W +: W], 8), k);
      check(fault_word == exp, $sformatf("round %0d word %h exp %h", n, fault_word, exp));
      for (int b = W-1; b >= 0; b--) begin
        for (int j = 0; j < L; j++)
          check(serial_out[j] == exp[j*W + b], "serial bit");
        shift <= 1; @(posedge clk); #1;
      end
      shift <= 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
