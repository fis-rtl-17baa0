// tb_fis_lfsr: self-checking testbench for the programmable LFSR.
//
// For each feedback polynomial of degree 2..8 listed below (x^7+x^6+1, the
// default, and the smaller ones of the same family) the LFSR is seeded and
// stepped; each state is compared with a reference model that keeps the
// stages as a separate array, and the period of the stages 1..n is checked to
// be the maximal 2^n - 1. It also checks that load wins over step and that a
// clock without load or step holds the state.
module tb_fis_lfsr;
  localparam int W = 8;
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic [W-1:0] seed = '0, taps = '0, state;
  int checks = 0, failures = 0;

  fis_lfsr #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Reference: stages s[1..W], s[1] leftmost, feedback XOR of tapped stages.
  function automatic logic [W-1:0] ref_step(logic [W-1:0] st, logic [W-1:0] tp);
    logic s [1:W];
    logic u;
    logic [W-1:0] r;
    for (int i = 1; i <= W; i++) s[i] = st[W-i];
    u = 0;
    for (int i = 1; i <= W; i++) if (tp[i-1]) u = u ^ s[i];
    for (int i = W; i >= 2; i--) s[i] = s[i-1];
    s[1] = u;
    for (int i = 1; i <= W; i++) r[W-i] = s[i];
    return r;
  endfunction

  int deg [7] = '{7, 6, 5, 4, 3, 2, 8};
  logic [W-1:0] tp_list [7] = '{8'b0110_0000, 8'b0011_0000, 8'b0001_0100,
                                8'b0000_1100, 8'b0000_0110, 8'b0000_0011,
                                8'b1011_1000};  // x^8+x^6+x^5+x^4+1

  initial begin
    logic [W-1:0] exp, first;
    int n, period;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int p = 0; p < 7; p++) begin
      n = deg[p];
      taps <= tp_list[p];
      seed <= 8'h80 | 8'(p);
      load <= 1; step <= 1;          // load must win over step
      @(posedge clk);
      load <= 0; step <= 0;
      @(posedge clk);
      check(state == (8'h80 | 8'(p)), "load has priority over step");
      @(posedge clk);
      check(state == (8'h80 | 8'(p)), "state held without step");
      exp    = state;
      first  = state;
      period = 0;
      step <= 1;
      for (int k = 1; k <= 300; k++) begin
        @(posedge clk);
        #1;
        exp = ref_step(exp, tp_list[p]);
        check(state == exp, $sformatf("poly %0d step %0d state %h exp %h", p, k, state, exp));
        if (period == 0 && k > 0 &&
            (state >> (W - n)) == (first >> (W - n)) && k >= n) period = k;
        if (period != 0 && k > period + 2) break;
      end
      step <= 0;
      check(period == (1 << n) - 1, $sformatf("degree %0d period %0d", n, period));
    end
    // zero seed stays zero
    seed <= '0; load <= 1; @(posedge clk); load <= 0; step <= 1;
    repeat (5) @(posedge clk);
    #1 check(state == 0, "zero state stays zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
