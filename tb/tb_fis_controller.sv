// tb_fis_controller: self-checking testbench for the injection sequencer.
//
// For several campaigns (number of injections, hold, gap, reseed varied) the
// controls are compared clock by clock with a schedule built here: per
// injection 1 load-or-idle clock, 8 LFSR step clocks, 1 capture clock,
// 8 shift clocks, then hold clocks of FI Enable with read-back in the first,
// then gap idle clocks. It checks the 18-clock injection time, the injection
// count, busy/done, and that start is ignored while busy.
module tb_fis_controller;
  import fis_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, reseed = 0;
  logic [31:0] num_inj = 1;
  logic [15:0] hold = 1, gap = 0;
  logic lfsr_load, lfsr_step, inj_capture, shift, fi_enable, rb_capture, clear_stats, busy, done;
  fis_phase_e phase;
  logic [31:0] inj_done;
  logic [15:0] inj_time;
  int checks = 0, failures = 0;

  fis_controller dut (.*);

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

  // expected control vector {load, step, cap, shift, fi, rb}
  typedef logic [5:0] ctl_t;
  ctl_t sched [$];

  task automatic run(int n, int h, int g, bit rs);
    int nn = (n == 0) ? 1 : n;
    int hh = (h == 0) ? 1 : h;
    ctl_t got;
    sched.delete();
    for (int i = 0; i < nn; i++) begin
      sched.push_back({(i == 0 || rs) ? 1'b1 : 1'b0, 5'b0});
      repeat (8) sched.push_back(6'b010000);
      sched.push_back(6'b001000);
      repeat (8) sched.push_back(6'b000100);
      sched.push_back(6'b000011);
      repeat (hh - 1) sched.push_back(6'b000010);
      if (i != nn - 1) repeat (g) sched.push_back(6'b000000);
    end
    num_inj <= 32'(n); hold <= 16'(h); gap <= 16'(g); reseed <= rs;
    @(posedge clk);
    start <= 1;
    #1 check(clear_stats == 1, "clear_stats with start");
    @(posedge clk);
    start <= 0;
    #1;
    for (int c = 0; c < sched.size(); c++) begin
      got = {lfsr_load, lfsr_step, inj_capture, shift, fi_enable, rb_capture};
      check(got == sched[c], $sformatf("clock %0d ctl %b exp %b", c, got, sched[c]));
      check(busy, "busy during campaign");
      if (c == 5) begin start <= 1; @(posedge clk); start <= 0; #1; continue; end
      @(posedge clk); #1;
    end
    check(!busy && done, "done after campaign");
    check(inj_done == 32'(nn), $sformatf("inj_done %0d exp %0d", inj_done, nn));
    check(inj_time == 16'd18, $sformatf("inj_time %0d", inj_time));
    repeat (3) @(posedge clk);
    #1 check(!busy && lfsr_step == 0, "stays idle");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1 check(!busy && !done, "idle after reset");
    run(1, 1, 0, 0);
    run(3, 2, 3, 0);
    run(4, 0, 0, 1);
    run(0, 5, 2, 1);
    run(5, 3, 7, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
