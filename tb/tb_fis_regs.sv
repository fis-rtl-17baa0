// tb_fis_regs: self-checking testbench for the host register file.
//
// Checks reset values, writes and read-back of every configuration register,
// the decoding of the control word into the configuration (including the
// reserved mode value 3 read as bit flip), the one-clock start pulse, and the
// read-out of status, read-back data, injection count/time, per-lane ones,
// the nine class counters and the four monitor counters.
module tb_fis_regs;
  import fis_pkg::*;
  logic clk = 0, rst_n = 0, wr = 0;
  logic [4:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  fis_cfg_t cfg;
  logic start, busy = 0, done = 0;
  fis_phase_e phase = PH_IDLE;
  logic [31:0] rb_data = '0, inj_done = '0;
  logic [15:0] inj_time = '0;
  logic [3:0] ones [LANES];
  logic [31:0] class_cnt [LFSR_W+1];
  logic [31:0] mismatch_cnt [LANES];
  int checks = 0, failures = 0;

  fis_regs dut (.*);

  always #5 clk = ~clk;

  int total_starts = 0;
  always @(posedge clk) if (start) total_starts++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wreg(logic [4:0] a, logic [31:0] d);
    wr <= 1; addr <= a; wdata <= d;
    @(posedge clk);
    wr <= 0;
  endtask

  task automatic xreg(logic [4:0] a, logic [31:0] exp, string what);
    addr = a;
    #1;
    check(rdata == exp, $sformatf("%s: read %h exp %h", what, rdata, exp));
  endtask

  initial begin
    int starts;
    foreach (ones[j]) ones[j] = 4'(j + 3);
    foreach (class_cnt[i]) class_cnt[i] = 32'h100 + i;
    foreach (mismatch_cnt[i]) mismatch_cnt[i] = 32'h200 + i;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    check(cfg.seed == 32'h01010101 && cfg.taps == 32'h60606060, "reset seed/taps");
    check(cfg.upset_count == 1 && cfg.mode == FM_FLIP && cfg.num_inj == 1 && cfg.hold == 1 && cfg.gap == 0, "reset config");
    for (int n = 0; n < 50; n++) begin
      logic [31:0] s = $urandom, t = $urandom, m = $urandom, k = $urandom, h = $urandom, g = $urandom;
      wreg(A_SEED, s); wreg(A_TAPS, t); wreg(A_MANUAL, m);
      wreg(A_NUM_INJ, k); wreg(A_HOLD, h); wreg(A_GAP, g);
      #1;
      check(cfg.seed == s && cfg.taps == t && cfg.manual_word == m, "seed/taps/manual cfg");
      check(cfg.num_inj == k && cfg.hold == h[15:0] && cfg.gap == g[15:0], "count/hold/gap cfg");
      xreg(A_SEED, s, "seed"); xreg(A_TAPS, t, "taps"); xreg(A_MANUAL, m, "manual");
      xreg(A_NUM_INJ, k, "count"); xreg(A_HOLD, {16'd0, h[15:0]}, "hold"); xreg(A_GAP, {16'd0, g[15:0]}, "gap");
    end
    // control word without start
    wreg(A_CTRL, 32'h0000_0236);   // mode 2, count 3, manual, reseed
    #1;
    check(cfg.mode == FM_SA1 && cfg.upset_count == 3 && cfg.manual && cfg.reseed, "ctrl decode");
    check(start == 0, "no start without bit 0");
    xreg(A_CTRL, 32'h0000_0236, "ctrl read");
    wreg(A_CTRL, 32'h0000_0300);   // reserved mode 3 -> bit flip
    #1 check(cfg.mode == FM_FLIP && !cfg.manual && !cfg.reseed && cfg.upset_count == 0, "reserved mode");
    // start pulse
    starts = 0;
    fork
      wreg(A_CTRL, 32'h0000_0021);
      repeat (4) begin @(posedge clk); #1 if (start) starts++; end
    join
    check(starts == 1, $sformatf("start pulses %0d", starts));
    // status and results
    busy = 1; done = 0; phase = PH_INJECT; rb_data = 32'hdeadbeef; inj_done = 32'd77; inj_time = 16'd18;
    xreg(A_STATUS, {27'd0, 3'(PH_INJECT), 1'b0, 1'b1}, "status");
    xreg(A_RB_DATA, 32'hdeadbeef, "rb data");
    xreg(A_INJ_DONE, 77, "inj count"); xreg(A_INJ_TIME, 18, "inj time");
    xreg(A_ONES, 32'h0000_6543, "ones");
    for (int i = 0; i <= LFSR_W; i++) xreg(A_CLASS0 + 5'(i), 32'h100 + i, "class counter");
    for (int i = 0; i < LANES; i++) xreg(A_MISMATCH + 5'(i), 32'h200 + i, "mismatch counter");
    xreg(5'h0C, 0, "unused address");
    check(total_starts == 1, $sformatf("start pulses in total %0d", total_starts));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
