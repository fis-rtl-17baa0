// tb_fis_top: end-to-end testbench of the fault injection server.
//
// Runs the top at its default sizes through a series of campaigns written
// over the host port: LFSR faults with 1, 2, 3 and 4 upset bits per lane and
// with raw random words, a host-given fault word, the three fault modes,
// constant (reseeded) and varied seeds, several injections per campaign with
// hold and gap times, and a start written while busy. For every injection it
// checks against a software model: the read-back data register, the per-lane
// ones count and, at the end of each campaign, the class counters, the
// injection count, the 18-clock injection time and the spacing of FI Enable
// pulses (18 + hold + gap clocks; the first one 19 clocks after the start
// write). While FI Enable is high the counter workload's output must show the
// stuck-at faults. Every mechanism must occur at least once.
module tb_fis_top;
  import fis_pkg::*;
  logic clk = 0, rst_n = 0, host_wr = 0;
  logic [4:0] host_addr = '0;
  logic [31:0] host_wdata = '0, host_rdata;
  logic fi_enable_o, irq_done;
  logic [7:0] wl_out [4];
  int checks = 0, failures = 0;

  fis_top dut (.*);

  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc++;

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

  // mechanisms to be seen
  typedef enum int {M_K1, M_K2, M_K3, M_K4, M_RANDOM, M_MANUAL, M_FLIP, M_SA0, M_SA1,
                    M_RESEED, M_VARIED, M_HOLD, M_GAP, M_BUSY_START, M_DET0, M_DET1,
                    M_DET2, M_DET3, M_NUM} mech_e;
  int mech [M_NUM];

  function automatic logic [7:0] sw_lfsr(logic [7:0] s, logic [7:0] tp, int n);
    for (int k = 0; k < n; k++) begin
      logic u = 0;
      for (int i = 0; i < 8; i++) if (tp[i]) u ^= s[7-i];
      s = {u, s[7:1]};
    end
    return s;
  endfunction

  function automatic logic [7:0] ref_mask(logic [7:0] r, int k);
    logic [7:0] m = '0;
    int p = int'(r) % 8;
    if (k > 4) k = 4;
    if (k == 0) return r;
    for (int i = 0; i < k; i++) m[(p + i) % 8] = 1'b1;
    return m;
  endfunction

  task automatic wreg(logic [4:0] a, logic [31:0] d);
    @(negedge clk);
    host_wr = 1; host_addr = a; host_wdata = d;
    @(negedge clk);
    host_wr = 0;
  endtask

  task automatic rreg(logic [4:0] a, output logic [31:0] v);
    @(negedge clk);
    host_addr = a;
    #1 v = host_rdata;
  endtask

  // expected words and monitor
  logic [31:0] exp_q [$];
  int rises [$];
  fault_mode_e cur_mode;
  bit mon_on = 0;
  logic prev_en = 0;
  logic [31:0] cur_word;
  int pend = 0;

  always @(negedge clk) begin
    if (mon_on) begin
      if (pend == 1) begin
        // data register was loaded at the end of the first FI Enable clock
        host_addr = A_RB_DATA;
        #1 check(host_rdata == cur_word, $sformatf("read-back %h exp %h", host_rdata, cur_word));
        host_addr = A_ONES;
        #1;
        for (int j = 0; j < 4; j++)
          check(host_rdata[4*j +: 4] == 4'($countones(cur_word[8*j +: 8])), "ones per lane");
        pend = 0;
      end
      if (fi_enable_o && !prev_en) begin
        rises.push_back(cyc);
        cur_word = exp_q.pop_front();
        pend = 1;
      end
      if (fi_enable_o) begin
        if (cur_mode == FM_SA1) check((wl_out[0] & cur_word[7:0]) == cur_word[7:0], "stuck-at-1 on counter output");
        if (cur_mode == FM_SA0) check((wl_out[0] & cur_word[7:0]) == 8'h00, "stuck-at-0 on counter output");
      end
      prev_en = fi_enable_o;
    end
  end

  int hist [9];

  task automatic campaign(int k, fault_mode_e mode, bit manual, bit reseed,
                          int num, int hold, int gap, bit busy_start);
    logic [31:0] seed, taps, mword, v, ctrl;
    logic [7:0] st [4];
    logic [7:0] polys [6] = '{8'h60, 8'h30, 8'h14, 8'h0c, 8'h06, 8'h03};
    int wcyc, nn, hh;
    int mism [4];
    seed = $urandom; taps = '0; mword = $urandom | 32'h01010101;
    for (int j = 0; j < 4; j++) taps[8*j +: 8] = polys[$urandom % 6];
    nn = (num == 0) ? 1 : num;
    hh = (hold == 0) ? 1 : hold;
    wreg(A_SEED, seed); wreg(A_TAPS, taps); wreg(A_MANUAL, mword);
    wreg(A_NUM_INJ, num); wreg(A_HOLD, hold); wreg(A_GAP, gap);
    foreach (hist[c]) hist[c] = 0;
    exp_q.delete(); rises.delete();
    for (int i = 0; i < nn; i++) begin
      logic [31:0] w;
      for (int j = 0; j < 4; j++) begin
        if (i == 0 || reseed) st[j] = seed[8*j +: 8];
        st[j] = sw_lfsr(st[j], taps[8*j +: 8], 8);
        w[8*j +: 8] = manual ? mword[8*j +: 8] : ref_mask(st[j], k);
      end
      for (int j = 0; j < 4; j++) hist[$countones(w[8*j +: 8])]++;
      exp_q.push_back(w);
    end
    cur_mode = mode;
    ctrl = {22'd0, 2'(mode), 1'b0, 3'(k), 1'b0, manual, reseed, 1'b1};
    mon_on = 1;
    wreg(A_CTRL, ctrl);
    wcyc = cyc;
    // done falls in the clock after the start pulse
    repeat (2) @(negedge clk);
    check(!irq_done, "done cleared by start");
    if (busy_start) begin
      repeat (3) @(negedge clk);
      wreg(A_CTRL, ctrl);
    end
    while (!irq_done) @(negedge clk);
    repeat (2) @(negedge clk);
    mon_on = 0;
    // timing
    check(rises.size() == nn, $sformatf("FI Enable pulses %0d exp %0d", rises.size(), nn));
    if (rises.size() > 0) check(rises[0] - wcyc == 19, $sformatf("first FI Enable after %0d clocks", rises[0] - wcyc));
    for (int i = 1; i < rises.size(); i++)
      check(rises[i] - rises[i-1] == 18 + hh + gap, $sformatf("FI Enable spacing %0d", rises[i] - rises[i-1]));
    rreg(A_INJ_TIME, v);  check(v == 18, $sformatf("injection time %0d", v));
    rreg(A_INJ_DONE, v);  check(v == nn, $sformatf("injections %0d exp %0d", v, nn));
    rreg(A_STATUS, v);    check(v[1:0] == 2'b10, "status done, not busy");
    rreg(A_RB_DATA, v);
    for (int c = 0; c <= 8; c++) begin
      rreg(A_CLASS0 + 5'(c), v);
      check(v == hist[c], $sformatf("class %0d count %0d exp %0d", c, v, hist[c]));
    end
    for (int w = 0; w < 4; w++) begin
      rreg(A_MISMATCH + 5'(w), v);
      mism[w] = v;
      if (v != 0) mech[M_DET0 + w]++;
    end
    // a bit flip on the counter's count net always shows at its output
    if (mode == FM_FLIP) check(mism[0] > 0, "flip on counter detected");
    // bookkeeping of mechanisms
    if (manual) mech[M_MANUAL]++;
    else if (k == 0) mech[M_RANDOM]++;
    else mech[M_K1 + ((k > 4) ? 3 : k - 1)]++;
    mech[M_FLIP + int'(mode)]++;
    if (nn > 1) mech[reseed ? M_RESEED : M_VARIED]++;
    if (hh > 1) mech[M_HOLD]++;
    if (gap > 0 && nn > 1) mech[M_GAP]++;
    if (busy_start) mech[M_BUSY_START]++;
  endtask

  initial begin
    foreach (mech[m]) mech[m] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    campaign(1, FM_FLIP, 0, 0, 4, 1, 0, 0);
    campaign(2, FM_FLIP, 0, 1, 3, 3, 5, 1);
    campaign(3, FM_SA1,  0, 0, 3, 4, 2, 0);
    campaign(4, FM_SA0,  0, 0, 2, 2, 0, 0);
    campaign(0, FM_FLIP, 0, 0, 5, 1, 3, 0);
    campaign(2, FM_FLIP, 1, 0, 2, 2, 1, 0);
    campaign(6, FM_FLIP, 0, 1, 3, 1, 0, 0);
    for (int r = 0; r < 10; r++)
      campaign($urandom % 5, FM_FLIP, 0, r % 2, 1 + $urandom % 6, 1 + $urandom % 4, $urandom % 6, 0);
    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %s seen %0d times", mech_e'(m), mech[m]);
      check(mech[m] > 0, $sformatf("mechanism %s never happened", mech_e'(m)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
