// tb_fis_target: self-checking testbench for the instrumented workloads and
// output monitor.
//
// The instrumented nets come back as net_o XOR a fault mask that is random in
// short bursts and zero otherwise. A cycle model kept here (stimulus, counter,
// adder, multiplier and sort, fault-free and faulty) predicts every clock the
// four workload outputs and whether each differs from its fault-free copy;
// wl_out and the four mismatch counters are compared with it. A restart in
// the middle must bring the copies back in step and clear the counters.
module tb_fis_target;
  logic clk = 0, rst_n = 0, restart = 0, clear;
  logic [31:0] net_o, net_i, f = '0;
  logic [7:0] wl_out [4];
  logic [31:0] mismatch_cnt [4];
  int checks = 0, failures = 0;

  fis_target dut (.*);
  assign net_i = net_o ^ f;
  assign clear = restart;

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

  function automatic logic [7:0] srt(logic [7:0] x);
    int c [4] = '{0, 0, 0, 0};
    int k = 0;
    logic [7:0] r = '0;
    for (int i = 0; i < 4; i++) c[x[2*i +: 2]]++;
    for (int v = 0; v < 4; v++) repeat (c[v]) begin r[2*k +: 2] = 2'(v); k++; end
    return r;
  endfunction

  function automatic logic [7:0] add(logic [7:0] x);
    return 8'(x[3:0]) + 8'(x[7:4]);
  endfunction

  function automatic logic [7:0] mul(logic [7:0] x);
    return 8'(x[3:0]) * 8'(x[7:4]);
  endfunction

  // cycle model
  logic [7:0] stim, stim_q, cf, cg, yf [4], yg [4];
  int mm [4];
  bit model_on = 0;

  task automatic model_reset();
    stim = 0; stim_q = 0; cf = 0; cg = 0;
    for (int w = 0; w < 4; w++) begin yf[w] = 0; yg[w] = 0; mm[w] = 0; end
  endtask

  always @(posedge clk) if (model_on) begin
    logic [7:0] y0f;
    if (restart) model_reset();
    else begin
      y0f = cf ^ f[7:0];
      yf[0] = y0f; yg[0] = cg;
      check(wl_out[0] == y0f && wl_out[1] == yf[1] && wl_out[2] == yf[2] && wl_out[3] == yf[3],
            "workload outputs");
      for (int w = 0; w < 4; w++) if (yf[w] != yg[w]) mm[w]++;
      cf = y0f + 8'd1;
      cg = cg + 8'd1;
      yf[1] = srt(stim_q ^ f[15:8]);  yg[1] = srt(stim_q);
      yf[2] = add(stim_q ^ f[23:16]); yg[2] = add(stim_q);
      yf[3] = mul(stim_q) ^ f[31:24]; yg[3] = mul(stim_q);
      stim_q = stim;
      stim = stim + 8'd37;
    end
  end

  initial begin
    int seen [4] = '{0, 0, 0, 0};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    restart = 1; model_on = 1;
    @(negedge clk);
    restart = 0;
    for (int n = 0; n < 4000; n++) begin
      if (n == 2000) begin restart = 1; @(negedge clk); restart = 0; #1;
        for (int w = 0; w < 4; w++) check(mismatch_cnt[w] == 0, "restart clears counters");
      end
      f = ((n % 40) < 2) ? ($urandom & $urandom) : 32'h0;
      @(negedge clk);
      for (int w = 0; w < 4; w++) begin
        check(mismatch_cnt[w] == 32'(mm[w]), $sformatf("workload %0d mismatches %0d exp %0d", w, mismatch_cnt[w], mm[w]));
        if (mm[w] > 0) seen[w] = 1;
      end
    end
    for (int w = 0; w < 4; w++) check(seen[w] == 1, $sformatf("workload %0d never disturbed", w));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
