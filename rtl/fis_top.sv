// fis_top: programmable multi-bit fault injection server with its targets.
//
// The host programs a campaign through the register port (fis_regs). For
// every injection the controller (fis_controller) runs the four parallel
// 8-bit LFSR fault injectors (fis_fault_injector32) for 10 clocks to make a
// 32-bit fault word with the chosen number of upset bits per lane, shifts
// that word into the chain of eight FI elements in 8 clocks (fis_fi_chain),
// and then raises FI Enable, which applies the faults to the instrumented
// interconnect of the target circuits (fis_target) without touching their
// flip-flops. In the first FI Enable clock the chain contents are latched in
// the read-back data register and classified by their number of ones
// (fis_readback); the output monitor counts clocks where an instrumented
// workload's outputs differ from a fault-free copy. The time from start of
// initialization to FI Enable is 18 clocks, as in the document.
//
// Interface: host_wr/host_addr/host_wdata write a register at the clock edge;
// host_rdata is the register at host_addr, combinational. Register map in
// fis_pkg. irq_done is high once a campaign has ended, until the next start.
// All resets are synchronous, active low.
module fis_top
  import fis_pkg::*;
#(
  parameter int unsigned CNT_W = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        host_wr,
  input  logic [4:0]  host_addr,
  input  logic [31:0] host_wdata,
  output logic [31:0] host_rdata,
  output logic        fi_enable_o,
  output logic [7:0]  wl_out [4],
  output logic        irq_done
);

  fis_cfg_t    cfg;
  logic        start;
  logic        lfsr_load, lfsr_step, inj_capture, shift, fi_enable, rb_capture;
  logic        clear_stats, busy, done;
  fis_phase_e  phase;
  logic [31:0] inj_done;
  logic [15:0] inj_time;
  logic [WORD_W-1:0] fault_word, chain_contents, rb_data;
  logic [LANES-1:0]  ser;
  logic [31:0] net_f, net_a;
  logic [3:0]        ones [LANES];
  logic [CNT_W-1:0]  class_cnt [LFSR_W+1];
  logic [CNT_W-1:0]  mismatch_cnt [4];

  fis_regs #(.CNT_W(CNT_W)) u_regs (
    .clk, .rst_n,
    .wr(host_wr), .addr(host_addr), .wdata(host_wdata), .rdata(host_rdata),
    .cfg, .start, .busy, .done, .phase,
    .rb_data, .inj_done, .inj_time, .ones, .class_cnt, .mismatch_cnt
  );

  fis_controller #(.N_FI(N_FI), .LFSR_W(LFSR_W)) u_ctrl (
    .clk, .rst_n, .start,
    .reseed(cfg.reseed), .num_inj(cfg.num_inj), .hold(cfg.hold), .gap(cfg.gap),
    .lfsr_load, .lfsr_step, .inj_capture, .shift, .fi_enable, .rb_capture,
    .clear_stats, .busy, .done, .phase, .inj_done, .inj_time
  );

  fis_fault_injector32 #(.LANES(LANES), .W(LFSR_W)) u_inj (
    .clk, .rst_n,
    .load(lfsr_load), .step(lfsr_step), .capture(inj_capture), .shift,
    .manual(cfg.manual), .upset_count(cfg.upset_count),
    .seed(cfg.seed), .taps(cfg.taps), .manual_word(cfg.manual_word),
    .fault_word, .serial_out(ser)
  );

  fis_fi_chain #(.N_FI(N_FI), .LANES(LANES)) u_chain (
    .clk, .rst_n, .shift_en(shift), .si(ser), .so(),
    .fi_enable, .mode(cfg.mode),
    .net_i(net_f), .net_o(net_a), .contents(chain_contents)
  );

  fis_readback #(.LANES(LANES), .W(LFSR_W), .CNT_W(CNT_W)) u_rb (
    .clk, .rst_n, .clear(clear_stats), .capture(rb_capture),
    .chain_data(chain_contents), .data_reg(rb_data), .ones, .class_cnt
  );

  fis_target #(.CNT_W(CNT_W)) u_tgt (
    .clk, .rst_n, .restart(clear_stats), .clear(clear_stats),
    .net_o(net_f), .net_i(net_a), .wl_out, .mismatch_cnt
  );

  assign fi_enable_o = fi_enable;
  assign irq_done    = done;

endmodule
