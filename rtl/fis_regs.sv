// fis_regs: host register file of the fault injection server.
//
// The host programs the campaign (seed, taps, fault word, upset count, fault
// mode, number of injections, FI Enable hold time and gap) and reads back the
// status, the read-back data register, the injection count and time, the
// classifier counters and the output monitor counters. Word addresses are
// listed in fis_pkg (A_*). Writing A_CTRL with bit 0 set starts a campaign;
// the other CTRL fields are stored. The register map is this design's own;
// the set of programmable quantities follows the document.
//
// Timing: writes take effect at the rising edge where wr is high; start is a
// one-clock pulse in the clock after that edge. rdata is combinational on
// addr. Reset values: seed 0x01 in every lane, taps x^7+x^6+1 in every lane,
// upset count 1, bit-flip mode, one injection, hold 1, gap 0.
module fis_regs
  import fis_pkg::*;
#(
  parameter int unsigned CNT_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr,
  input  logic [4:0]        addr,
  input  logic [31:0]       wdata,
  output logic [31:0]       rdata,
  output fis_cfg_t          cfg,
  output logic              start,
  input  logic              busy,
  input  logic              done,
  input  fis_phase_e        phase,
  input  logic [31:0]       rb_data,
  input  logic [31:0]       inj_done,
  input  logic [15:0]       inj_time,
  input  logic [3:0]        ones [LANES],
  input  logic [CNT_W-1:0]  class_cnt [LFSR_W+1],
  input  logic [CNT_W-1:0]  mismatch_cnt [LANES]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg.seed        <= {LANES{8'h01}};
      cfg.taps        <= {LANES{DEFAULT_TAPS}};
      cfg.manual_word <= '0;
      cfg.manual      <= 1'b0;
      cfg.reseed      <= 1'b0;
      cfg.upset_count <= 3'd1;
      cfg.mode        <= FM_FLIP;
      cfg.num_inj     <= 32'd1;
      cfg.hold        <= 16'd1;
      cfg.gap         <= 16'd0;
      start           <= 1'b0;
    end else begin
      start <= wr && (addr == A_CTRL) && wdata[0];
      if (wr) begin
        unique case (addr)
          A_CTRL: begin
            cfg.reseed      <= wdata[1];
            cfg.manual      <= wdata[2];
            cfg.upset_count <= wdata[6:4];
            cfg.mode        <= fault_mode_e'((wdata[9:8] == 2'd3) ? 2'd0 : wdata[9:8]);
          end
          A_SEED:    cfg.seed        <= wdata;
          A_TAPS:    cfg.taps        <= wdata;
          A_MANUAL:  cfg.manual_word <= wdata;
          A_NUM_INJ: cfg.num_inj     <= wdata;
          A_HOLD:    cfg.hold        <= wdata[15:0];
          A_GAP:     cfg.gap         <= wdata[15:0];
          default: ;
        endcase
      end
    end
  end

  localparam int unsigned CI_W = $clog2(LFSR_W + 1);
  localparam int unsigned MI_W = $clog2(LANES);

  logic [4:0] ci, mi;
  assign ci = addr - A_CLASS0;
  assign mi = addr - A_MISMATCH;

  always_comb begin
    rdata = '0;
    if (addr >= A_CLASS0 && addr <= A_CLASS0 + 5'(LFSR_W))
      rdata = 32'(class_cnt[ci[CI_W-1:0]]);
    else if (addr >= A_MISMATCH && addr < A_MISMATCH + 5'(LANES))
      rdata = 32'(mismatch_cnt[mi[MI_W-1:0]]);
    else begin
      unique case (addr)
        A_CTRL:     rdata = {22'd0, cfg.mode, 1'b0, cfg.upset_count, 1'b0, cfg.manual, cfg.reseed, 1'b0};
        A_STATUS:   rdata = {27'd0, phase, done, busy};
        A_SEED:     rdata = cfg.seed;
        A_TAPS:     rdata = cfg.taps;
        A_MANUAL:   rdata = cfg.manual_word;
        A_NUM_INJ:  rdata = cfg.num_inj;
        A_HOLD:     rdata = {16'd0, cfg.hold};
        A_GAP:      rdata = {16'd0, cfg.gap};
        A_RB_DATA:  rdata = rb_data;
        A_INJ_DONE: rdata = inj_done;
        A_INJ_TIME: rdata = {16'd0, inj_time};
        A_ONES: for (int j = 0; j < int'(LANES); j++) rdata[4*j +: 4] = ones[j];
        default:    rdata = '0;
      endcase
    end
  end

endmodule
