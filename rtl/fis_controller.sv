// fis_controller: sequencer of a fault injection campaign.
//
// One injection runs through three phases. INIT (10 clocks): the LFSRs are
// loaded with the seed (first injection of a campaign, or every injection
// when cfg.reseed is set), shifted LFSR_W = 8 times, and the masked pattern
// is captured into the fault registers. WRITE (N_FI = 8 clocks): the fault
// word is shifted into the FI chain, one bit per lane per clock. INJECT
// (cfg.hold clocks, at least 1): FI Enable is high and the chain contents are
// captured into the read-back register in its first clock. A campaign makes
// cfg.num_inj injections (at least 1), separated by cfg.gap idle clocks, which
// sets the injection rate. The 10 + 8 = 18 clock injection time follows the
// document; the split of the 10 init clocks, hold, gap and the repeat count
// are this design's reading of it.
//
// Interface: start is a one-clock pulse, ignored while busy. The campaign's
// first INIT clock is the clock after start. inj_time holds the clocks from
// the first INIT clock to the first FI Enable clock of the last injection;
// done stays high from the end of a campaign to the next start. clear_stats
// pulses with start.
module fis_controller
  import fis_pkg::fis_phase_e, fis_pkg::PH_IDLE, fis_pkg::PH_INIT, fis_pkg::PH_WRITE,
         fis_pkg::PH_INJECT, fis_pkg::PH_GAP;
#(
  parameter int unsigned N_FI   = fis_pkg::N_FI,
  parameter int unsigned LFSR_W = fis_pkg::LFSR_W
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        reseed,
  input  logic [31:0] num_inj,
  input  logic [15:0] hold,
  input  logic [15:0] gap,
  output logic        lfsr_load,
  output logic        lfsr_step,
  output logic        inj_capture,
  output logic        shift,
  output logic        fi_enable,
  output logic        rb_capture,
  output logic        clear_stats,
  output logic        busy,
  output logic        done,
  output fis_phase_e  phase,
  output logic [31:0] inj_done,
  output logic [15:0] inj_time
);

  localparam int unsigned INIT_CYC = LFSR_W + 2;   // load, LFSR_W steps, capture

  logic [15:0] t;          // clocks spent in the current phase
  logic [15:0] tm;         // clocks since INIT of the current injection
  logic        first;      // first injection of the campaign
  logic [31:0] target;
  logic [15:0] hold_n;

  assign target = (num_inj == 0) ? 32'd1 : num_inj;
  assign hold_n = (hold == 0) ? 16'd1 : hold;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase    <= PH_IDLE;
      t        <= '0;
      tm       <= '0;
      first    <= 1'b0;
      done     <= 1'b0;
      inj_done <= '0;
      inj_time <= '0;
    end else begin
      t  <= t + 16'd1;
      tm <= tm + 16'd1;
      unique case (phase)
        PH_IDLE: if (start) begin
          phase    <= PH_INIT;
          t        <= '0;
          tm       <= '0;
          first    <= 1'b1;
          done     <= 1'b0;
          inj_done <= '0;
        end
        PH_INIT: if (t == 16'(INIT_CYC - 1)) begin
          phase <= PH_WRITE;
          t     <= '0;
        end
        PH_WRITE: if (t == 16'(N_FI - 1)) begin
          phase <= PH_INJECT;
          t     <= '0;
        end
        PH_INJECT: begin
          if (t == 16'd0) inj_time <= tm;
          if (t == hold_n - 16'd1) begin
            inj_done <= inj_done + 32'd1;
            first    <= 1'b0;
            t        <= '0;
            tm       <= '0;
            if (inj_done + 32'd1 >= target) begin
              phase <= PH_IDLE;
              done  <= 1'b1;
            end else if (gap != 0) begin
              phase <= PH_GAP;
            end else begin
              phase <= PH_INIT;
            end
          end
        end
        PH_GAP: if (t == gap - 16'd1) begin
          phase <= PH_INIT;
          t     <= '0;
          tm    <= '0;
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end

  always_comb begin
    lfsr_load   = (phase == PH_INIT) && (t == 16'd0) && (first || reseed);
    lfsr_step   = (phase == PH_INIT) && (t >= 16'd1) && (t <= 16'(LFSR_W));
    inj_capture = (phase == PH_INIT) && (t == 16'(INIT_CYC - 1));
    shift       = (phase == PH_WRITE);
    fi_enable   = (phase == PH_INJECT);
    rb_capture  = (phase == PH_INJECT) && (t == 16'd0);
    clear_stats = (phase == PH_IDLE) && start;
    busy        = (phase != PH_IDLE);
  end

  // Each injection spends exactly INIT_CYC + N_FI clocks before FI Enable.
  property p_inj_time;
    @(posedge clk) disable iff (!rst_n)
      rb_capture |-> (tm == 16'(INIT_CYC + N_FI));
  endproperty
  a_inj_time: assert property (p_inj_time);

endmodule
