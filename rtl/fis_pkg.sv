// fis_pkg: types and constants shared by the fault injection server.
//
// The server injects single- and multi-bit upsets into the interconnect of a
// target circuit. A 32-bit fault word (four 8-bit LFSR lanes) is shifted into a
// chain of eight fault injection (FI) elements, each holding one bit of every
// lane, and is applied to the instrumented nets while FI Enable is high.
// Lane count, element count and LFSR width follow the document; the register
// map, the fault-mode encoding and the counter widths are this design's own.
package fis_pkg;

  localparam int unsigned LANES  = 4;   // parallel 8-bit fault injectors
  localparam int unsigned LFSR_W = 8;   // width of one LFSR / one lane
  localparam int unsigned N_FI   = 8;   // FI elements in the chain
  localparam int unsigned WORD_W = LANES * LFSR_W;  // 32-bit fault word

  // Default feedback polynomial x^7 + x^6 + 1: tap vector bit (i-1) is the
  // coefficient of x^i.
  localparam logic [LFSR_W-1:0] DEFAULT_TAPS = 8'b0110_0000;

  // What a set chain bit does to its net while FI Enable is high.
  typedef enum logic [1:0] {
    FM_FLIP = 2'd0,   // bit flip (upset)
    FM_SA0  = 2'd1,   // stuck-at-0
    FM_SA1  = 2'd2    // stuck-at-1
  } fault_mode_e;

  // Campaign configuration, written by the host.
  typedef struct packed {
    logic [WORD_W-1:0] seed;         // one seed byte per lane
    logic [WORD_W-1:0] taps;         // one tap byte per lane
    logic [WORD_W-1:0] manual_word;  // host-given fault word
    logic              manual;       // 1: inject manual_word instead of LFSR data
    logic              reseed;       // 1: reload the seed before every injection
    logic [2:0]        upset_count;  // 0: raw random word, 1..4: bits per lane
    fault_mode_e       mode;
    logic [31:0]       num_inj;      // injections per campaign (0 counts as 1)
    logic [15:0]       hold;         // clocks FI Enable stays high (0 counts as 1)
    logic [15:0]       gap;          // idle clocks between injections
  } fis_cfg_t;

  // Controller phases, visible in the status register.
  typedef enum logic [2:0] {
    PH_IDLE   = 3'd0,
    PH_INIT   = 3'd1,
    PH_WRITE  = 3'd2,
    PH_INJECT = 3'd3,
    PH_GAP    = 3'd4
  } fis_phase_e;

  // Host register word addresses.
  localparam logic [4:0] A_CTRL     = 5'h00;  // W: [0] start, [1] reseed, [2] manual,
                                              //    [6:4] upset count, [9:8] mode; R: same fields
  localparam logic [4:0] A_STATUS   = 5'h01;  // R: [0] busy, [1] done, [4:2] phase
  localparam logic [4:0] A_SEED     = 5'h02;
  localparam logic [4:0] A_TAPS     = 5'h03;
  localparam logic [4:0] A_MANUAL   = 5'h04;
  localparam logic [4:0] A_NUM_INJ  = 5'h05;
  localparam logic [4:0] A_HOLD     = 5'h06;
  localparam logic [4:0] A_GAP      = 5'h07;
  localparam logic [4:0] A_RB_DATA  = 5'h08;  // R: read-back data register
  localparam logic [4:0] A_INJ_DONE = 5'h09;  // R: injections performed
  localparam logic [4:0] A_INJ_TIME = 5'h0A;  // R: clocks from init start to FI Enable
  localparam logic [4:0] A_ONES     = 5'h0B;  // R: ones per lane of last read-back, 4 bits each
  localparam logic [4:0] A_CLASS0   = 5'h10;  // R: 0x10..0x18 lanes seen with 0..8 ones
  localparam logic [4:0] A_MISMATCH = 5'h19;  // R: 0x19..0x1C monitor counters per workload

endpackage
