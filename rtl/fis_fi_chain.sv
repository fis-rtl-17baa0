// fis_fi_chain: the fault injection chain of N_FI elements.
//
// N_FI fis_fi_element stages are connected as a shift chain, LANES bits wide:
// element 0 takes si, element k takes the q of element k-1, and so is the q
// of the last element. A lane word sent MSB first over N_FI shifts leaves its
// bit k in element k. Element k guards net k of every lane: the instrumented
// nets are lane-major, net index j*N_FI + k for lane j, bit k, and contents
// uses the same order, so after a write it equals the fault word. Eight
// elements and a write time of one clock per element follow the document.
//
// Timing: one shift per clock while shift_en is high; net_i -> net_o is
// combinational and depends on fi_enable, mode and the chain contents.
module fis_fi_chain
  import fis_pkg::fault_mode_e;
#(
  parameter int unsigned N_FI  = fis_pkg::N_FI,
  parameter int unsigned LANES = fis_pkg::LANES
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  shift_en,
  input  logic [LANES-1:0]      si,
  output logic [LANES-1:0]      so,
  input  logic                  fi_enable,
  input  fault_mode_e           mode,
  input  logic [LANES*N_FI-1:0] net_i,
  output logic [LANES*N_FI-1:0] net_o,
  output logic [LANES*N_FI-1:0] contents
);

  logic [LANES-1:0] stage_q [N_FI];

  for (genvar k = 0; k < N_FI; k++) begin : g_elem
    logic [LANES-1:0] e_in, e_out;

    for (genvar j = 0; j < LANES; j++) begin : g_map
      assign e_in[j]               = net_i[j*N_FI + k];
      assign net_o[j*N_FI + k]     = e_out[j];
      assign contents[j*N_FI + k]  = stage_q[k][j];
    end

    fis_fi_element #(.LANES(LANES)) u_elem (
      .clk, .rst_n, .shift_en,
      .si        ((k == 0) ? si : stage_q[(k == 0) ? 0 : k-1]),
      .q         (stage_q[k]),
      .fi_enable, .mode,
      .net_i     (e_in),
      .net_o     (e_out)
    );
  end

  assign so = stage_q[N_FI-1];

endmodule
