// fis_fi_element: one fault injection (FI) element of the chain.
//
// The element holds one chain flop per lane. The flops form one stage of the
// fault injection chain: with shift_en they take si at the rising clock edge
// and present their value on q, which feeds the next element. Each flop sits
// beside one instrumented interconnect net. While fi_enable is low the net
// passes unchanged (error-free data); while it is high a net whose chain bit
// is set is replaced by its faulty value: inverted (FM_FLIP), forced to 0
// (FM_SA0) or forced to 1 (FM_SA1). The flip-flops of the target design are
// never written, only the wire between them and their loads is altered.
// The chain flop and the FI Enable multiplexer follow the document; the
// three fault modes and the one-bit-per-lane width are this design's choice.
//
// net_i -> net_o is combinational; the chain is the only state.
module fis_fi_element
  import fis_pkg::fault_mode_e, fis_pkg::FM_SA0, fis_pkg::FM_SA1;
#(
  parameter int unsigned LANES = fis_pkg::LANES
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift_en,
  input  logic [LANES-1:0] si,
  output logic [LANES-1:0] q,
  input  logic             fi_enable,
  input  fault_mode_e      mode,
  input  logic [LANES-1:0] net_i,
  output logic [LANES-1:0] net_o
);

  logic [LANES-1:0] faulty;

  always_ff @(posedge clk) begin
    if (!rst_n)        q <= '0;
    else if (shift_en) q <= si;
  end

  always_comb begin
    unique case (mode)
      FM_SA0:  faulty = net_i & ~q;
      FM_SA1:  faulty = net_i |  q;
      default: faulty = net_i ^  q;
    endcase
    net_o = fi_enable ? faulty : net_i;
  end

endmodule
