// tb_fis_fi_element: self-checking testbench for one FI element.
//
// Random chain inputs, nets, modes and FI Enable values are applied. The
// chain flops must take si only when shift_en is high, and net_o must equal
// net_i with FI Enable low, and net_i flipped, cleared or set where the chain
// bit is one with FI Enable high, for the three fault modes.
module tb_fis_fi_element;
  import fis_pkg::*;
  localparam int L = 4;
  logic clk = 0, rst_n = 0, shift_en = 0, fi_enable = 0;
  logic [L-1:0] si = '0, q, net_i = '0, net_o;
  fault_mode_e mode = FM_FLIP;
  int checks = 0, failures = 0;

  fis_fi_element #(.LANES(L)) dut (.*);

  always #5 clk = ~clk;

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

  initial begin
    logic [L-1:0] qm, exp;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    check(q == 0, "reset clears chain");
    qm = 0;
    for (int n = 0; n < 2000; n++) begin
      si        <= L'($urandom);
      shift_en  <= ($urandom % 2) == 1;
      @(posedge clk); #1;
      if (shift_en) qm = si;
      check(q == qm, "chain flop");
      for (int t = 0; t < 4; t++) begin
        net_i     = L'($urandom);
        fi_enable = ($urandom % 2) == 1;
        mode      = fault_mode_e'($urandom % 3);
        #1;
        if (!fi_enable)          exp = net_i;
        else if (mode == FM_SA0) exp = net_i & ~qm;
        else if (mode == FM_SA1) exp = net_i | qm;
        else                     exp = net_i ^ qm;
        check(net_o == exp, $sformatf("net_o %b exp %b en %0d mode %0d q %b", net_o, exp, fi_enable, mode, qm));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
