// tb_fis_fi_chain: self-checking testbench for the FI chain.
//
// Random 32-bit words are shifted in MSB first per lane over N_FI clocks, as
// the fault injectors send them; afterwards the chain contents must equal the
// word, so must the serial output (the last element) and, with FI Enable
// high in bit-flip mode, net_o must be net_i XOR the word for random nets.
// With FI Enable low net_o must equal net_i. The write must take exactly
// N_FI shift clocks.
module tb_fis_fi_chain;
  import fis_pkg::*;
  localparam int L = 4, N = 8;
  logic clk = 0, rst_n = 0, shift_en = 0, fi_enable = 0;
  logic [L-1:0] si = '0, so;
  logic [L*N-1:0] net_i = '0, net_o, contents;
  fault_mode_e mode = FM_FLIP;
  int checks = 0, failures = 0;

  fis_fi_chain #(.N_FI(N), .LANES(L)) dut (.*);

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

  initial begin
    logic [L*N-1:0] w;
    int shifts;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 300; n++) begin
      w = $urandom;
      shifts = 0;
      for (int b = N-1; b >= 0; b--) begin
        for (int j = 0; j < L; j++) si[j] <= w[j*N + b];
        shift_en <= 1;
        @(posedge clk);
        shifts++;
      end
      shift_en <= 0;
      si <= '0;
      @(posedge clk); #1;
      check(shifts == N, "write takes N_FI clocks");
      check(contents == w, $sformatf("contents %h exp %h", contents, w));
      for (int j = 0; j < L; j++) check(so[j] == w[j*N + N-1], "serial out");
      for (int t = 0; t < 4; t++) begin
        net_i = $urandom;
        fi_enable = 0; #1;
        check(net_o == net_i, "transparent when disabled");
        fi_enable = 1; #1;
        check(net_o == (net_i ^ w), $sformatf("flip net_o %h exp %h", net_o, net_i ^ w));
        mode = FM_SA1; #1;
        check(net_o == (net_i | w), "stuck-at-1");
        mode = FM_FLIP; fi_enable = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
