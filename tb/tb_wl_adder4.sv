// tb_wl_adder4: self-checking testbench for the 4-bit adder workload.
//
// Random operands; the operand nets are looped back with an occasional random
// XOR fault. y must be the sum of the (possibly faulty) operands two clocks
// after they were presented, and tap_o the registered fault-free operands.
module tb_wl_adder4;
  logic clk = 0, rst_n = 0;
  logic [3:0] a = '0, b = '0;
  logic [7:0] tap_o, tap_i, f = '0;
  logic [4:0] y;
  int checks = 0, failures = 0;

  wl_adder4 dut (.*);
  assign tap_i = tap_o ^ f;

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
    logic [7:0] ops, nets;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      a <= 4'($urandom); b <= 4'($urandom);
      @(posedge clk);
      ops = {b, a};
      #1;
      check(tap_o == ops, "operand register");
      f = ($urandom % 3 == 0) ? 8'($urandom) : 8'h00;
      #1 nets = tap_i;
      @(posedge clk); #1;
      check(y == 5'(nets[3:0]) + 5'(nets[7:4]), $sformatf("sum %0d of %h", y, nets));
      f = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
