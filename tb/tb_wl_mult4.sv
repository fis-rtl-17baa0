// tb_wl_mult4: self-checking testbench for the 4-bit multiplier workload.
//
// Random operands; the product net is looped back with an occasional random
// XOR fault. tap_o must be the product of the registered operands and y the
// (possibly faulty) product registered one clock later.
module tb_wl_mult4;
  logic clk = 0, rst_n = 0;
  logic [3:0] a = '0, b = '0;
  logic [7:0] tap_o, tap_i, f = '0, y;
  int checks = 0, failures = 0;

  wl_mult4 dut (.*);
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
    logic [7:0] p;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      a <= 4'($urandom); b <= 4'($urandom);
      @(posedge clk); #1;
      p = 8'(a) * 8'(b);
      check(tap_o == p, $sformatf("product %0d exp %0d", tap_o, p));
      f = ($urandom % 3 == 0) ? 8'($urandom) : 8'h00;
      @(posedge clk); #1;
      check(y == (p ^ f), "registered product");
      f = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
