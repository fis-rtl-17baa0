// tb_wl_counter: self-checking testbench for the counter workload.
//
// The instrumented net is looped back, with a random XOR fault on some
// clocks. A model counter that takes the same faulty value checks tap_o,
// y and the effect of the fault being stored on the next clock.
module tb_wl_counter;
  logic clk = 0, rst_n = 0, en = 0;
  logic [7:0] tap_o, tap_i, y, f = '0;
  int checks = 0, failures = 0;

  wl_counter dut (.*);
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
    logic [7:0] m;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    m = 0;
    check(tap_o == 0, "reset");
    for (int n = 0; n < 3000; n++) begin
      en <= ($urandom % 4) != 0;
      f  <= ($urandom % 5 == 0) ? 8'($urandom) : 8'h00;
      #1;
      check(tap_o == m, $sformatf("count %h exp %h", tap_o, m));
      check(y == (m ^ f), "y is the net after the FI elements");
      @(posedge clk);
      if (en) m = (m ^ f) + 8'd1;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
