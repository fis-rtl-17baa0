// tb_wl_bubble_sort: self-checking testbench for the bubble sort workload.
//
// Random sets of four 2-bit values; the input nets are looped back with an
// occasional random XOR fault. y must hold the (possibly faulty) values in
// ascending order, checked by counting each value and testing the order.
module tb_wl_bubble_sort;
  logic clk = 0, rst_n = 0;
  logic [7:0] d = '0, tap_o, tap_i, f = '0, y;
  int checks = 0, failures = 0;

  wl_bubble_sort dut (.*);
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
    logic [7:0] nets, exp;
    int cnt [4];
    int k;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      d <= 8'($urandom);
      @(posedge clk); #1;
      check(tap_o == d, "input register");
      f = ($urandom % 3 == 0) ? 8'($urandom) : 8'h00;
      #1 nets = tap_i;
      // counting sort as the independent reference
      foreach (cnt[v]) cnt[v] = 0;
      for (int i = 0; i < 4; i++) cnt[nets[2*i +: 2]]++;
      k = 0;
      for (int v = 0; v < 4; v++)
        repeat (cnt[v]) begin exp[2*k +: 2] = 2'(v); k++; end
      @(posedge clk); #1;
      check(y == exp, $sformatf("sorted %h exp %h from %h", y, exp, nets));
      f = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
