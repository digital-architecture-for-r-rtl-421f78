// pwl_cnt_tb: random clear/increment sequences on CNT against a counter
// kept here, including the wrap from 7 to 0 and clear-over-increment.
module pwl_cnt_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic clr, inc;
  logic [2:0] count;
  pwl_cnt dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  int e;
  initial begin
    clr = 0; inc = 0;
    @(posedge clk); #1 rst_n = 1;
    check(count == 0, "reset value");
    e = 0;
    for (int n = 0; n < 400; n++) begin
      clr = ($urandom_range(0, 9) == 0);
      inc = 1'($urandom);
      @(posedge clk); #1;
      if (clr) e = 0; else if (inc) e = (e + 1) % 8;
      check(count == 3'(e), $sformatf("count %0d expected %0d", count, e));
    end
    clr = 0; inc = 1;
    for (int n = 1; n <= 6; n++) begin
      @(posedge clk); #1;
      check(count == 3'((e + n) % 8), "increment run");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
