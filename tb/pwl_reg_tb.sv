// pwl_reg_tb: load, hold and clear of the load-enable register at the
// default 28-bit width, against a model kept here.
module pwl_reg_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic clr, ld;
  logic [27:0] d, q;
  pwl_reg dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic [27:0] e;
  initial begin
    clr = 0; ld = 0; d = 0;
    @(posedge clk); #1 rst_n = 1;
    e = 0;
    for (int n = 0; n < 400; n++) begin
      clr = ($urandom_range(0, 9) == 0); ld = 1'($urandom); d = 28'($urandom);
      @(posedge clk); #1;
      if (clr) e = 0; else if (ld) e = d;
      check(q == e, $sformatf("q %h expected %h", q, e));
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
