// pwl_vrt_tb: writes random nibbles into random VRT fields (indices 0..7,
// only 1..6 exist) and checks the 24-bit register, field 1 most significant.
module pwl_vrt_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic wr;
  logic [2:0] idx;
  logic [3:0] din;
  logic [23:0] v;
  pwl_vrt dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic [23:0] e;
  initial begin
    wr = 0; idx = 0; din = 0;
    @(posedge clk); #1 rst_n = 1;
    e = 0;
    for (int n = 0; n < 400; n++) begin
      wr = 1'($urandom); idx = 3'($urandom); din = 4'($urandom);
      @(posedge clk); #1;
      if (wr && idx >= 1 && idx <= 6) e[4*(6-idx) +: 4] = din;
      check(v == e, $sformatf("vrt %h expected %h", v, e));
    end
    wr = 1;
    for (int i = 1; i <= 6; i++) begin idx = 3'(i); din = 4'(i + 8); @(posedge clk); #1; end
    check(v == 24'h9ABCDE, "fields 1..6 in order");
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
