// pwl_alu_tb: random and corner-case test of the ALU's five operations
// against arithmetic written here: compare, subtract, 1 - b, the 21 x 8-bit
// multiply and the 28-bit add (with wrap-around).
module pwl_alu_tb;
  import pwl_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  alu_op_e op;
  logic [ACC_W-1:0] a, b, y;
  logic gt;
  pwl_alu dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  longint ea, eb, ey;
  initial begin
    for (int n = 0; n < 2000; n++) begin
      a = ACC_W'($urandom);
      b = ACC_W'($urandom);
      if (n < 5) begin a = '1; b = '1; end
      ea = longint'(a); eb = longint'(b);
      op = ALU_CMP; #1;
      check(gt == (ea > eb) && y == '0, $sformatf("cmp %h %h", a, b));
      b = (n % 7 == 0) ? a : b; eb = longint'(b); #1;
      check(gt == (ea > eb), "cmp equal operands");
      op = ALU_SUB; #1;
      ey = (ea - eb) & ((longint'(1) << ACC_W) - 1);
      check(y == ACC_W'(ey) && !gt, $sformatf("sub %h %h -> %h", a, b, y));
      op = ALU_SUB1; b = ACC_W'($urandom_range(0, (1 << FN_W) - 1)); eb = longint'(b); #1;
      check(y == ACC_W'((longint'(1) << 20) - eb), $sformatf("1 - %h -> %h", b, y));
      op = ALU_MUL; #1;
      ey = (ea & 64'h1F_FFFF) * (eb & 64'hFF);
      check(y == ACC_W'(ey), $sformatf("mul %h %h -> %h", a, b, y));
      op = ALU_ADD; #1;
      ey = (ea + eb) & ((longint'(1) << ACC_W) - 1);
      check(y == ACC_W'(ey), $sformatf("add %h %h -> %h", a, b, y));
    end
    // largest product: mu = 1.0, c = 255
    op = ALU_MUL; a = ACC_W'(1 << 20); b = 28'd255; #1;
    check(y == ACC_W'(255 << 20), "1.0 * 255");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
