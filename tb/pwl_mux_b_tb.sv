// pwl_mux_b_tb: every input of the Reg.B-side operand multiplexer with
// random data, including the fraction view Reg.B[22:3] and the 8-bit RAM
// word.
module pwl_mux_b_tb;
  import pwl_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  mux_b_sel_e sel;
  logic [ACC_W-1:0] regb, y, e;
  logic [ADR_W-1:0] rsx;
  logic [C_W-1:0] ram;
  pwl_mux_b dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    for (int n = 0; n < 400; n++) begin
      regb = ACC_W'($urandom); rsx = ADR_W'($urandom); ram = C_W'($urandom);
      sel = mux_b_sel_e'(n % 4); #1;
      case (n % 4)
        0: e = {8'b0, regb[22:3]};
        1: e = regb;
        2: e = {4'b0, rsx};
        default: e = {20'b0, ram};
      endcase
      check(y == e, $sformatf("sel %0d: %h expected %h", n % 4, y, e));
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
