// pwl_mux_a_tb: every input of the Reg.A-side operand multiplexer with
// random data, including the fraction view Reg.A[22:3].
module pwl_mux_a_tb;
  import pwl_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  mux_a_sel_e sel;
  logic [REG_W-1:0] rega;
  logic [ADR_W-1:0] vrt;
  logic [ACC_W-1:0] rout, y, e;
  pwl_mux_a dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    for (int n = 0; n < 400; n++) begin
      rega = REG_W'($urandom); vrt = ADR_W'($urandom); rout = ACC_W'($urandom);
      sel = mux_a_sel_e'(n % 4); #1;
      case (n % 4)
        0: e = {8'b0, rega[22:3]};
        1: e = {5'b0, rega};
        2: e = {4'b0, vrt};
        default: e = rout;
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
