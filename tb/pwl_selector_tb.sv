// pwl_selector_tb: every source of the Selector with random data; checks
// both outputs, with 23-bit sources zero-extended to the register file.
module pwl_selector_tb;
  import pwl_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  sel_src_e sel;
  logic [REG_W-1:0] in_word, rf_data, rega, to_rega;
  logic [ACC_W-1:0] rout, to_rf;
  pwl_selector dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic [ACC_W-1:0] e;
  initial begin
    for (int n = 0; n < 400; n++) begin
      in_word = REG_W'($urandom); rf_data = REG_W'($urandom);
      rega = REG_W'($urandom); rout = ACC_W'($urandom);
      sel = sel_src_e'(n % 4); #1;
      case (n % 4)
        0: e = {5'b0, in_word};
        1: e = {5'b0, rf_data};
        2: e = rout;
        default: e = {5'b0, rega};
      endcase
      check(to_rf == e && to_rega == e[REG_W-1:0], $sformatf("sel %0d", n % 4));
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
