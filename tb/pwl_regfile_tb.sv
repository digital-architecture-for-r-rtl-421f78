// pwl_regfile_tb: random traffic on both write ports and both read ports
// of the register file against a model kept here: Reg.1..6 keep 23 bits,
// Reg.7 keeps 28, address 0 reads zero, port 2 wins on the same register.
module pwl_regfile_tb;
  import pwl_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [IDX_W-1:0] ra_idx, rb_idx, wa_idx, wb_idx;
  logic [REG_W-1:0] ra_data;
  logic [ACC_W-1:0] rb_data, wa_data, wb_data, acc;
  logic wa_en, wb_en;
  pwl_regfile dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic [ACC_W-1:0] m [0:7];
  initial begin
    wa_en = 0; wb_en = 0; wa_idx = 0; wb_idx = 0; wa_data = 0; wb_data = 0; ra_idx = 0; rb_idx = 0;
    @(posedge clk); #1 rst_n = 1;
    for (int k = 0; k < 8; k++) m[k] = 0;
    for (int n = 0; n < 1000; n++) begin
      wa_en = 1'($urandom); wb_en = 1'($urandom);
      wa_idx = 3'($urandom); wb_idx = 3'($urandom);
      wa_data = ACC_W'($urandom); wb_data = ACC_W'($urandom);
      @(posedge clk); #1;
      if (wa_en && wa_idx != 0 && !(wb_en && wb_idx == wa_idx))
        m[wa_idx] = (wa_idx == 7) ? wa_data : {5'b0, wa_data[REG_W-1:0]};
      if (wb_en && wb_idx != 0)
        m[wb_idx] = (wb_idx == 7) ? wb_data : {5'b0, wb_data[REG_W-1:0]};
      wa_en = 0; wb_en = 0;
      for (int k = 0; k < 8; k++) begin
        ra_idx = 3'(k); rb_idx = 3'(7 - k); #1;
        check(ra_data == m[k][REG_W-1:0], $sformatf("port 1 Reg.%0d", k));
        check(rb_data == m[7 - k], $sformatf("port 2 Reg.%0d", 7 - k));
      end
      check(acc == m[7], "acc output");
    end
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
