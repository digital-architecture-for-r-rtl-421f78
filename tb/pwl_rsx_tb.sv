// pwl_rsx_tb: turn-on of all S_j and random turn-offs on RSX against a
// model kept here; also the full walk from 0x111111 to 0 in a given order.
module pwl_rsx_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic set_all, clr_en;
  logic [2:0] clr_idx;
  logic [23:0] s;
  pwl_rsx dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic [23:0] e;
  int ord [6] = '{3, 1, 6, 2, 5, 4};
  initial begin
    set_all = 0; clr_en = 0; clr_idx = 0;
    @(posedge clk); #1 rst_n = 1;
    e = 0;
    for (int n = 0; n < 400; n++) begin
      set_all = ($urandom_range(0, 7) == 0); clr_en = 1'($urandom); clr_idx = 3'($urandom);
      @(posedge clk); #1;
      if (set_all) e = 24'h111111;
      else if (clr_en && clr_idx >= 1 && clr_idx <= 6) e[4*(6-clr_idx) +: 4] = 0;
      check(s == e, $sformatf("rsx %h expected %h", s, e));
    end
    set_all = 1; clr_en = 0; @(posedge clk); #1;
    check(s == 24'h111111, "turn-on");
    set_all = 0; clr_en = 1; e = 24'h111111;
    for (int k = 0; k < 6; k++) begin
      clr_idx = 3'(ord[k]); @(posedge clk); #1;
      e[4*(6-ord[k]) +: 4] = 0;
      check(s == e, $sformatf("walk step %0d: %h", k, s));
    end
    check(s == 0, "all off");
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
