// pwl_sr38_tb: shifts random bytes through SR38, with and without shift_en,
// and checks that after three shifts the word is the three bytes, first
// byte most significant.
module pwl_sr38_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic shift_en;
  logic [7:0] din;
  logic [23:0] word;
  pwl_sr38 dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic [23:0] exp_w;
  initial begin
    shift_en = 0; din = 0;
    @(posedge clk); #1 rst_n = 1;
    check(word == 0, "reset value");
    exp_w = 0;
    for (int n = 0; n < 300; n++) begin
      shift_en = 1'($urandom);
      din = 8'($urandom);
      @(posedge clk); #1;
      if (shift_en) exp_w = {exp_w[15:0], din};
      check(word == exp_w, $sformatf("word %h expected %h", word, exp_w));
    end
    shift_en = 1;
    din = 8'hA5; @(posedge clk); #1;
    din = 8'h3C; @(posedge clk); #1;
    din = 8'h0F; @(posedge clk); #1;
    check(word == 24'hA53C0F, "three bytes MSB first");
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
