// pwl_ctrl_tb: test of the control unit on its own.
//
// The testbench plays CNT (a counter driven by cnt_clr/cnt_inc) and the ALU
// comparison flag (random), and checks the control sequence of two
// operations: 18 accepted bytes with input writes to Reg.1..Reg.6 carrying
// CNT; the 12 compare-switch pairs in the order
// (2,3)(5,6)(1,3)(4,6)(1,2)(4,5)(3,6)(1,4)(2,5)(3,5)(2,4)(3,4), three cycles
// each, switching exactly when the flag was high; 36 sorting and 59
// evaluation cycles; the differences taken in order (Reg.2-Reg.1 ...
// Reg.6-Reg.5) before 1 - Reg.6; seven RAM reads and seven writes to Reg.7; six S
// turn-offs reading Reg.1..Reg.6 in order; and a one-cycle done.
module pwl_ctrl_tb;
  import pwl_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             in_valid, in_ready, sr_shift, cnt_clr, cnt_inc, vrt_wr;
  logic [IDX_W-1:0] cnt;
  logic [IDX_W-1:0] ra_idx, rb_idx, wa_idx, wb_idx;
  logic             wa_en, wb_en, rega_ld, rega_clr, regb_ld, rout_ld;
  sel_src_e         sel;
  mux_a_sel_e       mux_a_sel;
  mux_b_sel_e       mux_b_sel;
  alu_op_e          alu_op;
  logic             alu_gt, rsx_set, rsx_clr, ram_rd, done, swap;
  phase_e           phase;

  pwl_ctrl dut (.*);

  always_ff @(posedge clk)
    if (!rst_n || cnt_clr) cnt <= '0;
    else if (cnt_inc)      cnt <= cnt + 1'b1;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int pi [12] = '{2, 5, 1, 4, 1, 4, 3, 1, 2, 3, 2, 3};
  int pj [12] = '{3, 6, 3, 6, 2, 5, 6, 4, 5, 5, 4, 4};

  int nsub;
  int nbytes, nwr_in, npair, sortc, evalc, nrd, nacc, nrsx, ndone, nswap_ok;
  bit last_gt, in_cmp;
  int cur_i, cur_j;

  always @(posedge clk) if (rst_n) begin
    if (sr_shift) nbytes++;
    if (phase == PH_INPUT && wa_en) begin
      nwr_in++;
      check(sel == SEL_INPUT && wa_idx == IDX_W'(nwr_in) && cnt == IDX_W'(nwr_in) && vrt_wr,
            $sformatf("input write %0d to Reg.%0d", nwr_in, wa_idx));
    end
    if (phase == PH_SORT) begin
      sortc++;
      if (rega_ld && regb_ld) begin
        check(npair < 12 && ra_idx == IDX_W'(pi[npair]) && rb_idx == IDX_W'(pj[npair]),
              $sformatf("pair %0d is (%0d,%0d)", npair, ra_idx, rb_idx));
        cur_i = pi[npair]; cur_j = pj[npair];
        npair++;
      end
      if (alu_op == ALU_CMP) begin
        last_gt = alu_gt;
        in_cmp = 1;
      end else if (in_cmp) begin
        in_cmp = 0;
        check(wa_en == last_gt && wb_en == last_gt && swap == last_gt,
              "switch exactly when Reg.A > Reg.B");
        if (last_gt) begin
          check(wa_idx == IDX_W'(cur_j) && wb_idx == IDX_W'(cur_i) && sel == SEL_REGA,
                "switch writes Reg.A to Reg.j and Reg.B to Reg.i");
          nswap_ok++;
        end
      end
    end
    if (phase == PH_EVAL) begin
      evalc++;
      if (ram_rd) nrd++;
      if (rega_ld && regb_ld && sel == SEL_RF) begin
        check(ra_idx == IDX_W'(nsub + 2) && rb_idx == IDX_W'(nsub + 1),
              $sformatf("mu load %0d reads (Reg.%0d, Reg.%0d)", nsub, ra_idx, rb_idx));
      end
      if (alu_op == ALU_SUB) nsub++;
      if (alu_op == ALU_SUB1)
        check(nsub == 5 && nrsx == 6, $sformatf("1 - x_s6 after %0d subtractions", nsub));
      if (wa_en && wa_idx == IDX_W'(ACC_IDX)) nacc++;
      if (rsx_clr) begin
        nrsx++;
        check(ra_idx == IDX_W'(nrsx), $sformatf("turn-off %0d reads Reg.%0d", nrsx, ra_idx));
      end
    end
    if (done) ndone++;
  end

  initial begin
    in_valid = 1'b0;
    alu_gt   = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int op = 0; op < 2; op++) begin
      nbytes = 0; nwr_in = 0; npair = 0; sortc = 0; evalc = 0; nrd = 0;
      nacc = 0; nrsx = 0; nsub = 0; ndone = 0; nswap_ok = 0;
      in_valid = 1'b1;
      while (!done) begin
        alu_gt = 1'($urandom);
        @(posedge clk); #1;
        if (nbytes == 18) in_valid = 1'b0;
      end
      @(posedge clk); #1;
      check(nbytes == 18, $sformatf("%0d bytes accepted", nbytes));
      check(nwr_in == 6, $sformatf("%0d input writes", nwr_in));
      check(npair == 12, $sformatf("%0d compare-switch operations", npair));
      check(sortc == 36, $sformatf("sorting %0d cycles", sortc));
      check(evalc == 59, $sformatf("evaluation %0d cycles", evalc));
      check(nrd == 7, $sformatf("%0d RAM reads", nrd));
      check(nacc == 7, $sformatf("%0d writes to Reg.7", nacc));
      check(nrsx == 6, $sformatf("%0d turn-offs", nrsx));
      check(ndone == 1, $sformatf("done high %0d cycles", ndone));
      check(nswap_ok > 0, "no switch exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
