// pwl_top_tb: end-to-end test of the six-dimensional PWL evaluator at its
// default sizes.
//
// It programs the external RAM model, streams inputs byte by byte (with
// random gaps in in_valid) and compares every result with a reference
// computed here: the fractions are sorted by insertion sort, the weights
// are x_s1, x_s(k+1) - x_s(k), 1 - x_s6, the vertices V + S with S losing the
// coordinate of the smallest remaining fraction, and F = sum weight * c in
// exact integer arithmetic (20 fraction bits). The testbench also checks
// the sequence of RAM addresses, the number of RAM reads per operation
// (7), 18 cycles for the 18 input bytes when in_valid has no gaps (three
// cycles per input), the 36-cycle sorting stage, the 59-cycle evaluation stage and the
// 96 cycles from the last input byte to the result.
//
// Directed cases: the two-dimensional example (x1 = 1.5, x2 = 0.75, other
// inputs 0, vertex values of the 3x3 grid example), giving F = 1.75;
// all fractions zero (mu_0 = 1); equal fractions; already sorted and
// reverse-sorted inputs; integer parts of 15; 20 operations on 8-bit
// inputs (4.4 format, low 16 bits zero). Then random operations, some
// back to back. Each mechanism (a switch taken, a switch not taken, an
// input stall, mu_0 = 1, equal fractions, an address carry, back-to-back
// operations) is counted and must occur at least once.
module pwl_top_tb;
  import pwl_pkg::*;

  localparam int NRAND = 200;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [BYTE_W-1:0] in_data;
  logic              in_valid;
  logic              in_ready;
  logic [ADR_W-1:0]  ram_addr;
  logic              ram_rd;
  logic [C_W-1:0]    ram_rdata;
  logic [ACC_W-1:0]  f_out;
  logic              f_valid;
  phase_e            phase;
  logic              swap;

  pwl_top dut (.*);

  pwl_ram_model #(.ADR_W(ADR_W), .C_W(C_W)) u_ram (
    .clk, .addr(ram_addr), .rd(ram_rd), .rdata(ram_rdata)
  );

  int checks = 0, failures = 0;
  int n_swap = 0, n_noswap = 0, n_stall = 0, n_mu0_one = 0, n_ties = 0;
  int n_carry = 0, n_b2b = 0, n_ops = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- reference model ----------------
  logic [ADR_W-1:0] exp_addr [0:DIM];
  logic [ACC_W-1:0] exp_f;

  function automatic void reference(input logic [X_W-1:0] x [1:DIM]);
    int          idx [1:DIM];
    logic [FN_W-1:0] fr [1:DIM];
    logic [ADR_W-1:0] v, s;
    longint      w, sum, prev;
    bit          carry;
    // V and the fractions
    v = '0;
    for (int i = 1; i <= DIM; i++) begin
      v  = (v << IN_W) | ADR_W'(x[i][X_W-1 -: IN_W]);
      fr[i] = x[i][FN_W-1:0];
      idx[i] = i;
    end
    // insertion sort, ascending fraction, ties by input order
    for (int i = 2; i <= DIM; i++)
      for (int j = i; j > 1; j--)
        if (fr[idx[j-1]] > fr[idx[j]]) begin
          int tmp = idx[j]; idx[j] = idx[j-1]; idx[j-1] = tmp;
        end
    for (int i = 1; i < DIM; i++) if (fr[idx[i]] == fr[idx[i+1]]) n_ties++;
    s = '0;
    for (int i = 1; i <= DIM; i++) s[IN_W*(DIM-i)] = 1'b1;
    sum = 0; prev = 0; carry = 0;
    for (int k = 0; k <= DIM; k++) begin
      exp_addr[k] = v + s;
      if (((v >> IN_W*(DIM-1)) + 1) > 15 && k == 0) carry = 1;
      for (int i = 1; i <= DIM; i++)
        if ((v[IN_W*(DIM-i) +: IN_W] + s[IN_W*(DIM-i) +: IN_W]) > 15) carry = 1;
      if (k < DIM) begin
        w = longint'(fr[idx[k+1]]) - prev;
        prev = longint'(fr[idx[k+1]]);
        s[IN_W*(DIM-idx[k+1])] = 1'b0;
      end else begin
        w = (longint'(1) << FN_W) - prev;
        if (prev == 0) n_mu0_one++;
      end
      sum += w * longint'(u_ram.peek(exp_addr[k]));
    end
    if (carry) n_carry++;
    exp_f = ACC_W'(sum);
  endfunction

  // ---------------- monitors ----------------
  int op_swaps = 0, first_byte_cyc = -1;
  int cyc = 0, sort_cyc = 0, eval_cyc = 0, rd_count = 0, last_byte_cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (phase == PH_SORT) sort_cyc++;
      if (phase == PH_EVAL) eval_cyc++;
      if (swap) begin
        n_swap++;
        op_swaps++;
      end
      if (ram_rd) begin
        if (rd_count <= DIM)
          check(ram_addr == exp_addr[rd_count],
                $sformatf("RAM read %0d at %06h, expected %06h", rd_count, ram_addr, exp_addr[rd_count]));
        rd_count++;
      end
      if (in_valid && in_ready) begin
        if (first_byte_cyc < 0) first_byte_cyc = cyc;
        last_byte_cyc = cyc;
      end
    end
  end

  // ---------------- driver ----------------
  bit gaps = 1'b1;

  task automatic send(input logic [X_W-1:0] x [1:DIM]);
    for (int i = 1; i <= DIM; i++)
      for (int b = 2; b >= 0; b--) begin
        in_data  = x[i][8*b +: 8];
        if (gaps && ($urandom_range(0, 3) == 0)) begin
          in_valid = 1'b0;
          n_stall++;
          @(posedge clk);
          #1;
        end
        in_valid = 1'b1;
        do @(posedge clk); while (!in_ready);
        #1;
      end
    in_valid = 1'b0;
  endtask

  task automatic run_op(input logic [X_W-1:0] x [1:DIM], input string name);
    int t0;
    reference(x);
    sort_cyc = 0; eval_cyc = 0; rd_count = 0; op_swaps = 0; first_byte_cyc = -1;
    send(x);
    while (!f_valid) @(posedge clk);
    t0 = cyc;
    check(f_out == exp_f, $sformatf("%s: F = %07h, expected %07h", name, f_out, exp_f));
    check(sort_cyc == 36, $sformatf("%s: sorting took %0d cycles, expected 36", name, sort_cyc));
    check(eval_cyc == 59, $sformatf("%s: evaluation took %0d cycles, expected 59", name, eval_cyc));
    check(rd_count == DIM + 1, $sformatf("%s: %0d RAM reads, expected 7", name, rd_count));
    check(t0 - last_byte_cyc == 96,
          $sformatf("%s: %0d cycles from last byte to result, expected 96", name, t0 - last_byte_cyc));
    if (!gaps)
      check(last_byte_cyc - first_byte_cyc == 17,
            $sformatf("%s: 18 bytes took %0d cycles without gaps", name, last_byte_cyc - first_byte_cyc + 1));
    n_noswap += NSORT - op_swaps;
    n_ops++;
    #1;
  endtask

  function automatic logic [X_W-1:0] fx(input int ip, input real fr);
    return {IN_W'(ip), FN_W'(longint'(fr * (2.0 ** FN_W)))};
  endfunction

  logic [X_W-1:0] x [1:DIM];

  initial begin
    in_valid = 1'b0;
    in_data  = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;

    // Two-dimensional example: vertex values of the 3x3 grid.
    begin
      static int c2 [0:2][0:2] = '{'{0, 0, 0}, '{2, 1, 2}, '{1, 2, 1}};
      for (int a = 0; a <= 2; a++)
        for (int b = 0; b <= 2; b++)
          u_ram.set(ADR_W'((a << 20) | (b << 16)), C_W'(c2[a][b]));
    end
    x = '{fx(1, 0.5), fx(0, 0.75), 24'h0, 24'h0, 24'h0, 24'h0};
    run_op(x, "2-D example");
    check(f_out == ACC_W'(32'h1C_0000), $sformatf("2-D example: F = %07h, expected 1.75", f_out));
    u_ram.clear();

    // Directed cases
    x = '{24'h300000, 24'h100000, 24'h700000, 24'h000000, 24'h200000, 24'h500000};
    run_op(x, "all fractions zero");
    x = '{24'h2_40000, 24'h5_40000, 24'h1_40000, 24'h0_80000, 24'h3_80000, 24'h4_80000};
    run_op(x, "equal fractions");
    x = '{24'h0_00010, 24'h1_10000, 24'h2_20000, 24'h3_30000, 24'h4_40000, 24'h5_FFFFF};
    run_op(x, "ascending");
    x = '{24'h0_FFFFF, 24'h1_50000, 24'h2_40000, 24'h3_30000, 24'h4_20000, 24'h5_00001};
    run_op(x, "descending");
    x = '{24'hF_12345, 24'hF_54321, 24'hF_ABCDE, 24'hF_00001, 24'hF_FFFFF, 24'hF_80000};
    run_op(x, "integer parts 15");

    // 8-bit inputs (4 integer, 4 fraction bits), left-aligned in the
    // 24-bit word.
    for (int r = 0; r < 20; r++) begin
      for (int i = 1; i <= DIM; i++) x[i] = {8'($urandom), 16'h0};
      run_op(x, $sformatf("8-bit %0d", r));
    end

    // Random operations, the second half back to back without gaps.
    for (int r = 0; r < NRAND; r++) begin
      gaps = (r < NRAND / 2);
      for (int i = 1; i <= DIM; i++) x[i] = X_W'($urandom);
      if (!gaps) n_b2b++;
      run_op(x, $sformatf("random %0d", r));
    end

    check(n_swap > 0,    "no compare-switch took the switch");
    check(n_noswap > 0,  "no compare-switch left the pair in place");
    check(n_stall > 0,   "no input stall");
    check(n_mu0_one > 0, "mu_0 = 1 never occurred");
    check(n_ties > 0,    "equal fractions never occurred");
    check(n_carry > 0,   "no address carry");
    check(n_b2b > 0,     "no back-to-back operations");
    $display("operations=%0d switches=%0d kept=%0d stalls=%0d mu0_one=%0d ties=%0d carries=%0d",
             n_ops, n_swap, n_noswap, n_stall, n_mu0_one, n_ties, n_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
