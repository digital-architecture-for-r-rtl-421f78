// pwl_top: evaluator of a six-dimensional continuous piecewise-linear
// function in high-level canonical (HL-CPWL) form, F(X) = sum_i c_i * mu_i,
// over a simplicial partition of the input domain.
//
// X = (x_1..x_6), each 24 bits: 4 integer bits select the unit hypercube
// (its lower corner V is the concatenation of the integer parts) and 20
// fraction bits place X inside it. Sorting the fractions ascending,
// x_s1 <= ... <= x_s6, gives the weights mu = x_s1, x_s2 - x_s1, ...,
// x_s6 - x_s5, 1 - x_s6 and the simplex vertices V + S, where S starts with a
// 1 in every coordinate field and loses the coordinate of the smallest
// remaining fraction after each vertex. The vertex values c_i (8 bits,
// unsigned) sit in an external RAM at address V + S; F(X) is returned as an
// unsigned 28-bit number with 20 fraction bits.
//
// The machine is a small processor (register file, ALU, control unit):
// SR38 -> Reg.1..6 / VRT on input, 12 compare-switch operations on the
// register file, then a 59-cycle microprogram through Reg.A, Reg.B, the two
// operand multiplexers, the ALU and Rout, accumulating into Reg.7.
//
// Interface (all synchronous to clk, active-low synchronous reset):
//   in_data/in_valid/in_ready  bytes of x_1..x_6, most significant byte of
//                              each input first; a byte moves when valid and
//                              ready are both high.
//   ram_addr/ram_rd/ram_rdata  external c_i memory: ram_addr is valid while
//                              ram_rd is high; ram_rdata must hold the
//                              word in the following cycle.
//   f_out/f_valid              F(X), valid in the cycle f_valid is high and
//                              held in Reg.7 until the next operation writes.
//   phase, swap                observation: current stage; a switch taken
//                              in a compare-switch operation.
// Timing per operation: 18 byte cycles, 1 write cycle, 36 sorting cycles,
// 59 evaluation cycles and 1 done cycle.
//
// The block structure, widths and the algorithm follow the architecture
// description; handshakes, encodings and the cycle-level schedule are this
// design's own (see pwl_ctrl). An input with integer part 15 makes V + S
// carry into the next coordinate field, as a plain 24-bit addition does.
module pwl_top
  import pwl_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [BYTE_W-1:0]   in_data,
  input  logic                in_valid,
  output logic                in_ready,
  output logic [ADR_W-1:0]    ram_addr,
  output logic                ram_rd,
  input  logic [C_W-1:0]      ram_rdata,
  output logic [ACC_W-1:0]    f_out,
  output logic                f_valid,
  output phase_e              phase,
  output logic                swap
);

  logic             sr_shift, cnt_clr, cnt_inc, vrt_wr;
  logic [X_W-1:0]   sr_word;
  logic [IDX_W-1:0] cnt;
  logic [ADR_W-1:0] vrt, rsx;
  logic [IDX_W-1:0] ra_idx, rb_idx, wa_idx, wb_idx;
  logic             wa_en, wb_en;
  logic [REG_W-1:0] ra_data;
  logic [ACC_W-1:0] rb_data, acc;
  sel_src_e         sel;
  logic [ACC_W-1:0] sel_to_rf;
  logic [REG_W-1:0] sel_to_rega, rega;
  logic [ACC_W-1:0] regb, rout;
  logic             rega_ld, rega_clr, regb_ld, rout_ld;
  mux_a_sel_e       mux_a_sel;
  mux_b_sel_e       mux_b_sel;
  alu_op_e          alu_op;
  logic [ACC_W-1:0] op_a, op_b, alu_y;
  logic             alu_gt;
  logic             rsx_set, rsx_clr;

  pwl_ctrl u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_ready, .sr_shift, .cnt_clr, .cnt_inc, .cnt, .vrt_wr,
    .ra_idx, .rb_idx, .wa_en, .wa_idx, .wb_en, .wb_idx,
    .sel, .rega_ld, .rega_clr, .regb_ld, .rout_ld,
    .mux_a_sel, .mux_b_sel, .alu_op, .alu_gt,
    .rsx_set, .rsx_clr, .ram_rd,
    .done(f_valid), .phase, .swap
  );

  pwl_sr38 #(.BYTE_W(BYTE_W), .NBYTES(X_W / BYTE_W)) u_sr38 (
    .clk, .rst_n, .shift_en(sr_shift), .din(in_data), .word(sr_word)
  );

  pwl_cnt #(.W(IDX_W)) u_cnt (
    .clk, .rst_n, .clr(cnt_clr), .inc(cnt_inc), .count(cnt)
  );

  pwl_vrt #(.DIM(DIM), .IN_W(IN_W), .IDX_W(IDX_W)) u_vrt (
    .clk, .rst_n, .wr(vrt_wr), .idx(cnt), .din(sr_word[X_W-1 -: IN_W]), .v(vrt)
  );

  pwl_selector u_sel (
    .sel, .in_word({sr_word[FN_W-1:0], cnt}), .rf_data(ra_data), .rout,
    .rega, .to_rf(sel_to_rf), .to_rega(sel_to_rega)
  );

  pwl_regfile #(.NREG(DIM)) u_rf (
    .clk, .rst_n,
    .ra_idx, .ra_data, .rb_idx, .rb_data,
    .wa_en, .wa_idx, .wa_data(sel_to_rf),
    .wb_en, .wb_idx, .wb_data(regb),
    .acc
  );

  pwl_reg #(.W(REG_W)) u_rega (
    .clk, .rst_n, .clr(rega_clr), .ld(rega_ld), .d(sel_to_rega), .q(rega)
  );

  pwl_reg #(.W(ACC_W)) u_regb (
    .clk, .rst_n, .clr(1'b0), .ld(regb_ld), .d(rb_data), .q(regb)
  );

  pwl_rsx #(.DIM(DIM), .IN_W(IN_W), .IDX_W(IDX_W)) u_rsx (
    .clk, .rst_n, .set_all(rsx_set), .clr_en(rsx_clr),
    .clr_idx(ra_data[IDX_W-1:0]), .s(rsx)
  );

  pwl_mux_a u_mux_a (.sel(mux_a_sel), .rega, .vrt, .rout, .y(op_a));
  pwl_mux_b u_mux_b (.sel(mux_b_sel), .regb, .rsx, .ram(ram_rdata), .y(op_b));

  pwl_alu u_alu (.op(alu_op), .a(op_a), .b(op_b), .y(alu_y), .gt(alu_gt));

  pwl_reg #(.W(ACC_W)) u_rout (
    .clk, .rst_n, .clr(1'b0), .ld(rout_ld), .d(alu_y), .q(rout)
  );

  assign ram_addr = rout[ADR_W-1:0];
  assign f_out    = acc;

endmodule
