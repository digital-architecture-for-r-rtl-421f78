// pwl_ctrl: the control unit of the evaluator.
//
// One operation runs through three stages:
//  * Data input. in_ready is high until 18 bytes (three per input, six
//    inputs) have been accepted. CNT counts up on the first byte of each
//    input; in the cycle after the third byte the Selector writes
//    {SR38[19:0], CNT} into Reg.CNT and SR38[23:20] into field CNT of VRT.
//    This write overlaps the first byte of the next input, so the stage
//    takes 18 byte cycles plus one.
//  * Sorting. Twelve compare-switch operations in the fixed order of
//    pwl_pkg::sort_pair, each in exactly three cycles: load Reg.i into Reg.A
//    and Reg.j into Reg.B; compare (the ALU flag is latched); if
//    Reg.A > Reg.B write Reg.A into Reg.j and Reg.B into Reg.i. The whole
//    23-bit word is compared, so equal fractions are ordered by index.
//    36 cycles.
//  * Evaluation. Seven terms mu*c are accumulated in Reg.7. Term 1 takes 6
//    cycles (load Reg.1 into Reg.A, VRT+RSX, RAM read, multiply, write
//    Reg.7, turn off S at the index of Reg.1), terms 2-6 take 9 cycles
//    (load Reg.t and Reg.t-1, subtract, load Rout into Reg.A and Reg.7 into
//    Reg.B, VRT+RSX, read, multiply, add, write Reg.7, turn off S), term 7
//    takes 8 (load Reg.6 into Reg.B, 1 - Reg.B, load, VRT+RSX, read,
//    multiply, add, write). 59 cycles.
// Then done is high for one cycle, Reg.7 holds F(X), and the next operation's
// data input starts. The RAM is read with ram_rd in one cycle and its data
// is used in the next (synchronous read, one cycle latency).
//
// The stage order, the three-cycle compare-switch, the twelve-pair order and
// the evaluation steps follow the architecture description. Merging the two
// register loads the description lists one after the other into one cycle
// (two read ports), the overlap of the input write with the next byte, the
// 1-cycle RAM latency and the handshake are this design's choices.
module pwl_ctrl
  import pwl_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // data input
  input  logic             in_valid,
  output logic             in_ready,
  output logic             sr_shift,
  output logic             cnt_clr,
  output logic             cnt_inc,
  input  logic [IDX_W-1:0] cnt,
  output logic             vrt_wr,
  // register file
  output logic [IDX_W-1:0] ra_idx,
  output logic [IDX_W-1:0] rb_idx,
  output logic             wa_en,
  output logic [IDX_W-1:0] wa_idx,
  output logic             wb_en,
  output logic [IDX_W-1:0] wb_idx,
  // datapath
  output sel_src_e         sel,
  output logic             rega_ld,
  output logic             rega_clr,
  output logic             regb_ld,
  output logic             rout_ld,
  output mux_a_sel_e       mux_a_sel,
  output mux_b_sel_e       mux_b_sel,
  output alu_op_e          alu_op,
  input  logic             alu_gt,
  output logic             rsx_set,
  output logic             rsx_clr,
  output logic             ram_rd,
  // status
  output logic             done,
  output phase_e           phase,
  output logic             swap
);

  typedef enum logic [4:0] {
    ST_IN, ST_S_LD, ST_S_CMP, ST_S_SW,
    ST_E_LDA1, ST_L_LD, ST_L_SUB, ST_F_LDB, ST_F_SUB, ST_LD2,
    ST_ADDR, ST_READ, ST_MUL, ST_ADD, ST_WR, ST_RSX, ST_DONE
  } state_e;

  state_e           state;
  logic [4:0]       nbytes;    // bytes accepted in this operation, 0..18
  logic [1:0]       bpos;      // byte position within the current input
  logic             wr_pend;   // SR38 holds a complete input to be written
  logic [3:0]       k;         // compare-switch operation, 0..11
  logic             gt_q;      // latched comparison
  logic [IDX_W-1:0] t;         // evaluation term, 1..7
  cs_pair_t         p;

  localparam logic [4:0] NBYTES_ALL = 5'(3 * DIM);

  assign p        = sort_pair(k);
  assign in_ready = (state == ST_IN) && (nbytes != NBYTES_ALL);
  assign sr_shift = in_valid && in_ready;
  assign cnt_inc  = sr_shift && (bpos == 2'd0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= ST_IN;
      nbytes  <= '0;
      bpos    <= '0;
      wr_pend <= 1'b0;
      k       <= '0;
      gt_q    <= 1'b0;
      t       <= 3'd1;
    end else begin
      if (sr_shift) begin
        nbytes <= nbytes + 5'd1;
        bpos   <= (bpos == 2'd2) ? 2'd0 : bpos + 2'd1;
      end
      if (state == ST_IN) wr_pend <= sr_shift && (bpos == 2'd2);
      if (state == ST_S_CMP) gt_q <= alu_gt;
      unique case (state)
        ST_IN:
          if (wr_pend && cnt == IDX_W'(DIM)) begin
            state <= ST_S_LD;
            k     <= '0;
          end
        ST_S_LD:  state <= ST_S_CMP;
        ST_S_CMP: state <= ST_S_SW;
        ST_S_SW:
          if (k == 4'(NSORT - 1)) begin
            state <= ST_E_LDA1;
            t     <= 3'd1;
          end else begin
            state <= ST_S_LD;
            k     <= k + 4'd1;
          end
        ST_E_LDA1: state <= ST_ADDR;
        ST_L_LD:   state <= ST_L_SUB;
        ST_L_SUB:  state <= ST_LD2;
        ST_F_LDB:  state <= ST_F_SUB;
        ST_F_SUB:  state <= ST_LD2;
        ST_LD2:    state <= ST_ADDR;
        ST_ADDR:   state <= ST_READ;
        ST_READ:   state <= ST_MUL;
        ST_MUL:    state <= (t == 3'd1) ? ST_WR : ST_ADD;
        ST_ADD:    state <= ST_WR;
        ST_WR:     state <= (t == IDX_W'(DIM + 1)) ? ST_DONE : ST_RSX;
        ST_RSX: begin
          t     <= t + 3'd1;
          state <= (t == IDX_W'(DIM)) ? ST_F_LDB : ST_L_LD;
        end
        ST_DONE: begin
          state  <= ST_IN;
          nbytes <= '0;
          bpos   <= '0;
        end
        default: state <= ST_IN;
      endcase
    end
  end

  always_comb begin
    cnt_clr   = 1'b0;
    vrt_wr    = 1'b0;
    ra_idx    = '0;
    rb_idx    = '0;
    wa_en     = 1'b0;
    wa_idx    = '0;
    wb_en     = 1'b0;
    wb_idx    = '0;
    sel       = SEL_RF;
    rega_ld   = 1'b0;
    rega_clr  = 1'b0;
    regb_ld   = 1'b0;
    rout_ld   = 1'b0;
    mux_a_sel = MA_REGA_RAW;
    mux_b_sel = MB_REGB_RAW;
    alu_op    = ALU_ADD;
    rsx_set   = 1'b0;
    rsx_clr   = 1'b0;
    ram_rd    = 1'b0;
    done      = 1'b0;
    swap      = 1'b0;
    phase     = PH_EVAL;
    unique case (state)
      ST_IN: begin
        phase = PH_INPUT;
        if (wr_pend) begin
          sel    = SEL_INPUT;
          wa_en  = 1'b1;
          wa_idx = cnt;
          vrt_wr = 1'b1;
        end
      end
      ST_S_LD: begin
        phase   = PH_SORT;
        ra_idx  = p.i;
        rb_idx  = p.j;
        sel     = SEL_RF;
        rega_ld = 1'b1;
        regb_ld = 1'b1;
      end
      ST_S_CMP: begin
        phase     = PH_SORT;
        mux_a_sel = MA_REGA_RAW;
        mux_b_sel = MB_REGB_RAW;
        alu_op    = ALU_CMP;
      end
      ST_S_SW: begin
        phase = PH_SORT;
        swap  = gt_q;
        if (gt_q) begin
          sel    = SEL_REGA;
          wa_en  = 1'b1;
          wa_idx = p.j;
          wb_en  = 1'b1;
          wb_idx = p.i;
        end
      end
      ST_E_LDA1: begin
        ra_idx  = 3'd1;
        sel     = SEL_RF;
        rega_ld = 1'b1;
        rsx_set = 1'b1;
      end
      ST_L_LD: begin
        ra_idx  = t;
        rb_idx  = t - 3'd1;
        sel     = SEL_RF;
        rega_ld = 1'b1;
        regb_ld = 1'b1;
      end
      ST_L_SUB: begin
        mux_a_sel = MA_REGA_FRAC;
        mux_b_sel = MB_REGB_FRAC;
        alu_op    = ALU_SUB;
        rout_ld   = 1'b1;
      end
      ST_F_LDB: begin
        rb_idx   = IDX_W'(DIM);
        regb_ld  = 1'b1;
        rega_clr = 1'b1;
      end
      ST_F_SUB: begin
        mux_b_sel = MB_REGB_FRAC;
        alu_op    = ALU_SUB1;
        rout_ld   = 1'b1;
      end
      ST_LD2: begin
        sel     = SEL_ROUT;
        rega_ld = 1'b1;
        rb_idx  = IDX_W'(ACC_IDX);
        regb_ld = 1'b1;
      end
      ST_ADDR: begin
        mux_a_sel = MA_VRT;
        mux_b_sel = MB_RSX;
        alu_op    = ALU_ADD;
        rout_ld   = 1'b1;
      end
      ST_READ: ram_rd = 1'b1;
      ST_MUL: begin
        mux_a_sel = (t == 3'd1) ? MA_REGA_FRAC : MA_REGA_RAW;
        mux_b_sel = MB_RAM;
        alu_op    = ALU_MUL;
        rout_ld   = 1'b1;
      end
      ST_ADD: begin
        mux_a_sel = MA_ROUT;
        mux_b_sel = MB_REGB_RAW;
        alu_op    = ALU_ADD;
        rout_ld   = 1'b1;
      end
      ST_WR: begin
        sel    = SEL_ROUT;
        wa_en  = 1'b1;
        wa_idx = IDX_W'(ACC_IDX);
      end
      ST_RSX: begin
        ra_idx  = t;
        rsx_clr = 1'b1;
      end
      ST_DONE: begin
        phase   = PH_DONE;
        done    = 1'b1;
        cnt_clr = 1'b1;
      end
      default: ;
    endcase
  end

  // The sort never switches the same register with itself, and the two
  // register-file write ports never collide.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(wa_en && wb_en && wa_idx == wb_idx))
        else $error("register-file write ports collide on Reg.%0d", wa_idx);
      assert (!(state == ST_IN && wr_pend && (cnt == '0 || cnt > IDX_W'(DIM))))
        else $error("input written with CNT=%0d", cnt);
    end
  end

endmodule
