// pwl_pkg: shared sizes, encodings and the compare-switch schedule of the
// R^6 piecewise-linear (HL-CPWL) function evaluator.
//
// Number format: every input x_i is a 24-bit word, 4 integer bits above 20
// fraction bits. Reg.1-Reg.6 hold {fraction, 3-bit index}; the accumulator and
// the ALU work on 28 bits (8 integer bits for the 8-bit vertex values c_i, 20
// fraction bits). The sizes follow the architecture description; the control
// and multiplexer encodings below are this implementation's own.
package pwl_pkg;

  localparam int unsigned DIM   = 6;          // dimension n of F(X)
  localparam int unsigned IN_W  = 4;          // I_N, integer bits per input
  localparam int unsigned FN_W  = 20;         // F_N, fraction bits per input
  localparam int unsigned X_W   = IN_W + FN_W;  // N = 24
  localparam int unsigned IDX_W = 3;          // index field / CNT width
  localparam int unsigned REG_W = FN_W + IDX_W; // Reg.1..6 and Reg.A: 23
  localparam int unsigned ACC_W = FN_W + 8;     // Acc, Reg.B, Rout, ALU: 28
  localparam int unsigned C_W   = 8;            // vertex value c_i
  localparam int unsigned ADR_W = DIM * IN_W;   // RAM address, VRT, RSX: 24
  localparam int unsigned BYTE_W = 8;           // input port width
  localparam int unsigned NSORT = 12;           // compare-switch operations
  localparam int unsigned ACC_IDX = 7;          // Reg.7 is the accumulator

  // ALU operations.
  typedef enum logic [2:0] {
    ALU_CMP   = 3'd0,  // flag = a > b
    ALU_SUB   = 3'd1,  // a - b
    ALU_SUB1  = 3'd2,  // 1.0 - b (1.0 = 2^FN_W)
    ALU_MUL   = 3'd3,  // a[FN_W:0] * b[C_W-1:0]
    ALU_ADD   = 3'd4   // a + b
  } alu_op_e;

  // Right ALU operand (Reg.A side).
  typedef enum logic [1:0] {
    MA_REGA_FRAC = 2'd0,  // fraction field of Reg.A
    MA_REGA_RAW  = 2'd1,  // Reg.A as a plain number (a mu loaded from Rout)
    MA_VRT       = 2'd2,
    MA_ROUT      = 2'd3
  } mux_a_sel_e;

  // Left ALU operand (Reg.B side).
  typedef enum logic [1:0] {
    MB_REGB_FRAC = 2'd0,  // fraction field of Reg.B
    MB_REGB_RAW  = 2'd1,  // Reg.B as a plain number
    MB_RSX       = 2'd2,
    MB_RAM       = 2'd3
  } mux_b_sel_e;

  // Selector: source of Reg.A and of register-file write port 1.
  typedef enum logic [1:0] {
    SEL_INPUT = 2'd0,  // {SR38 fraction bits, CNT}
    SEL_RF    = 2'd1,  // register-file read port 1
    SEL_ROUT  = 2'd2,
    SEL_REGA  = 2'd3
  } sel_src_e;

  // Phase of the controller, brought out for observation.
  typedef enum logic [1:0] {
    PH_INPUT = 2'd0,
    PH_SORT  = 2'd1,
    PH_EVAL  = 2'd2,
    PH_DONE  = 2'd3
  } phase_e;

  // One compare-switch operation (r_i, r_j), registers numbered 1..6.
  typedef struct packed {
    logic [IDX_W-1:0] i;
    logic [IDX_W-1:0] j;
  } cs_pair_t;

  // The 12-operation sequence for six registers (the Bose-Nelson order):
  // (2,3)(5,6)(1,3)(4,6)(1,2)(4,5)(3,6)(1,4)(2,5)(3,5)(2,4)(3,4).
  function automatic cs_pair_t sort_pair(input logic [3:0] k);
    case (k)
      4'd0:    return '{i: 3'd2, j: 3'd3};
      4'd1:    return '{i: 3'd5, j: 3'd6};
      4'd2:    return '{i: 3'd1, j: 3'd3};
      4'd3:    return '{i: 3'd4, j: 3'd6};
      4'd4:    return '{i: 3'd1, j: 3'd2};
      4'd5:    return '{i: 3'd4, j: 3'd5};
      4'd6:    return '{i: 3'd3, j: 3'd6};
      4'd7:    return '{i: 3'd1, j: 3'd4};
      4'd8:    return '{i: 3'd2, j: 3'd5};
      4'd9:    return '{i: 3'd3, j: 3'd5};
      4'd10:   return '{i: 3'd2, j: 3'd4};
      default: return '{i: 3'd3, j: 3'd4};
    endcase
  endfunction

endpackage
