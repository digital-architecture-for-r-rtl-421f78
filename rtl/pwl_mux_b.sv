// pwl_mux_b: the ALU operand multiplexer on the Reg.B side.
//
// Selects the fraction field of Reg.B (Reg.B[22:3], a sorted x_frac), all of
// Reg.B (partial sum or a whole Reg.j word for comparison), RSX (address
// computation) or the 8-bit RAM data c_i, zero-extended to ACC_W bits.
// Purely combinational. The description names the multiplexer and its 8-,
// 24- and 28-bit inputs; the separate fraction view is this design's choice.
module pwl_mux_b
  import pwl_pkg::*;
(
  input  mux_b_sel_e           sel,
  input  logic [ACC_W-1:0]     regb,
  input  logic [ADR_W-1:0]     rsx,
  input  logic [C_W-1:0]       ram,
  output logic [ACC_W-1:0]     y
);

  always_comb begin
    unique case (sel)
      MB_REGB_FRAC: y = ACC_W'(regb[REG_W-1:IDX_W]);
      MB_REGB_RAW:  y = regb;
      MB_RSX:       y = ACC_W'(rsx);
      default:      y = ACC_W'(ram);
    endcase
  end

endmodule
