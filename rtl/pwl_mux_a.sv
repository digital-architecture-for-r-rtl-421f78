// pwl_mux_a: the ALU operand multiplexer on the Reg.A side.
//
// Selects the fraction field of Reg.A (Reg.A[22:3], a sorted x_frac), all of
// Reg.A as a number (a mu_i loaded back from Rout), VRT (address
// computation) or Rout (accumulation), zero-extended to ACC_W bits.
// Purely combinational. The description names the multiplexer and its 23-,
// 24- and 28-bit inputs; the separate fraction view is this design's choice.
module pwl_mux_a
  import pwl_pkg::*;
(
  input  mux_a_sel_e           sel,
  input  logic [REG_W-1:0]     rega,
  input  logic [ADR_W-1:0]     vrt,
  input  logic [ACC_W-1:0]     rout,
  output logic [ACC_W-1:0]     y
);

  always_comb begin
    unique case (sel)
      MA_REGA_FRAC: y = ACC_W'(rega[REG_W-1:IDX_W]);
      MA_REGA_RAW:  y = ACC_W'(rega);
      MA_VRT:       y = ACC_W'(vrt);
      default:      y = rout;
    endcase
  end

endmodule
