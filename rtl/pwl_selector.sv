// pwl_selector: the data path selector in front of the register file and
// Reg.A.
//
// It routes one of four sources to both outputs: the freshly assembled input
// word {SR38 fraction bits, CNT} (data input), register-file read port 1
// (loading Reg.i into Reg.A), Rout (loading a result into Reg.A or writing
// it to Reg.7) or Reg.A (writing Reg.A back to Reg.j when a compare-switch
// swaps). to_rf is ACC_W bits wide for the register file, to_rega REG_W bits
// for Reg.A. Purely combinational. The description names the Selector and
// its 23- and 28-bit paths; the source list is derived from the operations
// it must carry.
module pwl_selector
  import pwl_pkg::*;
(
  input  sel_src_e             sel,
  input  logic [REG_W-1:0]     in_word,
  input  logic [REG_W-1:0]     rf_data,
  input  logic [ACC_W-1:0]     rout,
  input  logic [REG_W-1:0]     rega,
  output logic [ACC_W-1:0]     to_rf,
  output logic [REG_W-1:0]     to_rega
);

  always_comb begin
    unique case (sel)
      SEL_INPUT: to_rf = ACC_W'(in_word);
      SEL_RF:    to_rf = ACC_W'(rf_data);
      SEL_ROUT:  to_rf = rout;
      default:   to_rf = ACC_W'(rega);
    endcase
    to_rega = to_rf[REG_W-1:0];
  end

endmodule
