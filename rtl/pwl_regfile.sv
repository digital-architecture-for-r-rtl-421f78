// pwl_regfile: the register file, Reg.1-Reg.7.
//
// Reg.1-Reg.6 are (F_N+3)-bit registers: bits [F_N+2:3] hold the fraction of
// an input and bits [2:0] its index i in the input vector, so that the index
// travels with the fraction through the sort. Reg.7 is the (F_N+8)-bit
// accumulator Acc that collects F(X).
//
// Interface: two combinational read ports and two write ports, all addressed
// 1..7 (address 0 reads zero, writes to it are dropped).
//   Port 1: ra_idx/ra_data (REG_W bits, Reg.1-Reg.6; reads Reg.7 truncated),
//           wa_en/wa_idx/wa_data (writes from the Selector).
//   Port 2: rb_idx/rb_data (ACC_W bits, Reg.7 in full, Reg.1-6 zero-extended),
//           wb_en/wb_idx/wb_data (writes from Reg.B).
// Writes take effect on the rising edge; port 2 wins if both address the
// same register. Two read/write ports follow the description of the
// sorting procedure; the port details are this design's choice.
module pwl_regfile
  import pwl_pkg::*;
#(
  parameter int unsigned NREG = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [IDX_W-1:0]     ra_idx,
  output logic [REG_W-1:0]     ra_data,
  input  logic [IDX_W-1:0]     rb_idx,
  output logic [ACC_W-1:0]     rb_data,
  input  logic                 wa_en,
  input  logic [IDX_W-1:0]     wa_idx,
  input  logic [ACC_W-1:0]     wa_data,
  input  logic                 wb_en,
  input  logic [IDX_W-1:0]     wb_idx,
  input  logic [ACC_W-1:0]     wb_data,
  output logic [ACC_W-1:0]     acc
);

  logic [REG_W-1:0] r [1:NREG];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned k = 1; k <= NREG; k++) r[k] <= '0;
      acc <= '0;
    end else begin
      for (int unsigned k = 1; k <= NREG; k++) begin
        if (wb_en && wb_idx == IDX_W'(k))      r[k] <= wb_data[REG_W-1:0];
        else if (wa_en && wa_idx == IDX_W'(k)) r[k] <= wa_data[REG_W-1:0];
      end
      if (wb_en && wb_idx == IDX_W'(ACC_IDX))      acc <= wb_data;
      else if (wa_en && wa_idx == IDX_W'(ACC_IDX)) acc <= wa_data;
    end
  end

  always_comb begin
    ra_data = '0;
    rb_data = '0;
    for (int unsigned k = 1; k <= NREG; k++) begin
      if (ra_idx == IDX_W'(k)) ra_data = r[k];
      if (rb_idx == IDX_W'(k)) rb_data = ACC_W'(r[k]);
    end
    if (ra_idx == IDX_W'(ACC_IDX)) ra_data = acc[REG_W-1:0];
    if (rb_idx == IDX_W'(ACC_IDX)) rb_data = acc;
  end

endmodule
