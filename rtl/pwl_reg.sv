// pwl_reg: a load-enable register with synchronous clear, used for the
// temporary ALU registers Reg.A (23 bits) and Reg.B (28 bits) and for the
// ALU output register Rout (28 bits).
//
// Interface: clr (priority) loads zero, ld loads d, both on the rising edge;
// q is the registered value. The widths are the description's; the clear
// input serves "set Reg.A = 0".
module pwl_reg #(
  parameter int unsigned W = 28
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         ld,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n || clr) q <= '0;
    else if (ld)       q <= d;
  end

endmodule
