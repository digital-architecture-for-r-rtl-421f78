// pwl_cnt: the 3-bit input index counter (CNT).
//
// CNT gives each input x_i its index i = 1..6. It is cleared before an
// operation and incremented on the first of the three byte cycles of each
// input, so that it holds i while x_i is being assembled and written to
// Reg.i. Interface: clr has priority over inc; both act on the rising edge.
// The width and the increment-on-first-byte rule follow the architecture
// description; the clear input is this design's choice.
module pwl_cnt #(
  parameter int unsigned W = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         inc,
  output logic [W-1:0] count
);

  always_ff @(posedge clk) begin
    if (!rst_n || clr) count <= '0;
    else if (inc)      count <= count + 1'b1;
  end

endmodule
