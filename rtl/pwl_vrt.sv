// pwl_vrt: the vertex register (VRT).
//
// VRT collects the integer parts of the six inputs into the number
// V = <x_int1 x_int2 ... x_int6>, x_int1 in the most significant field, so
// that V is directly the RAM address of the lower corner of the unit
// hypercube holding X. Interface: when wr is high, nibble din is written to
// field idx (1..6) on the rising edge; field i occupies bits
// [IN_W*(DIM-i)+IN_W-1 : IN_W*(DIM-i)]. The field order follows the
// addressing scheme of the description (V is the concatenation in input
// order); indexed field writes are this design's choice.
module pwl_vrt #(
  parameter int unsigned DIM   = 6,
  parameter int unsigned IN_W  = 4,
  parameter int unsigned IDX_W = 3
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr,
  input  logic [IDX_W-1:0]      idx,
  input  logic [IN_W-1:0]       din,
  output logic [DIM*IN_W-1:0]   v
);

  always_ff @(posedge clk) begin
    if (!rst_n) v <= '0;
    else if (wr) begin
      for (int unsigned f = 1; f <= DIM; f++)
        if (idx == IDX_W'(f)) v[IN_W*(DIM-f) +: IN_W] <= din;
    end
  end

endmodule
