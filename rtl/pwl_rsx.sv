// pwl_rsx: the label register (RSX) holding S = <S_1 S_2 ... S_6>.
//
// Each S_j is an IN_W-bit field that is either 0 or 1, aligned with field j
// of VRT, so that VRT + RSX is the address of a hypercube vertex. "Turn-on"
// (set_all) makes every S_j = 1; "turn-off" (clr_en with clr_idx = j, 1..6)
// makes S_j = 0. Starting from all ones and turning off the index of the
// smallest remaining fraction after each vertex walks the path of n+1
// vertices of the simplex holding X. Interface: set_all has priority; both
// act on the rising edge. The behaviour is the description's; the priority
// and reset value are this design's choices.
module pwl_rsx #(
  parameter int unsigned DIM   = 6,
  parameter int unsigned IN_W  = 4,
  parameter int unsigned IDX_W = 3
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  set_all,
  input  logic                  clr_en,
  input  logic [IDX_W-1:0]      clr_idx,
  output logic [DIM*IN_W-1:0]   s
);

  always_ff @(posedge clk) begin
    if (!rst_n) s <= '0;
    else if (set_all) begin
      for (int unsigned f = 1; f <= DIM; f++)
        s[IN_W*(DIM-f) +: IN_W] <= IN_W'(1);
    end else if (clr_en) begin
      for (int unsigned f = 1; f <= DIM; f++)
        if (clr_idx == IDX_W'(f)) s[IN_W*(DIM-f) +: IN_W] <= '0;
    end
  end

endmodule
