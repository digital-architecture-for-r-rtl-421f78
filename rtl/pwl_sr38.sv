// pwl_sr38: the 3x8-bit input shift register (SR38).
//
// A 24-bit input x_i arrives as three bytes, most significant byte first,
// because the input port is only 8 bits wide. Each accepted byte shifts the
// register left by 8. After the third byte, word[23:20] is the integer part
// (written to VRT) and word[19:0] the fraction (written to Reg.i).
// Interface: shift_en loads din on the rising clock edge; word is the
// registered content. The three-byte loading follows the architecture
// description; most-significant-byte-first order and the synchronous
// active-low reset are this design's choices.
module pwl_sr38 #(
  parameter int unsigned BYTE_W = 8,
  parameter int unsigned NBYTES = 3
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       shift_en,
  input  logic [BYTE_W-1:0]          din,
  output logic [BYTE_W*NBYTES-1:0]   word
);

  always_ff @(posedge clk) begin
    if (!rst_n)        word <= '0;
    else if (shift_en) word <= {word[BYTE_W*(NBYTES-1)-1:0], din};
  end

endmodule
