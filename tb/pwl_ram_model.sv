// pwl_ram_model: behavioural model of the external vertex-value RAM
// (not synthesizable, testbench only).
//
// 2^ADR_W words of C_W bits, synchronous read with one cycle of latency:
// when rd is high at a rising edge, rdata shows mem[addr] from that edge on.
// The full 16M-word memory is not stored. A word that has not been written
// with set() reads as a fixed scramble of its address, cval(a) =
// ((a * 2654435761) >> 13) mod 2^C_W, so every vertex has a reproducible value.
// peek() returns the same value without a clock, for expected results.
module pwl_ram_model #(
  parameter int unsigned ADR_W = 24,
  parameter int unsigned C_W   = 8
) (
  input  logic             clk,
  input  logic [ADR_W-1:0] addr,
  input  logic             rd,
  output logic [C_W-1:0]   rdata
);

  logic [C_W-1:0] mem [int unsigned];
  int unsigned    reads = 0;

  function automatic logic [C_W-1:0] cval(input logic [ADR_W-1:0] a);
    logic [63:0] h;
    h = 64'(a) * 64'd2654435761;
    return C_W'(h >> 13);
  endfunction

  function automatic logic [C_W-1:0] peek(input logic [ADR_W-1:0] a);
    if (mem.exists(int'(a))) return mem[int'(a)];
    return cval(a);
  endfunction

  task automatic set(input logic [ADR_W-1:0] a, input logic [C_W-1:0] v);
    mem[int'(a)] = v;
  endtask

  task automatic clear();
    mem.delete();
  endtask

  initial rdata = '0;

  always @(posedge clk) begin
    if (rd) begin
      rdata <= peek(addr);
      reads++;
    end
  end

endmodule
