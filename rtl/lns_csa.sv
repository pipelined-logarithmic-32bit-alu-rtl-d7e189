// lns_csa -- carry-save adder (3:2 compressor) of width W.
//
// Reduces three addends to a sum word and a carry word with x + y + z ==
// s + c (modulo 2^W), without carry propagation. The carry word is already
// shifted left by one place. Combinational.
module lns_csa #(
  parameter int unsigned W = 40
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);

  logic [W-1:0] maj;

  assign s   = x ^ y ^ z;
  assign maj = (x & y) | (x & z) | (y & z);
  assign c   = {maj[W-2:0], 1'b0};

endmodule
