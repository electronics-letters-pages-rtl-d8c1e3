// csa: W-bit carry-save adder (3:2 compressor).
//
// Adds three W-bit vectors a, b, d and returns a carry vector and a sum
// vector whose sum equals a + b + d + cin (mod 2^W). The sum vector is the
// bitwise XOR of the inputs; the carry vector is the bitwise majority,
// shifted up one place. The bit freed at the carry LSB takes cin, which is
// how the modulo adder turns "add ~N" into "subtract N" in two's complement
// without a carry-propagate step. The carry out of bit W-1 is dropped: all
// arithmetic built on this block is modulo 2^W.
//
// Purely combinational, one full-adder delay, no carry propagation. The
// carry-save adder as the one-cycle step of the accumulation follows the
// published modulo-addition method; the cin-in-LSB trick is this design's way of
// forming the two's complement of N.
module csa #(
  parameter int unsigned W = 19
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] d,
  input  logic         cin,
  output logic [W-1:0] carry,
  output logic [W-1:0] sum
);
  logic [W-2:0] maj;  // the majority of bit W-1 would carry out: dropped

  always_comb begin
    sum   = a ^ b ^ d;
    maj   = (a[W-2:0] & b[W-2:0]) | (a[W-2:0] & d[W-2:0]) | (b[W-2:0] & d[W-2:0]);
    carry = {maj, cin};
  end
endmodule
