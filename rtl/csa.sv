// csa: one row of 3:2 carry-save adders (full adders without carry chain).
//
// Reduces three W-bit vectors to a sum vector and a carry vector with
// a + b + c = s + cy (mod 2^W). The carry vector is already shifted one place
// left; its free least significant bit takes `cin`, which the divider uses for
// the +1 of a two's-complement negation. Combinational, one full-adder delay.
module csa #(
  parameter int W = 121
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);

  logic [W-1:0] maj;

  assign s   = a ^ b ^ c;
  assign maj = (a & b) | (a & c) | (b & c);
  assign cy  = {maj[W-2:0], cin};

endmodule
