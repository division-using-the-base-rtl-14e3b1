// qconv: conversion of the redundant radix-16 quotient to binary.
//
// The quotient digits q_j in {-12,-10..10,12} are accumulated in an
// adder/subtractor register: a normal step computes Q <- 16*Q + q_j, a
// correction step (digit overshoot repaired one cycle later) computes
// Q <- Q + c with c = +-1, i.e. it adjusts the previous digit without a
// shift. Arithmetic is modulo 2^W; the final value is non-negative. A
// `clear` loads zero. The document builds the converter as an accumulating
// adder/subtractor; the register width and the clear input are this design's.
//
// Timing: one register, updated on the rising clock edge when `en` is high.
module qconv #(
  parameter int W = 116
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                en,
  input  logic                shift,   // 1: normal digit step, 0: correction
  input  logic signed [4:0]   digit,
  output logic [W-1:0]        q
);

  logic [W-1:0] base;

  assign base = shift ? {q[W-5:0], 4'd0} : q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= '0;
    else if (clear)  q <= '0;
    else if (en)     q <= base + W'(digit);
  end

endmodule
