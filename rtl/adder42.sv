// adder42: one 4-2 adder cell.
//
// Takes four inputs of equal weight plus an intermediate carry `cin` from
// the next less significant cell of the same row, and produces a sum of
// weight 1 and two carries of weight 2 (`carry` and `cout`), so that
//   in1 + in2 + in3 + in4 + cin == sum + 2*(carry + cout).
// As in the thesis' reference build it is two full adders (CSAs) in series:
// the first adds in1..in3 and its carry is `cout`; the second adds the first
// sum, in4 and cin. `cout` therefore never depends on `cin`, which is what
// stops a carry from rippling along a row of these cells.
// Purely combinational.
// Document: cell built from two CSAs. Interface: in1..in4, cin -> sum,
// carry, cout. Own choice: nothing beyond the port names.
module adder42 (
  input  logic in1,
  input  logic in2,
  input  logic in3,
  input  logic in4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic s1;

  // first CSA
  always_comb begin
    s1   = in1 ^ in2 ^ in3;
    cout = (in1 & in2) | (in1 & in3) | (in2 & in3);
  end

  // second CSA
  always_comb begin
    sum   = s1 ^ in4 ^ cin;
    carry = (s1 & in4) | (s1 & cin) | (in4 & cin);
  end
endmodule
