// full_adder: one-bit full adder, the cell of the ripple carry adder.
//
// Adds two operand bits and a carry-in, giving a sum bit and a carry-out:
// s = a ^ b ^ cin, cout = majority(a, b, cin). Purely combinational, no
// clock; outputs settle one XOR-pair delay after the inputs.
// The cell and its ports (A, B, carry in, S, carry out) follow the ripple
// carry adder drawing; the gate-level form is the textbook one.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic p;  // propagate

  always_comb begin
    p    = a ^ b;
    s    = p ^ cin;
    cout = (a & b) | (p & cin);
  end
endmodule
