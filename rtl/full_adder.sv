// Full adder.
//
// Adds three bits. It stands for the 14-transistor low-power full adder
// cell of the adder chains; the cell's circuit is not reproduced, only its
// logic function. The sum is the XOR of the three inputs and the carry is
// the majority of the three, written as generate/propagate terms.
//
// Interface: a, b, ci in; s (sum), co (carry out). Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  logic p;  // propagate

  assign p  = a ^ b;
  assign s  = p ^ ci;
  assign co = (a & b) | (p & ci);

endmodule
