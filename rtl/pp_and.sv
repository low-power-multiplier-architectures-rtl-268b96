// Partial-product AND gate.
//
// Forms one partial-product bit a AND b. The gate is written the way the
// low-power cell is built: as a 2:1 multiplexer steered by a, passing b
// when a is 1 and the grounded rail when a is 0. The transistor-level
// realisation (a 5-transistor pass-transistor / transmission-gate cell) is
// a circuit matter; this model keeps only its logic function.
//
// Interface: a (select), b (data), y = a & b. Purely combinational.
module pp_and (
  input  logic a,
  input  logic b,
  output logic y
);

  // Multiplexer form: select b when a is high, ground otherwise.
  assign y = a ? b : 1'b0;

endmodule
