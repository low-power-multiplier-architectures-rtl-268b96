// Read-only memory of squares.
//
// Holds i*i at address i for every address of AW bits, with two
// independent read ports so that the Nikhilam core can look up the square
// of its average and of its deviation at the same time. The table is
// computed at elaboration from vedic_pkg::square(); no data file is read.
// Read is asynchronous (combinational), as in a small lookup-table ROM.
//
// Interface: addr_a, addr_b (AW bits) in; data_a = addr_a^2,
// data_b = addr_b^2 (2*AW bits).
module square_rom #(
  parameter int unsigned AW = 5
) (
  input  logic [AW-1:0]   addr_a,
  input  logic [AW-1:0]   addr_b,
  output logic [2*AW-1:0] data_a,
  output logic [2*AW-1:0] data_b
);

  localparam int unsigned DEPTH = 1 << AW;

  typedef logic [2*AW-1:0] word_t;

  function automatic word_t entry(input int unsigned i);
    return word_t'(vedic_pkg::square(i));
  endfunction

  word_t rom [DEPTH];

  // Constant table, filled once from the formula.
  always_comb begin
    for (int unsigned i = 0; i < DEPTH; i++) rom[i] = entry(i);
  end

  assign data_a = rom[addr_a];
  assign data_b = rom[addr_b];

endmodule
