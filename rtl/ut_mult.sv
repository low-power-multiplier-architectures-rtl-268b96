// N x N Urdhva Tiryakbhyam (vertically and crosswise) multiplier.
//
// Unsigned, purely combinational. Each operand is cut into 2-bit digits and
// every digit of a is multiplied with every digit of b by a 2x2 UT cell
// (ut_mult2), all in parallel. The products are then merged level by level
// in a tree: at each level four products of S/2-bit digits - the vertical
// products lo*lo and hi*hi and the crosswise products lo*hi and hi*lo -
// become one product of S-bit digits (ut_merge, two ripple carry adders).
// After log2(N) - 1 merge levels one N x N product remains. This is the
// same as building the N-bit multiplier from four N/2-bit multipliers,
// each from four N/4-bit ones, down to the 2x2 cell.
//
// Level l works on digits of S = 2 << l bits; with D = N / S digits per
// operand it holds D*D products, product (i, j) = digit i of a times digit
// j of b stored at index i*D + j.
//
// Interface: a, b (N bits) in; p = a*b (2N bits). N must be a power of two
// and at least 2. The default N = 64 is the widest size evaluated.
module ut_mult #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int unsigned LEVELS = $clog2(N);  // digit sizes 2, 4, ..., N

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned S = 2 << l;   // digit width at this level
    localparam int unsigned D = N / S;    // digits per operand

    logic [2*S-1:0] prod [D*D];

    for (genvar i = 0; i < D; i++) begin : g_row
      for (genvar j = 0; j < D; j++) begin : g_col
        if (l == 0) begin : g_cell
          ut_mult2 u_cell (.a(a[2*i +: 2]), .b(b[2*j +: 2]), .p(prod[i*D + j]));
        end else begin : g_merge
          ut_merge #(.N(S)) u_merge (
            .ll(g_lvl[l-1].prod[(2*i)   * (2*D) + 2*j]),
            .lh(g_lvl[l-1].prod[(2*i)   * (2*D) + 2*j + 1]),
            .hl(g_lvl[l-1].prod[(2*i+1) * (2*D) + 2*j]),
            .hh(g_lvl[l-1].prod[(2*i+1) * (2*D) + 2*j + 1]),
            .p (prod[i*D + j])
          );
        end
      end
    end
  end

  assign p = g_lvl[LEVELS-1].prod[0];

endmodule
