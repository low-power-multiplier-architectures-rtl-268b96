// N x N Nikhilam multiplier.
//
// Unsigned, purely combinational. Operands wider than four bits are not
// handled by one large square ROM; the multiplier is assembled from 4x4
// Nikhilam cores (nikhilam_mult4). Each operand is cut into 4-bit digits
// and every digit pair goes to its own core, all in parallel. The core
// products are merged level by level in a tree: at each level four
// products of S/2-bit digits become one product of S-bit digits
// (nikhilam_merge: the low part kept, a carry save adder, one ripple carry
// adder). This is the same as building the N-bit multiplier from four
// N/2-bit ones, down to 4x4 cores: 1, 4, 16, 64 and 256 cores for 4, 8,
// 16, 32 and 64 bits.
//
// Level l works on digits of S = 4 << l bits; with D = N / S digits per
// operand it holds D*D products, product (i, j) = digit i of a times digit
// j of b stored at index i*D + j.
//
// Interface: a, b (N bits) in; p = a*b (2N bits). N must be a power of two
// and at least 4. The default N = 64 is the widest size evaluated.
module nikhilam_mult #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int unsigned CW     = vedic_pkg::NIKHILAM_CORE_W;  // 4
  localparam int unsigned LEVELS = $clog2(N / CW) + 1;          // digit sizes 4 .. N

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned S = CW << l;  // digit width at this level
    localparam int unsigned D = N / S;    // digits per operand

    logic [2*S-1:0] prod [D*D];

    for (genvar i = 0; i < D; i++) begin : g_row
      for (genvar j = 0; j < D; j++) begin : g_col
        if (l == 0) begin : g_core
          nikhilam_mult4 u_core (.a(a[CW*i +: CW]), .b(b[CW*j +: CW]), .p(prod[i*D + j]));
        end else begin : g_merge
          nikhilam_merge #(.N(S)) u_merge (
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
