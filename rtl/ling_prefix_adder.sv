// W-bit parallel prefix adder built on the modified Ling equations.
//
// How it works
//   1. ling_pre_cell per bit: g_i = a_i b_i, p_i = a_i + b_i, half sum d_i.
//   2. ling_int_cell per bit: the leaf pair (G*_i, P*_{i-1}) with
//      G*_i = g_i + g_{i-1} and P*_{i-1} = p_{i-1} p_{i-2} (bits below 0 are 0).
//   3. The pseudo carry is H_i = (G*_i,P*_{i-1}) o (G*_{i-2},P*_{i-3}) o ... so even
//      and odd bit positions form two independent chains of W/2 leaves each. Each
//      chain is reduced by a Kogge-Stone style tree of prefix_gp_cell nodes
//      (span 1, 2, 4, ... in chain steps, i.e. 2, 4, 8, ... bit positions).
//   4. The real carry is c_i = H_i p_i. Positions whose H_i is complete before the
//      last tree level use carry_cell_a; the others use real_carry_cell, which
//      does the last combine and the AND with p_i in one cell. For W = 8 that
//      puts cell A on bits 0..3, for W = 16 on bits 0..7.
//   5. sum_i = d_i ^ c_{i-1}; there is no carry-in, cout = c_{W-1}.
//
// The Ling pre-processing, the intermediate pairs, the two interleaved pseudo
// carry chains and the fused real-carry cell follow the published modified-Ling
// adder. The Kogge-Stone arrangement of the tree levels is this design's choice.
//
// Interface: a, b (W bits) -> sum (W bits), cout. Purely combinational.
// W must be even with W/2 a power of two (8 and 16 are the intended sizes).
module ling_prefix_adder
  import bzfad_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned HALF   = W / 2;                          // leaves per chain
  localparam int unsigned LEVELS = (HALF > 1) ? $clog2(HALF) : 0;  // tree levels

  initial begin
    assert (W >= 2 && W % 2 == 0 && (1 << LEVELS) == HALF)
      else $error("ling_prefix_adder: W=%0d must be even with W/2 a power of two", W);
  end

  gp_t  [W-1:0] bit_gp;  // per-bit (g, p)
  logic [W-1:0] d;       // half sums
  logic [W-1:0] c;       // real carries out of each bit

  // Step 1: generate, propagate, half sum.
  for (genvar i = 0; i < W; i++) begin : g_pre
    ling_pre_cell u_pre (.a(a[i]), .b(b[i]), .gp(bit_gp[i]), .d(d[i]));
  end

  // Step 2: leaf pairs (G*_i, P*_{i-1}).
  gp_t [W-1:0] leaf;
  for (genvar i = 0; i < W; i++) begin : g_int
    ling_int_cell u_int (
      .g_hi (bit_gp[i].g),
      .g_lo ((i >= 1) ? bit_gp[(i >= 1) ? i - 1 : 0].g : 1'b0),
      .p_hi ((i >= 1) ? bit_gp[(i >= 1) ? i - 1 : 0].p : 1'b0),
      .p_lo ((i >= 2) ? bit_gp[(i >= 2) ? i - 2 : 0].p : 1'b0),
      .gp   (leaf[i])
    );
  end

  // Step 3: tree levels 1 .. LEVELS-1 on both parity chains at once. Level l
  // combines bit i with bit i - 2^l (the chain neighbour 2^(l-1) steps below).
  // The last level is folded into real_carry_cell below.
  for (genvar l = 0; l < ((LEVELS > 0) ? LEVELS : 1); l++) begin : g_lvl
    gp_t [W-1:0] n;
    if (l == 0) begin : g_leaf
      assign n = leaf;
    end else begin : g_comb
      for (genvar i = 0; i < W; i++) begin : g_bit
        if (i >= (2 << (l - 1))) begin : g_node
          prefix_gp_cell u_node (
            .hi (g_lvl[l-1].n[i]),
            .lo (g_lvl[l-1].n[(i >= (2 << (l - 1))) ? i - (2 << (l - 1)) : 0]),
            .o  (n[i])
          );
        end else begin : g_pass
          assign n[i] = g_lvl[l-1].n[i];
        end
      end
    end
  end

  // Step 4: real carries. After LEVELS-1 levels, bits below 2^LEVELS hold their
  // complete pseudo carry H_i; bits above need one more combine with the node
  // 2^LEVELS positions lower.
  localparam int unsigned LAST = (LEVELS > 0) ? LEVELS - 1 : 0;
  localparam int unsigned REACH = (LEVELS > 0) ? (1 << LEVELS) : W;
  for (genvar i = 0; i < W; i++) begin : g_carry
    if (i < REACH) begin : g_a
      carry_cell_a u_ca (.h(g_lvl[LAST].n[i].g), .p_bit(bit_gp[i].p), .c(c[i]));
    end else begin : g_rc
      real_carry_cell u_rc (
        .hi    (g_lvl[LAST].n[i]),
        .g_lo  (g_lvl[LAST].n[(i >= REACH) ? i - REACH : 0].g),
        .p_bit (bit_gp[i].p),
        .c     (c[i])
      );
    end
  end

  // Step 5: sum bits.
  assign sum  = d ^ {c[W-2:0], 1'b0};
  assign cout = c[W-1];

endmodule
