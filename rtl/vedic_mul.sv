// vedic_mul: N x N unsigned multiplier after the Urdhva Tiryakbhyam
// ("vertically and crosswise") sutra.
//
// p = a * b, 2N bits, combinational. The operands are split into halves
// (H = N/2 bits). Four H x H Vedic multipliers form the vertical products
// aL*bL, aH*bH and the crosswise products aH*bL, aL*bH, each N bits wide.
// Three N-bit MUX-based adders then combine them:
//   s1 = aH*bL + aL*bH                       (carry ca1)
//   s2 = s1 + {0, (aL*bL)[N-1:H]}            (carry ca2)
//   p[N-1:0]  = {s2[H-1:0], (aL*bL)[H-1:0]}
//   p[2N-1:N] = aH*bH + {0, ca1|ca2, s2[N-1:H]}
// This is the design's 8x8 structure (built of 4x4 blocks), applied at
// every size down to a 2x2 cell of AND gates and two half adders. The sizes
// are built level by level rather than by recursion: level l holds the
// products of all pairs of 2^l-bit digits of a and b, each made from four
// products of level l-1; the top level holds the single full product. Two choices are this design's own: the 2x2 cell, and feeding
// ca1|ca2 (rather than ca1 alone) into the last adder, which keeps the
// product exact for every input; ca1 and ca2 are never both 1. The carry of
// the last adder is always 0; an assertion checks it. N must be a power of
// two, >= 2.
module vedic_mul #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int unsigned L = $clog2(N);  // number of levels

  for (genvar l = 1; l <= L; l++) begin : g_lvl
    localparam int unsigned W = 1 << l;   // digit width at this level
    localparam int unsigned D = N / W;    // digits per operand
    localparam int unsigned H = W / 2;

    // prod[i][j] = (digit i of a) * (digit j of b), 2W bits
    logic [2*W-1:0] prod [D][D];

    for (genvar i = 0; i < D; i++) begin : g_i
      for (genvar j = 0; j < D; j++) begin : g_j
        if (l == 1) begin : g_cell
          // Urdhva 2x2: vertical a0b0, crosswise a1b0 + a0b1, vertical a1b1.
          logic a0, a1, b0, b1, cross_c;
          assign {a1, a0} = a[2*i +: 2];
          assign {b1, b0} = b[2*j +: 2];
          assign cross_c  = (a1 & b0) & (a0 & b1);
          assign prod[i][j] = {(a1 & b1) & cross_c, (a1 & b1) ^ cross_c,
                               (a1 & b0) ^ (a0 & b1), a0 & b0};
        end else begin : g_split
          logic [W-1:0] q_ll, q_hl, q_lh, q_hh;  // aL*bL, aH*bL, aL*bH, aH*bH
          logic [W-1:0] s1, s2, s3;
          logic         ca1, ca2, ca3;

          assign q_hh = g_lvl[l-1].prod[2*i+1][2*j+1];
          assign q_hl = g_lvl[l-1].prod[2*i+1][2*j];
          assign q_lh = g_lvl[l-1].prod[2*i][2*j+1];
          assign q_ll = g_lvl[l-1].prod[2*i][2*j];

          mux_adder #(.N(W)) u_add1 (.x(q_hl), .y(q_lh), .cin(1'b0), .s(s1), .cout(ca1));
          mux_adder #(.N(W)) u_add2 (.x(s1), .y({{H{1'b0}}, q_ll[W-1:H]}), .cin(1'b0),
                                     .s(s2), .cout(ca2));
          mux_adder #(.N(W)) u_add3 (.x(q_hh), .y({{(H-1){1'b0}}, ca1 | ca2, s2[W-1:H]}),
                                     .cin(1'b0), .s(s3), .cout(ca3));

          assign prod[i][j] = {s3, s2[H-1:0], q_ll[H-1:0]};

          // The high product plus the middle carries never overflows.
          always_comb assert (ca3 == 1'b0) else $error("vedic_mul: unexpected carry");
        end
      end
    end
  end

  assign p = g_lvl[L].prod[0][0];

endmodule
