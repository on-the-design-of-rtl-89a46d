// lf_carry_unit: parallel-prefix carry computation of Ladner-Fischer type.
//
// Given per-bit generate g_i and propagate p_i, it returns for every bit i the
// group generate G[i:0], which is the carry out of bit i when the carry into
// bit 0 is zero. The prefix operator is
//   (g, p) o (g', p') = (g | (p & g'), p & p').
// The tree has ceil(log2 W) levels. At level l (counting from 1) every bit i
// whose bit (l-1) is 1 combines with the last bit of the block of 2^(l-1) bits
// just below it, j = (i >> l << l) + 2^(l-1) - 1. This is the minimum-depth
// member of the Ladner-Fischer family (also known as the Sklansky tree); which
// member of the family is used is this design's choice.
//
// Lint reports the low propagate bits of the last kept level as unused: once a
// group reaches bit 0 only its generate matters. Synthesis removes them.
//
// Interface: g, p inputs (W bits); gg output, gg[i] = G[i:0]. Combinational.
module lf_carry_unit #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] g,
  input  logic [W-1:0] p,
  output logic [W-1:0] gg
);

  localparam int unsigned LEVELS = (W > 1) ? $clog2(W) : 0;

  // Level l holds the group generate gv of every bit after l prefix levels;
  // the group propagate pv is only kept where a later level still reads it.
  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    logic [W-1:0] gv;
    if (l < LEVELS) begin : g_p
      logic [W-1:0] pv;
    end
    if (l == 0) begin : g_in
      assign gv = g;
      if (LEVELS > 0) begin : g_pin
        assign g_lvl[0].g_p.pv = p;
      end
    end else begin : g_tree
      for (genvar i = 0; i < W; i++) begin : g_bit
        if (((i >> (l - 1)) & 1) == 1) begin : g_node
          localparam int unsigned J = ((i >> l) << l) + (1 << (l - 1)) - 1;
          assign gv[i] = g_lvl[l-1].gv[i] | (g_lvl[l-1].g_p.pv[i] & g_lvl[l-1].gv[J]);
          if (l < LEVELS) begin : g_pn
            assign g_lvl[l].g_p.pv[i] = g_lvl[l-1].g_p.pv[i] & g_lvl[l-1].g_p.pv[J];
          end
        end else begin : g_wire
          assign gv[i] = g_lvl[l-1].gv[i];
          if (l < LEVELS) begin : g_pw
            assign g_lvl[l].g_p.pv[i] = g_lvl[l-1].g_p.pv[i];
          end
        end
      end
    end
  end

  assign gg = g_lvl[LEVELS].gv;

endmodule
