// carry_gen - sparse radix-4 parallel-prefix carry tree (sparseness 4).
//
// Only the carry into every fourth bit is computed. The tree has three levels of radix-4
// merge gates, each merging four generate/propagate pairs:
//   G4/P4   - group generate/propagate of each 4-bit group, from the bit-level g/p;
//   G16/P16 - each group merged with the three groups below it (span of up to 16 bits);
//   G64     - each G16 node merged with the G16 nodes 4, 8 and 12 groups below it, giving the
//             generate of everything from bit 0 up to the top of the group.
// The merge is G = G3 | P3&G2 | P3&P2&G1 | P3&P2&P1&G0, P = P3&P2&P1&P0 (Kogge-Stone style,
// every node computed in parallel). Nodes below bit 0 are the identity (G = 0, P = 1). The
// carry-in is folded into the generate of bit 0. This three-level structure follows the
// document's sparse radix-4 tree; writing the levels as a loop over a general width is this
// design's own, and at W = 64 it produces exactly the G4, G16 and G64 levels.
//
// carry[j] is the carry into bit GROUP*j: carry[0] = cin, carry[j] = G64 of group j-1.
// Purely combinational.
module carry_gen
  import alu_pkg::*;
#(
  parameter int unsigned W = WIDTH
) (
  input  logic [W-1:0]       g,
  input  logic [W-1:0]       p,
  input  logic               cin,
  output logic [W/GROUP-1:0] carry
);
  localparam int unsigned NG   = W / GROUP;
  localparam int unsigned NLEV = $clog2(NG) / 2 + (($clog2(NG) % 2) != 0 ? 1 : 0);  // levels above G4

  logic [NG-1:0] g4, p4;  // level 0: G4/P4

  // level 0: radix-4 group generate/propagate of each group, carry-in folded into bit 0
  for (genvar j = 0; j < NG; j++) begin : g_lvl0
    always_comb begin
      logic [GROUP-1:0] gb, pb;
      logic gm, pm;
      gb = g[GROUP*j +: GROUP];
      pb = p[GROUP*j +: GROUP];
      if (j == 0) gb[0] = g[0] | (p[0] & cin);
      gm = 1'b0;
      pm = 1'b1;
      for (int i = 0; i < int'(GROUP); i++) begin
        gm = gb[i] | (pb[i] & gm);
        pm = pb[i] & pm;
      end
      g4[j] = gm;
      p4[j] = pm;
    end
  end

  // upper levels: node j merges nodes j, j-span, j-2*span, j-3*span of the level below
  for (genvar l = 1; l <= NLEV; l++) begin : g_lvl
    localparam int SPAN = 4 ** (l - 1);
    logic [NG-1:0] gl, pl, gprev, pprev;  // this level (G16/P16, then G64) and the one below
    if (l == 1) begin : g_first
      assign gprev = g4;
      assign pprev = p4;
    end else begin : g_next
      assign gprev = g_lvl[l-1].gl;
      assign pprev = g_lvl[l-1].pl;
    end
    for (genvar j = 0; j < NG; j++) begin : g_node
      always_comb begin
        logic gm, pm;
        gm = 1'b0;
        pm = 1'b1;
        for (int i = 3; i >= 0; i--) begin
          if (j - i * SPAN >= 0) begin
            gm = gprev[j - i*SPAN] | (pprev[j - i*SPAN] & gm);
            pm = pprev[j - i*SPAN] & pm;
          end
        end
        gl[j] = gm;
        pl[j] = pm;
      end
    end
  end

  always_comb begin
    carry[0] = cin;
    for (int j = 1; j < int'(NG); j++)
      carry[j] = g_lvl[NLEV].gl[j-1];
  end
endmodule
