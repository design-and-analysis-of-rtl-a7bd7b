// cla_tree: carries of an N-position carry lookahead adder.
//
// The positions are padded to 4^L (L levels, the fewest with 4^L >= N) with
// G = 0, P = 1, which leaves every group term unchanged. Level 0 cuts them
// into groups of four; one cla_lookahead4 per group yields the group's
// generate/propagate and, given the carry into the group, the carry into
// each of its four positions. Level 1 does the same over the level-0 group
// terms, and so on up to level L-1, a single unit that takes cin. The
// carries thus run from cin down through the levels, each step two gate
// levels deep: a 64-bit adder is three levels of 4-bit lookahead.
//
// Interface: g, p per position, cin. c[i] is the carry into position i;
// gg/pg are the group generate/propagate of all N positions. Combinational.
// The published design gives the 4-bit equations only; building wider
// adders as a lookahead tree of the same unit is this design's choice.
module cla_tree #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0] g,
  input  logic [N-1:0] p,
  input  logic         cin,
  output logic [N-1:0] c,
  output logic         gg,
  output logic         pg
);

  // number of lookahead levels: smallest L >= 1 with 4^L >= n
  function automatic int unsigned num_levels(int unsigned n);
    int unsigned l = 1;
    int unsigned m = 4;
    while (m < n) begin
      m = m * 4;
      l = l + 1;
    end
    return l;
  endfunction

  localparam int unsigned L = num_levels(N);
  localparam int unsigned M = 4 ** L;            // padded width

  logic [M-1:0] g_pad, p_pad;

  always_comb begin
    g_pad = '0;
    p_pad = '1;
    g_pad[N-1:0] = g;
    p_pad[N-1:0] = p;
  end

  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int unsigned CNT = 4 ** (L - l);  // entries at this level
    logic [CNT-1:0]   gv, pv;      // generate/propagate of the entries
    logic [CNT-1:0]   cv;          // carry into each entry
    logic [CNT/4-1:0] ggv, pgv;    // terms of each group of four entries
    logic [CNT/4-1:0] c0v;         // carry into each group of four

    if (l == 0) begin : g_in_bits
      assign gv = g_pad;
      assign pv = p_pad;
    end else begin : g_in_groups
      assign gv = g_lvl[l-1].ggv;
      assign pv = g_lvl[l-1].pgv;
    end

    if (l == L - 1) begin : g_c0_top
      assign c0v = cin;
    end else begin : g_c0_above
      assign c0v = g_lvl[l+1].cv;
    end

    for (genvar j = 0; j < CNT / 4; j++) begin : g_grp
      logic c4_unused;   // the carry out of a group is resolved one level up
      cla_lookahead4 u_la (
        .g  (gv[4*j +: 4]),
        .p  (pv[4*j +: 4]),
        .c0 (c0v[j]),
        .c  (cv[4*j +: 4]),
        .c4 (c4_unused),
        .gg (ggv[j]),
        .pg (pgv[j])
      );
    end
  end

  assign c  = g_lvl[0].cv[N-1:0];
  assign gg = g_lvl[L-1].ggv[0];
  assign pg = g_lvl[L-1].pgv[0];

endmodule
