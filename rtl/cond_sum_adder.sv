// cond_sum_adder: W-bit conditional sum adder (W a power of two, 32 in the MAC).
//
// Level 0 forms, for every bit, the sum and carry-out for both possible carry-ins. Each
// following level merges pairs of neighbouring groups into a group twice as wide: the upper
// group's two candidate sums and carries are chosen by the lower group's carry for the same
// assumed carry-in, so after log2(W) levels of 2:1 multiplexers the whole word is known for
// both carry-ins and the real carry-in picks one. The critical path is one multiplexer per
// level. Purely combinational. The adder type and its 32-bit width follow the design; the
// carry-in and carry-out ports are this design's own additions (the MAC ties cin to 0).
module cond_sum_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned L = $clog2(W);

  for (genvar l = 0; l <= L; l++) begin : g_lvl
    localparam int unsigned NG = W >> l;       // groups at this level
    localparam int unsigned GS = 1 << l;       // group size
    logic [W-1:0]  s0, s1;                     // sums for group carry-in 0 / 1
    logic [NG-1:0] c0, c1;                     // group carry-outs for carry-in 0 / 1
    if (l == 0) begin : g_base
      assign s0 = x ^ y;
      assign s1 = ~(x ^ y);
      assign c0 = x & y;
      assign c1 = x | y;
    end else begin : g_merge
      for (genvar g = 0; g < NG; g++) begin : g_grp
        localparam int unsigned LO = g * GS;
        localparam int unsigned HI = g * GS + GS / 2;
        // lower half passes unchanged
        assign s0[HI-1:LO] = g_lvl[l-1].s0[HI-1:LO];
        assign s1[HI-1:LO] = g_lvl[l-1].s1[HI-1:LO];
        // upper half chosen by the lower half's carry
        assign s0[HI+GS/2-1:HI] = g_lvl[l-1].c0[2*g] ? g_lvl[l-1].s1[HI+GS/2-1:HI]
                                                      : g_lvl[l-1].s0[HI+GS/2-1:HI];
        assign s1[HI+GS/2-1:HI] = g_lvl[l-1].c1[2*g] ? g_lvl[l-1].s1[HI+GS/2-1:HI]
                                                      : g_lvl[l-1].s0[HI+GS/2-1:HI];
        assign c0[g] = g_lvl[l-1].c0[2*g] ? g_lvl[l-1].c1[2*g+1] : g_lvl[l-1].c0[2*g+1];
        assign c1[g] = g_lvl[l-1].c1[2*g] ? g_lvl[l-1].c1[2*g+1] : g_lvl[l-1].c0[2*g+1];
      end
    end
  end

  assign sum  = cin ? g_lvl[L].s1 : g_lvl[L].s0;
  assign cout = cin ? g_lvl[L].c1[0] : g_lvl[L].c0[0];

endmodule
