// cla8: 8-bit carry look-ahead adder, the adder of every phase accumulator
// stage.
//
// Each bit pair goes through a half adder giving generate g = x & y and
// propagate p = x ^ y. The carries are formed in three look-ahead groups,
// bits 0-2, bits 3-5 and bits 6-7, each group computing all of its carries
// in two gate levels from the carry entering the group: C1..C3 from Cin,
// C4..C6 from C3, and C7 and Cout from C6. The carry ripples only between
// the groups (Cin -> C3 -> C6 -> Cout), which is the critical path of the
// published adder: from bit 0 to Cout it passes the half adder and three
// AND-OR pairs, 7 gate levels, the figure given for that adder. The sums are
// S_i = p_i ^ C_i. The grouping follows the
// published circuit diagram; the gate-level netlist itself is left to
// synthesis.
//
// Interface: purely combinational, s + 256*cout = x + y + cin.
module cla8 (
  input  logic [7:0] x,
  input  logic [7:0] y,
  input  logic       cin,
  output logic [7:0] s,
  output logic       cout
);

  logic [7:0] g, p;
  logic [7:0] c;   // c[i] is the carry into bit i

  assign g = x & y;
  assign p = x ^ y;

  always_comb begin
    // group 0: bits 0..2, from Cin
    c[0] = cin;
    c[1] = g[0] | (p[0] & cin);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & cin);
    // group 1: bits 3..5, from C3
    c[4] = g[3] | (p[3] & c[3]);
    c[5] = g[4] | (p[4] & g[3]) | (p[4] & p[3] & c[3]);
    c[6] = g[5] | (p[5] & g[4]) | (p[5] & p[4] & g[3]) | (p[5] & p[4] & p[3] & c[3]);
    // group 2: bits 6..7, from C6
    c[7] = g[6] | (p[6] & c[6]);
    cout = g[7] | (p[7] & g[6]) | (p[7] & p[6] & c[6]);
  end

  assign s = p ^ c;

endmodule
