// 12-bit conditional-sum incrementer: out = a + 1 (mod 4096).
//
// A counter built from an adder wastes most of it: one operand is zero and
// the carry-in is one. This incrementer keeps only what +1 needs. Bit i of
// the result is a[i] XOR (all lower bits are 1). The word is split into three
// 4-bit groups; each group computes both of its possible results up front
// (unchanged, and incremented), and a 2-to-1 multiplexer per bit picks one
// with the group carry, which is the AND of all lower bits formed from the
// per-group all-ones flags. The critical path is therefore one group
// all-ones AND, one AND across groups and one multiplexer, and does not grow
// with the number of groups in a ripple fashion.
//
// The conditional-sum principle and the +1 specialisation follow the original
// design; the grouping into three 4-bit groups is this design's choice.
//
// Interface: a (current count), out (a + 1). Purely combinational.
module incrementer12 (
  input  logic [11:0] a,
  output logic [11:0] out
);
  localparam int G = 4;         // bits per group
  localparam int NG = 12 / G;   // groups

  logic [NG-1:0] grp_ones;   // group is all ones
  logic [NG:0]   grp_cin;    // carry into group = all lower bits are ones
  logic [11:0]   inc_local;  // each group incremented with carry-in 1
  logic [11:0]   pre;        // prefix AND inside each group, below bit i

  for (genvar g = 0; g < NG; g++) begin : g_grp
    for (genvar i = 0; i < G; i++) begin : g_bit
      if (i == 0) begin : g_first
        assign pre[g*G] = 1'b1;
      end else begin : g_next
        assign pre[g*G + i] = pre[g*G + i - 1] & a[g*G + i - 1];
      end
      assign inc_local[g*G + i] = a[g*G + i] ^ pre[g*G + i];
      // 2-to-1 multiplexer picked by the group carry
      assign out[g*G + i] = grp_cin[g] ? inc_local[g*G + i] : a[g*G + i];
    end
    assign grp_ones[g]  = &a[g*G +: G];
    assign grp_cin[g+1] = grp_cin[g] & grp_ones[g];
  end
  assign grp_cin[0] = 1'b1;
endmodule
