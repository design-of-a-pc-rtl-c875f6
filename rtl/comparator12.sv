// 12-bit digital comparator: active-low equality of the sample and the count.
//
// One XNOR per bit flags equal bits. The twelve flags are combined without a
// wide AND gate: six 2-input NANDs pair them, three 2-input NORs pair the
// NAND outputs (each NOR is high when its four bits all match), and one
// 3-input NAND joins the three NORs. Its output is low exactly when all
// twelve bits match. This is the original gate structure.
//
// Interface: a (data register), b (counter), eq_n (low while a == b).
// Purely combinational.
module comparator12 (
  input  logic [11:0] a,
  input  logic [11:0] b,
  output logic        eq_n
);
  logic [11:0] same;
  logic [5:0]  nand2;
  logic [2:0]  nor2;

  always_comb begin
    same = ~(a ^ b);
    for (int i = 0; i < 6; i++) nand2[i] = ~(same[2*i] & same[2*i+1]);
    for (int i = 0; i < 3; i++) nor2[i]  = ~(nand2[2*i] | nand2[2*i+1]);
    eq_n = ~(nor2[0] & nor2[1] & nor2[2]);
  end
endmodule
