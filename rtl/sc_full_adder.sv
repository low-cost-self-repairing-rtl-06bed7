// sc_full_adder: self-checking full adder.
//
// A full adder whose sum and carry-out are computed by separate logic (no
// shared XOR), so that one internal fault can corrupt only one of the two
// outputs. The check uses a property of the full adder truth table: when the
// three inputs are all equal, Sum equals Cout; when they are not all equal,
// Sum is the complement of Cout. An equivalence tester Eqt (1 when the inputs
// are not all equal) is compared with G1 = XNOR(Sum, Cout); the error flag is
//   Ef = XNOR(G1, Eqt) = Sum ^ Cout ^ Eqt,
// which is 0 for every fault-free input combination and 1 whenever exactly
// one of Sum and Cout is wrong.
//
// The separate sum and carry gates, the equivalence tester and the two-gate
// comparison follow the document. The fault-injection masks (flt_sa0/flt_sa1,
// bit 0 = Sum, bit 1 = Cout) are this design's own test hook: they model a
// stuck-at fault on an output line inside the adder, ahead of the checker tap.
// Tie them to zero in use. Purely combinational.
module sc_full_adder (
  input  logic       a,
  input  logic       b,
  input  logic       cin,
  input  logic [1:0] flt_sa0,   // stuck-at-0 on {Cout, Sum}
  input  logic [1:0] flt_sa1,   // stuck-at-1 on {Cout, Sum}
  output logic       sum,
  output logic       cout,
  output logic       ef         // 1 = this adder produced an inconsistent output
);
  import bsd_pkg::*;

  logic sum_raw, cout_raw, eqt, g1;

  always_comb begin
    // Sum: two cascaded XORs. Carry: (a|b)&cin | a&b, no gate shared with Sum.
    sum_raw  = (a ^ b) ^ cin;
    cout_raw = ((a | b) & cin) | (a & b);
    sum      = stuck(sum_raw,  flt_sa0[0], flt_sa1[0]);
    cout     = stuck(cout_raw, flt_sa0[1], flt_sa1[1]);
    // Equivalence tester: 0 when all three inputs are equal.
    eqt      = ~((~a & ~b & ~cin) | (a & b & cin));
    g1       = ~(sum ^ cout);
    ef       = ~(g1 ^ eqt);
  end

endmodule
