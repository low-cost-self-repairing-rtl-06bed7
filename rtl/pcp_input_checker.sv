// pcp_input_checker: input-line check of the SBSA-PCP adder.
//
// Only the word parities P(A) and P(B) of the two operands are available. In
// a full adder the sum bit is the parity of the three inputs, so the
// first-row sum s_i already carries P(a_i.p, ~a_i.n, b_i.p). Adding the
// inverted b_i.n line seen by the second row gives P(a_i, b_i), and over the
// whole word
//     P(A) ^ P(B) = XOR_i (s_i ^ ~b_i.n).
// input_err is 1 when this identity fails, which happens for any odd number
// of faulty operand lines. The 2N checked bits make the identity hold in the
// complemented recomputation as well, so P(A) and P(B) are applied unchanged
// in both passes.
//
// The identity and the XOR tree follow the document. The stuck-at masks on
// the error line are this design's test hook for checker faults; tie them to
// zero in use. Purely combinational.
module pcp_input_checker #(
  parameter int N = 128
) (
  input  logic         pa,        // P(A), supplied with the operand
  input  logic         pb,        // P(B), supplied with the operand
  input  logic [N-1:0] s,         // first-row sums of the adder
  input  logic [N-1:0] bn_inv,    // inverted b_i.n lines of the adder
  input  logic         flt_sa0,
  input  logic         flt_sa1,
  output logic         input_err
);
  import bsd_pkg::*;

  always_comb begin
    input_err = stuck(pa ^ pb ^ (^s) ^ (^bn_inv), flt_sa0, flt_sa1);
  end

endmodule
