// ibp_input_checker: per-digit input-line check of the SBSA-IBP adder.
//
// Each operand digit arrives with its own parity bit P(a_i), which is 1 for
// a non-zero digit and 0 for a zero digit. The two wires of the digit, as
// the adder sees them, are XORed with that bit:
//     ie_a[i] = P(a_i) ^ a_i.p ^ a_i.n,   ie_b[i] likewise.
// A flag is 1 exactly when an odd number of that digit's two lines is wrong,
// so every single faulty line is detected and located to its digit, and
// faults in different digits are all seen. Complementing a digit keeps its
// parity, so the parity bits are applied unchanged in the complemented
// recomputation.
//
// The per-digit XOR follows the document. The stuck-at masks on the 2N flag
// lines (bit i: ie_a[i], bit N+i: ie_b[i]) are this design's test hook for
// checker faults; tie them to zero in use. Purely combinational.
module ibp_input_checker #(
  parameter int N = 128
) (
  input  bsd_pkg::bsd_digit_t [N-1:0] a_line,
  input  bsd_pkg::bsd_digit_t [N-1:0] b_line,
  input  logic [N-1:0]                pa,      // P(a_i)
  input  logic [N-1:0]                pb,      // P(b_i)
  input  logic [2*N-1:0]              flt_sa0,
  input  logic [2*N-1:0]              flt_sa1,
  output logic [N-1:0]                ie_a,
  output logic [N-1:0]                ie_b
);
  import bsd_pkg::*;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      ie_a[i] = stuck(pa[i] ^ digit_par(a_line[i]), flt_sa0[i],   flt_sa1[i]);
      ie_b[i] = stuck(pb[i] ^ digit_par(b_line[i]), flt_sa0[N+i], flt_sa1[N+i]);
    end
  end

endmodule
