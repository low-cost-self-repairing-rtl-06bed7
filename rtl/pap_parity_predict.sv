// pap_parity_predict: parity prediction of the intermediate carries for the
// parity-prediction BSD adder.
//
// Predicts P(C), the XOR over all digits of the intermediate carries' parity,
// directly from the operands with logic of its own, so that a fault in ADD1
// cannot corrupt both the carries and their prediction. The parity of a
// carry digit is 1 exactly when the carry is non-zero, which by the ADD1
// table happens when a_i + b_i = +-2, or a_i + b_i = -1 with a negative
// previous-digit sum, or a_i + b_i = +1 with a positive previous-digit sum.
// The document names this unit and its output; the logic here is the
// simplest that computes it. Carry parity does not change under complement,
// so the prediction is the same in both passes. Purely combinational.
module pap_parity_predict #(
  parameter int N = 128
) (
  input  bsd_pkg::bsd_digit_t [N-1:0] a,
  input  bsd_pkg::bsd_digit_t [N-1:0] b,
  output logic                        pc    // predicted P(C)
);
  logic [N-1:0] ap, an, bp, bn;   // digit i of A / B is +1 / -1
  logic [N-1:0] nz;           // carry of digit i is non-zero

  for (genvar i = 0; i < N; i++) begin : g_digit
    logic sum_pos, sum_neg, prev_pos, prev_neg;
    assign ap[i]   = a[i].p & ~a[i].n;
    assign an[i]   = a[i].n & ~a[i].p;
    assign bp[i]   = b[i].p & ~b[i].n;
    assign bn[i]   = b[i].n & ~b[i].p;
    assign sum_pos = (ap[i] & ~bp[i] & ~bn[i]) | (bp[i] & ~ap[i] & ~an[i]);  // a+b = +1
    assign sum_neg = (an[i] & ~bp[i] & ~bn[i]) | (bn[i] & ~ap[i] & ~an[i]);  // a+b = -1
    if (i == 0) begin : g_lsd
      assign prev_pos = 1'b0;
      assign prev_neg = 1'b0;
    end else begin : g_other
      // Previous-digit sum strictly positive / strictly negative.
      assign prev_pos = (ap[i-1] & ~bn[i-1]) | (bp[i-1] & ~an[i-1]);
      assign prev_neg = (an[i-1] & ~bp[i-1]) | (bn[i-1] & ~ap[i-1]);
    end
    assign nz[i] = (ap[i] & bp[i]) | (an[i] & bn[i]) |
                   (sum_neg & prev_neg) | (sum_pos & prev_pos);
  end

  assign pc = ^nz;

endmodule
