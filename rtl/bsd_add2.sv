// bsd_add2: second stage (ADD2) of one digit of the parity-prediction BSD
// adder: the carry-free sum z_i = w_i + c_(i-1).
//
// ADD1 guarantees that w_i and c_(i-1) never have the same non-zero sign, so
// the sum stays in {-1, 0, +1}. As in bsd_add1, the value rule is the
// document's and the bit-level encoding is this design's self-dual choice:
// canonical encoding when w_i.p is 0, complement of the canonical encoding
// of the negated value when w_i.p is 1. A digit pair outside the legal set
// (only possible under a fault) gives zero. Purely combinational.
module bsd_add2 (
  input  bsd_pkg::bsd_digit_t w,
  input  bsd_pkg::bsd_digit_t c_prev,
  output bsd_pkg::bsd_digit_t z
);
  import bsd_pkg::*;

  logic signed [2:0] sum;
  logic signed [1:0] zv;

  always_comb begin
    sum = 3'(digit_val(w)) + 3'(digit_val(c_prev));
    zv  = (sum > 1 || sum < -1) ? 2'sd0 : sum[1:0];
    z   = w.p ? ~digit_enc(-zv) : digit_enc(zv);
  end

endmodule
