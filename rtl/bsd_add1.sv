// bsd_add1: first stage (ADD1) of one digit of the parity-prediction BSD
// adder, using information from the previous digit position.
//
// It splits a_i + b_i into an intermediate carry c_i and a partial sum w_i,
// a_i + b_i = 2*c_i + w_i, choosing w_i so that the later sum
// z_(i+1) = w_(i+1) + c_i can never overflow:
//     a_i + b_i = +2 -> c = +1, w = 0      a_i + b_i = -2 -> c = -1, w = 0
//     a_i + b_i =  0 -> c =  0, w = 0
//     a_i + b_i = -1 -> c = -1, w = +1 if a_(i-1) + b_(i-1) < 0
//                       c =  0, w = -1 otherwise
//     a_i + b_i = +1 -> c = +1, w = -1 if a_(i-1) + b_(i-1) > 0
//                       c =  0, w = +1 otherwise
// The value table is the document's. Its gate-level form is not given, so
// this design builds the encoding to be self-dual, which the correction
// scheme relies on: when a_i.p is 0 the outputs are the canonical encoding
// (zero as 00); when a_i.p is 1 they are the complement of the canonical
// encoding of the negated values (zero as 11). Since the table is odd in its
// inputs, complementing all eight input bits complements both output digits.
// Purely combinational.
module bsd_add1 (
  input  bsd_pkg::bsd_digit_t a,
  input  bsd_pkg::bsd_digit_t b,
  input  bsd_pkg::bsd_digit_t a_prev,
  input  bsd_pkg::bsd_digit_t b_prev,
  output bsd_pkg::bsd_digit_t c,
  output bsd_pkg::bsd_digit_t w
);
  import bsd_pkg::*;

  logic signed [2:0] sum, prev;
  logic signed [1:0] cv, wv;

  always_comb begin
    sum  = 3'(digit_val(a)) + 3'(digit_val(b));
    prev = 3'(digit_val(a_prev)) + 3'(digit_val(b_prev));
    cv   = '0;
    wv   = '0;
    case (sum)
      3'sd2:  cv = 2'sd1;
      -3'sd2: cv = -2'sd1;
      -3'sd1: if (prev < 0) begin cv = -2'sd1; wv = 2'sd1;  end
              else          begin cv = 2'sd0;  wv = -2'sd1; end
      3'sd1:  if (prev > 0) begin cv = 2'sd1;  wv = -2'sd1; end
              else          begin cv = 2'sd0;  wv = 2'sd1;  end
      default: ;
    endcase
    if (a.p) begin
      c = ~digit_enc(-cv);
      w = ~digit_enc(-wv);
    end else begin
      c = digit_enc(cv);
      w = digit_enc(wv);
    end
  end

endmodule
