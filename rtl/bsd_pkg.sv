// bsd_pkg: shared types and helper functions for the self-repairing binary
// signed-digit (BSD) adders.
//
// A BSD digit takes the values -1, 0 and +1 and is carried on two wires, a
// positive-weight bit p and a negative-weight bit n, so that value = p - n:
//   +1 = (p=1,n=0), -1 = (p=0,n=1), 0 = (0,0) or (1,1).
// Both encodings of zero are legal. Inverting both wires of a digit therefore
// negates its value, which is what makes the 1's complement of a BSD word its
// additive inverse and what lets the adders mask a stuck line by recomputing
// with complemented operands.
//
// The package also holds the status reported by the correction/localization
// units and a stuck-at helper used by the fault-injection points that every
// datapath module exposes for testing (tie the masks to zero in use).
package bsd_pkg;

  typedef struct packed {
    logic p;  // positive-weight bit
    logic n;  // negative-weight bit
  } bsd_digit_t;

  // Outcome of one addition, as decided by the correction/localization units.
  typedef enum logic [2:0] {
    ST_OK           = 3'd0,  // no error indicator fired: first result used as is
    ST_TRANSIENT    = 3'd1,  // error seen, but the two results are exact complements
    ST_CORRECTED    = 3'd2,  // fault masked by the complemented recomputation
    ST_CHECKER_FAIL = 3'd3,  // indicators fired twice, results complementary
    ST_MULTI_FAULT  = 3'd4   // indicators fired twice, results disagree: not correctable
  } sbsa_status_e;

  // Fault class of the parity-prediction design (SBSA-PaP), from the number of
  // sum bits that did not flip between the two computations.
  typedef enum logic [1:0] {
    FT_NONE   = 2'd0,  // no equal bits
    FT_T123   = 2'd1,  // one equal bit: type 1, 2 or 3
    FT_T23    = 2'd2,  // two equal bits: type 2 or 3
    FT_T3     = 2'd3   // three or more equal bits: type 3
  } pap_fault_type_e;

  // Numeric value of a digit: +1, 0 or -1.
  function automatic logic signed [1:0] digit_val(bsd_digit_t d);
    return $signed({1'b0, d.p}) - $signed({1'b0, d.n});
  endfunction

  // Canonical encoding of a digit value; zero is encoded 00.
  function automatic bsd_digit_t digit_enc(logic signed [1:0] v);
    bsd_digit_t d;
    d.p = (v == 2'sd1);
    d.n = (v == -2'sd1);
    return d;
  endfunction

  // Digit parity P(d) = p xor n: 1 for a non-zero digit, 0 for zero.
  function automatic logic digit_par(bsd_digit_t d);
    return d.p ^ d.n;
  endfunction

  // Stuck-at fault model of one line: a set bit in sa0 (sa1) forces it to 0 (1).
  function automatic logic stuck(logic x, logic sa0, logic sa1);
    return (x & ~sa0) | sa1;
  endfunction

endpackage
