// bsd_dr_adder: N-digit binary signed-digit adder by double recoding, built
// from two rows of self-checking full adders.
//
// Digit i of each operand is (p, n) with value p - n. The first-row adder of
// digit i adds a_i.p, ~a_i.n and b_i.p, that is a_i + b_i.p + 1 in 0..3, and
// splits it into a sum bit s_i and a carry h_(i+1):
//     2*h_(i+1) + s_i = a_i + b_i.p + 1.
// The second-row adder of digit i adds s_i, ~b_i.n and h_i:
//     2*cout_i + zp_i = s_i - b_i.n + 1 + h_i.
// Its inverted carry-out is c_(i+1), which becomes the negative bit of the
// next sum digit; its sum is the positive bit of this digit:
//     z_i = (p = zp_i, n = c_i).
// No carry travels further than one digit, so the delay does not depend on N.
// The top digit z_N carries the two carries leaving the word: the first-row
// carry h_N (weight +2^N) and the second-row carry c_N (weight -2^N):
//     z_N = (p = h_N, n = c_N).
// With h_0 = c_0 = 0 the result satisfies Z = A + B exactly (N+1 digits).
// The negative bit of z_0 is c_0 itself, so that output is the input c_in.
//
// Every full adder is an sc_full_adder and raises its own error line: e1[i]
// for the first row, e2[i] for the second row. The adder is self-dual: if the
// operands and the two boundary inputs h_in (h_0) and c_in (c_0) are all
// complemented, every internal line and every output bit is complemented. The
// caller therefore drives h_in and c_in with 0 for a normal computation and
// with 1 for the complemented recomputation.
//
// The rows, the inverted inputs and the carry wiring follow the document's
// figures. The top-digit encoding, the boundary inputs and the fault-injection
// masks are this design's choices. Fault masks (tie to 0 in use):
//   flt_in_*[4i+0..3] : input lines a_i.p, a_i.n, b_i.p, b_i.n
//   flt_fa_*[4i+0..3] : first-row sum, first-row carry, second-row sum,
//                       second-row carry of digit i
// a_line/b_line are the operand lines as the adders see them (after any
// injected input fault); s and bn_inv feed the input-parity checkers.
// Purely combinational.
module bsd_dr_adder #(
  parameter int N = 128
) (
  input  bsd_pkg::bsd_digit_t [N-1:0] a,
  input  bsd_pkg::bsd_digit_t [N-1:0] b,
  input  logic                        h_in,     // h_0
  input  logic                        c_in,     // c_0 (negative bit of z_0)
  input  logic [4*N-1:0]              flt_in_sa0,
  input  logic [4*N-1:0]              flt_in_sa1,
  input  logic [4*N-1:0]              flt_fa_sa0,
  input  logic [4*N-1:0]              flt_fa_sa1,
  output bsd_pkg::bsd_digit_t [N:0]   z,
  output logic [N-1:0]                e1,       // first-row adder errors
  output logic [N-1:0]                e2,       // second-row adder errors
  output bsd_pkg::bsd_digit_t [N-1:0] a_line,
  output bsd_pkg::bsd_digit_t [N-1:0] b_line,
  output logic [N-1:0]                s,        // first-row sums s_i
  output logic [N-1:0]                bn_inv    // ~b_i.n as applied to the second row
);
  import bsd_pkg::*;

  logic [N:0] h;   // h[i]: first-row carry into digit i
  logic [N:0] c;   // c[i]: inverted second-row carry into digit i
  logic [N:0] zp;  // positive bits of the sum digits

  assign h[0] = h_in;
  assign c[0] = c_in;

  for (genvar i = 0; i < N; i++) begin : g_digit
    logic cout2;

    always_comb begin
      a_line[i].p = stuck(a[i].p, flt_in_sa0[4*i+0], flt_in_sa1[4*i+0]);
      a_line[i].n = stuck(a[i].n, flt_in_sa0[4*i+1], flt_in_sa1[4*i+1]);
      b_line[i].p = stuck(b[i].p, flt_in_sa0[4*i+2], flt_in_sa1[4*i+2]);
      b_line[i].n = stuck(b[i].n, flt_in_sa0[4*i+3], flt_in_sa1[4*i+3]);
      bn_inv[i]   = ~b_line[i].n;
    end

    sc_full_adder u_fa1 (
      .a       (a_line[i].p),
      .b       (~a_line[i].n),
      .cin     (b_line[i].p),
      .flt_sa0 (flt_fa_sa0[4*i+1 -: 2]),
      .flt_sa1 (flt_fa_sa1[4*i+1 -: 2]),
      .sum     (s[i]),
      .cout    (h[i+1]),
      .ef      (e1[i])
    );

    sc_full_adder u_fa2 (
      .a       (s[i]),
      .b       (bn_inv[i]),
      .cin     (h[i]),
      .flt_sa0 (flt_fa_sa0[4*i+3 -: 2]),
      .flt_sa1 (flt_fa_sa1[4*i+3 -: 2]),
      .sum     (zp[i]),
      .cout    (cout2),
      .ef      (e2[i])
    );

    assign c[i+1] = ~cout2;
  end

  assign zp[N] = h[N];
  always_comb
    for (int i = 0; i <= N; i++) z[i] = '{p: zp[i], n: c[i]};

endmodule
