// pap_sc_adder: self-checking BSD adder with parity prediction, the datapath
// of the SBSA-PaP design.
//
// Each digit has an ADD1 (bsd_add1), which turns a_i + b_i into an
// intermediate carry c_i and a partial sum w_i using the previous digit
// position, and an ADD2 (bsd_add2), which forms z_i = w_i + c_(i-1). The top
// sum digit is z_N = c_(N-1), so Z = A + B has N+1 digits. Two parity
// identities check the result, with P(x) the XOR of all bits of x:
//     Error Indicator 1: P(W) = P(A) ^ P(B)          (ei1 = 1 on mismatch)
//     Error Indicator 2: P(Z) = P(W) ^ P(C)          (ei2 = 1 on mismatch)
// P(A) and P(B) come with the operands; P(C) is predicted from the operands
// by pap_parity_predict.
//
// All parts are self-dual at bit level, so complementing the operands and the
// boundary input bnd (which stands for the missing digit -1: its operand
// digits and its carry are both encoded {bnd, bnd}, a zero either way)
// complements every sum bit. The parities are unchanged by the complement
// and are applied as they are in both passes.
//
// ADD1/ADD2, the parity identities and the two indicators follow the
// document; the bit-level encodings, the boundary and the fault masks are
// this design's choices. Fault masks (tie to 0 in use):
//   flt_in_*[4i+0..3]   : input lines a_i.p, a_i.n, b_i.p, b_i.n
//   flt_add1_*[4i+0..3] : ADD1 outputs c_i.p, c_i.n, w_i.p, w_i.n
//   flt_z_*[2i+0..1]    : sum lines z_i.p, z_i.n (i = 0..N)
//   flt_chk_*[1:0]      : indicator lines {ei2, ei1}
// Purely combinational.
module pap_sc_adder #(
  parameter int N = 128
) (
  input  bsd_pkg::bsd_digit_t [N-1:0] a,
  input  bsd_pkg::bsd_digit_t [N-1:0] b,
  input  logic                        pa,     // P(A)
  input  logic                        pb,     // P(B)
  input  logic                        bnd,    // 0: normal pass, 1: complemented pass
  input  logic [4*N-1:0]              flt_in_sa0,
  input  logic [4*N-1:0]              flt_in_sa1,
  input  logic [4*N-1:0]              flt_add1_sa0,
  input  logic [4*N-1:0]              flt_add1_sa1,
  input  logic [2*N+1:0]              flt_z_sa0,
  input  logic [2*N+1:0]              flt_z_sa1,
  input  logic [1:0]                  flt_chk_sa0,
  input  logic [1:0]                  flt_chk_sa1,
  output bsd_pkg::bsd_digit_t [N:0]   z,
  output logic                        ei1,
  output logic                        ei2
);
  import bsd_pkg::*;

  bsd_digit_t [N-1:0] al, bl;     // operand lines after injected faults
  bsd_digit_t [N-1:0] c_raw, w_raw, c, w;
  bsd_digit_t [N:0]   z_raw;
  bsd_digit_t         zero_b;     // boundary digit, a zero in either pass
  logic               pc_pred;

  assign zero_b = '{p: bnd, n: bnd};

  for (genvar i = 0; i < N; i++) begin : g_lines
    assign al[i].p = stuck(a[i].p, flt_in_sa0[4*i+0], flt_in_sa1[4*i+0]);
    assign al[i].n = stuck(a[i].n, flt_in_sa0[4*i+1], flt_in_sa1[4*i+1]);
    assign bl[i].p = stuck(b[i].p, flt_in_sa0[4*i+2], flt_in_sa1[4*i+2]);
    assign bl[i].n = stuck(b[i].n, flt_in_sa0[4*i+3], flt_in_sa1[4*i+3]);
    assign c[i].p  = stuck(c_raw[i].p, flt_add1_sa0[4*i+0], flt_add1_sa1[4*i+0]);
    assign c[i].n  = stuck(c_raw[i].n, flt_add1_sa0[4*i+1], flt_add1_sa1[4*i+1]);
    assign w[i].p  = stuck(w_raw[i].p, flt_add1_sa0[4*i+2], flt_add1_sa1[4*i+2]);
    assign w[i].n  = stuck(w_raw[i].n, flt_add1_sa0[4*i+3], flt_add1_sa1[4*i+3]);
  end
  for (genvar i = 0; i <= N; i++) begin : g_zlines
    assign z[i].p = stuck(z_raw[i].p, flt_z_sa0[2*i+0], flt_z_sa1[2*i+0]);
    assign z[i].n = stuck(z_raw[i].n, flt_z_sa0[2*i+1], flt_z_sa1[2*i+1]);
  end

  for (genvar i = 0; i < N; i++) begin : g_digit
    bsd_add1 u_add1 (
      .a      (al[i]),
      .b      (bl[i]),
      .a_prev ((i == 0) ? zero_b : al[(i == 0) ? 0 : i-1]),
      .b_prev ((i == 0) ? zero_b : bl[(i == 0) ? 0 : i-1]),
      .c      (c_raw[i]),
      .w      (w_raw[i])
    );
    bsd_add2 u_add2 (
      .w      (w[i]),
      .c_prev ((i == 0) ? zero_b : c[(i == 0) ? 0 : i-1]),
      .z      (z_raw[i])
    );
  end
  assign z_raw[N] = c[N-1];

  pap_parity_predict #(.N(N)) u_pred (
    .a  (al),
    .b  (bl),
    .pc (pc_pred)
  );

  always_comb begin
    ei1 = stuck(pa ^ pb ^ (^w), flt_chk_sa0[0], flt_chk_sa1[0]);
    ei2 = stuck((^z) ^ (^w) ^ pc_pred, flt_chk_sa0[1], flt_chk_sa1[1]);
  end

endmodule
