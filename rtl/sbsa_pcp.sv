// sbsa_pcp: self-repairing BSD adder with pre-calculated input parities
// (SBSA-PCP).
//
// Adds two N-digit binary signed-digit operands into an (N+1)-digit sum and
// repairs the sum when a single stuck-at or multi-cycle transient fault hits
// an operand line or one of the full adders. Faults are detected by
//   - the self-checking full adders of bsd_dr_adder (one error line each),
//   - pcp_input_checker, which checks the supplied word parities P(A), P(B)
//     against the first-row sums and the b.n lines.
// If any of them fires, recompute_seq reruns the addition with both operands
// (and the adder's boundary inputs) complemented. The adder is self-dual, so
// the second sum is the complement of the correct sum on every bit the fault
// does not touch, and on the faulty bit the complement drives the stuck line
// to the value it is stuck at, masking the fault. pcp_localizer then returns
// the complement of the second sum and reports the faulty adder or input
// digit.
//
// Interface: valid/ready operand handshake (one addition in flight), and a
// one-cycle out_valid strobe with the result and report. Latency: out_valid
// two cycles after the accepting edge without error, three with the second
// pass. The fault-injection masks are a test hook of this design (tie to 0):
// flt_in_* and flt_fa_* as in bsd_dr_adder; flt_chk_*[i] the first-row error
// line of digit i, [N+i] the second-row line, [2N] the input-parity flag.
// The structure follows the document; the clocking, handshake and report
// format are this design's choices.
module sbsa_pcp #(
  parameter int N = 128
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  output logic                           in_ready,
  input  bsd_pkg::bsd_digit_t [N-1:0]    a,
  input  bsd_pkg::bsd_digit_t [N-1:0]    b,
  input  logic                           pa,          // P(A)
  input  logic                           pb,          // P(B)
  input  logic [4*N-1:0]                 flt_in_sa0,
  input  logic [4*N-1:0]                 flt_in_sa1,
  input  logic [4*N-1:0]                 flt_fa_sa0,
  input  logic [4*N-1:0]                 flt_fa_sa1,
  input  logic [2*N:0]                   flt_chk_sa0,
  input  logic [2*N:0]                   flt_chk_sa1,
  output logic                           out_valid,
  output bsd_pkg::bsd_digit_t [N:0]      z,
  output bsd_pkg::sbsa_status_e          status,
  output logic                           adder_fault,
  output logic [N-1:0]                   fa_e1,
  output logic [N-1:0]                   fa_e2,
  output logic                           input_fault,
  output logic [$clog2(N+1)-1:0]         input_loc
);
  import bsd_pkg::*;

  logic load, inv, cap1, cap2, err_now;
  bsd_digit_t [N-1:0] a_r, b_r, a_op, b_op, a_line, b_line;
  logic               pa_r, pb_r;
  bsd_digit_t [N:0]   z_now, z_f, z_2;
  logic [N-1:0]       e1_raw, e2_raw, e1, e2, e1_f, e2_f, s, bn_inv;
  logic               ie, ie_f, err2;

  recompute_seq u_seq (
    .clk, .rst_n, .in_valid, .in_ready, .err(err_now),
    .load, .inv, .cap1, .cap2, .out_valid
  );

  always_ff @(posedge clk) begin
    if (load) begin
      a_r  <= a;
      b_r  <= b;
      pa_r <= pa;
      pb_r <= pb;
    end
    if (cap1) begin
      z_f  <= z_now;
      e1_f <= e1;
      e2_f <= e2;
      ie_f <= ie;
    end
    if (cap2) begin
      z_2  <= z_now;
      err2 <= err_now;
    end
  end

  // 1's complement of the operands in the second pass.
  assign a_op = inv ? ~a_r : a_r;
  assign b_op = inv ? ~b_r : b_r;

  bsd_dr_adder #(.N(N)) u_add (
    .a (a_op), .b (b_op), .h_in (inv), .c_in (inv),
    .flt_in_sa0, .flt_in_sa1, .flt_fa_sa0, .flt_fa_sa1,
    .z (z_now), .e1 (e1_raw), .e2 (e2_raw),
    .a_line, .b_line, .s, .bn_inv
  );

  pcp_input_checker #(.N(N)) u_chk (
    .pa (pa_r), .pb (pb_r), .s, .bn_inv,
    .flt_sa0 (flt_chk_sa0[2*N]), .flt_sa1 (flt_chk_sa1[2*N]),
    .input_err (ie)
  );

  always_comb begin
    for (int i = 0; i < N; i++) begin
      e1[i] = stuck(e1_raw[i], flt_chk_sa0[i],   flt_chk_sa1[i]);
      e2[i] = stuck(e2_raw[i], flt_chk_sa0[N+i], flt_chk_sa1[N+i]);
    end
    err_now = (|e1) | (|e2) | ie;
  end

  pcp_localizer #(.N(N)) u_loc (
    .e1 (e1_f), .e2 (e2_f), .input_err (ie_f), .err2,
    .z_f, .z_2, .status, .adder_fault, .fa_e1, .fa_e2,
    .input_fault, .input_loc, .z_out (z)
  );

  // The operand lines are checked per digit only in SBSA-IBP; not used here.
  logic unused_lines;
  assign unused_lines = ^{a_line, b_line};

endmodule
