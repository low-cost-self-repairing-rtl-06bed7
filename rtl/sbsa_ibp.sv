// sbsa_ibp: self-repairing BSD adder with input bit parities (SBSA-IBP).
//
// Adds two N-digit binary signed-digit operands into an (N+1)-digit sum and
// repairs the sum after a stuck-at or multi-cycle transient fault. Each
// operand digit arrives with its own parity bit, so ibp_input_checker checks
// every operand digit separately, and each full adder of bsd_dr_adder checks
// itself; any number of faulty lines in different digits or adders is
// detected, and the error lines locate them directly. On any error,
// recompute_seq reruns the addition with the operands (and the adder's
// boundary inputs) complemented; the self-dual adder masks each stuck line in
// that pass, and ibp_localizer returns the complement of the second sum with
// the first-pass error lines as the fault location.
//
// Interface and timing are those of sbsa_pcp: valid/ready operand handshake,
// one-cycle out_valid, latency two cycles without error and three with the
// second pass. Fault-injection masks (test hook, tie to 0): flt_in_* and
// flt_fa_* as in bsd_dr_adder; flt_chk_*[i] the first-row error line of
// digit i, [N+i] the second-row line, [2N+i] the digit check of a_i,
// [3N+i] that of b_i. The structure follows the document; the clocking,
// handshake and report format are this design's choices.
module sbsa_ibp #(
  parameter int N = 128
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  output logic                           in_ready,
  input  bsd_pkg::bsd_digit_t [N-1:0]    a,
  input  bsd_pkg::bsd_digit_t [N-1:0]    b,
  input  logic [N-1:0]                   pa,          // P(a_i)
  input  logic [N-1:0]                   pb,          // P(b_i)
  input  logic [4*N-1:0]                 flt_in_sa0,
  input  logic [4*N-1:0]                 flt_in_sa1,
  input  logic [4*N-1:0]                 flt_fa_sa0,
  input  logic [4*N-1:0]                 flt_fa_sa1,
  input  logic [4*N-1:0]                 flt_chk_sa0,
  input  logic [4*N-1:0]                 flt_chk_sa1,
  output logic                           out_valid,
  output bsd_pkg::bsd_digit_t [N:0]      z,
  output bsd_pkg::sbsa_status_e          status,
  output logic [N-1:0]                   loc_e1,      // faulty first-row adders
  output logic [N-1:0]                   loc_e2,      // faulty second-row adders
  output logic [N-1:0]                   loc_ia,      // faulty digits of A
  output logic [N-1:0]                   loc_ib       // faulty digits of B
);
  import bsd_pkg::*;

  logic load, inv, cap1, cap2, err_now, err2;
  bsd_digit_t [N-1:0] a_r, b_r, a_op, b_op, a_line, b_line;
  logic [N-1:0]       pa_r, pb_r;
  bsd_digit_t [N:0]   z_now, z_f, z_2;
  logic [N-1:0]       e1_raw, e2_raw, e1, e2, ia, ib;
  logic [N-1:0]       e1_f, e2_f, ia_f, ib_f, s, bn_inv;

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
      ia_f <= ia;
      ib_f <= ib;
    end
    if (cap2) begin
      z_2  <= z_now;
      err2 <= err_now;
    end
  end

  // 1's complement of the operands in the second pass; digit parities are
  // unchanged by it.
  assign a_op = inv ? ~a_r : a_r;
  assign b_op = inv ? ~b_r : b_r;

  bsd_dr_adder #(.N(N)) u_add (
    .a (a_op), .b (b_op), .h_in (inv), .c_in (inv),
    .flt_in_sa0, .flt_in_sa1, .flt_fa_sa0, .flt_fa_sa1,
    .z (z_now), .e1 (e1_raw), .e2 (e2_raw),
    .a_line, .b_line, .s, .bn_inv
  );

  ibp_input_checker #(.N(N)) u_chk (
    .a_line, .b_line, .pa (pa_r), .pb (pb_r),
    .flt_sa0 (flt_chk_sa0[4*N-1:2*N]), .flt_sa1 (flt_chk_sa1[4*N-1:2*N]),
    .ie_a (ia), .ie_b (ib)
  );

  always_comb begin
    for (int i = 0; i < N; i++) begin
      e1[i] = stuck(e1_raw[i], flt_chk_sa0[i],   flt_chk_sa1[i]);
      e2[i] = stuck(e2_raw[i], flt_chk_sa0[N+i], flt_chk_sa1[N+i]);
    end
    err_now = (|e1) | (|e2) | (|ia) | (|ib);
  end

  ibp_localizer #(.N(N)) u_loc (
    .e1 (e1_f), .e2 (e2_f), .ie_a (ia_f), .ie_b (ib_f), .err2,
    .z_f, .z_2, .status, .loc_e1, .loc_e2, .loc_ia, .loc_ib, .z_out (z)
  );

  // The first-row sums and b.n lines feed the word-parity checker of
  // SBSA-PCP only; not used here.
  logic unused_lines;
  assign unused_lines = ^{s, bn_inv};

endmodule
