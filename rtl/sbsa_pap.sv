// sbsa_pap: self-repairing BSD adder with parity prediction (SBSA-PaP).
//
// Adds two N-digit binary signed-digit operands into an (N+1)-digit sum with
// the parity-checked adder pap_sc_adder (ADD1/ADD2 stages, Error Indicators
// 1 and 2 from the supplied word parities P(A), P(B) and a predicted carry
// parity). When an indicator fires, recompute_seq reruns the addition with
// the operands complemented. Every stage is self-dual at bit level, so the
// second sum is the exact complement of the correct sum wherever a single
// stuck-at or multi-cycle transient fault was masked; pap_localizer returns
// its complement and classifies the fault from the number of sum bits on
// which the two passes agree (transient, type 1/2/3, checker failure,
// multiple faults). Only an odd number of faulty lines is detected, as with
// any single parity.
//
// Interface and timing are those of sbsa_pcp: valid/ready operand handshake,
// one-cycle out_valid, latency two cycles without error and three with the
// second pass. Fault-injection masks (test hook, tie to 0) are those of
// pap_sc_adder. The structure follows the document; the clocking, handshake
// and report format are this design's choices.
module sbsa_pap #(
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
  input  logic [4*N-1:0]                 flt_add1_sa0,
  input  logic [4*N-1:0]                 flt_add1_sa1,
  input  logic [2*N+1:0]                 flt_z_sa0,
  input  logic [2*N+1:0]                 flt_z_sa1,
  input  logic [1:0]                     flt_chk_sa0,
  input  logic [1:0]                     flt_chk_sa1,
  output logic                           out_valid,
  output bsd_pkg::bsd_digit_t [N:0]      z,
  output bsd_pkg::sbsa_status_e          status,
  output bsd_pkg::pap_fault_type_e       ftype,
  output logic [2*N+1:0]                 eq_mask,     // sum bits equal in both passes
  output logic [$clog2(2*N+3)-1:0]       eq_count
);
  import bsd_pkg::*;

  logic load, inv, cap1, cap2, err_now, err1, err2, ei1, ei2;
  bsd_digit_t [N-1:0] a_r, b_r, a_op, b_op;
  logic               pa_r, pb_r;
  bsd_digit_t [N:0]   z_now, z_f, z_2;

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
      err1 <= err_now;
    end
    if (cap2) begin
      z_2  <= z_now;
      err2 <= err_now;
    end
  end

  assign a_op    = inv ? ~a_r : a_r;
  assign b_op    = inv ? ~b_r : b_r;
  assign err_now = ei1 | ei2;

  pap_sc_adder #(.N(N)) u_add (
    .a (a_op), .b (b_op), .pa (pa_r), .pb (pb_r), .bnd (inv),
    .flt_in_sa0, .flt_in_sa1, .flt_add1_sa0, .flt_add1_sa1,
    .flt_z_sa0, .flt_z_sa1, .flt_chk_sa0, .flt_chk_sa1,
    .z (z_now), .ei1, .ei2
  );

  pap_localizer #(.N(N)) u_loc (
    .err1, .err2, .z_f, .z_2, .status, .ftype, .eq_mask, .eq_count, .z_out (z)
  );

endmodule
