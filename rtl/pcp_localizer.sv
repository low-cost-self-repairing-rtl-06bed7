// pcp_localizer: decision logic of the SBSA-PCP self-repairing adder.
//
// Inputs are the first-pass error lines (one per full adder, plus the single
// input-parity flag), whether any indicator fired in the second pass, and the
// sums of both passes (z_f: true operands, z_2: complemented operands). A sum
// bit on which the two passes agree is a bit the fault corrupted in pass 1.
//
//   no error in pass 1             : ST_OK, result z_f
//   error in pass 1, none in pass 2: result ~z_2 (ST_CORRECTED); the fault
//     is located by the source of the first error:
//       a full-adder error line    -> that adder (fa_e1/fa_e2 hold the
//                                     first-pass lines, adder_fault = 1)
//       the input-parity flag only -> an operand line: a fault on digit i's
//                                     lines always corrupts z_i.p and may
//                                     corrupt up to z_(i+2), so the lowest
//                                     sum digit with an equal bit is the
//                                     faulty input digit (input_loc)
//     with no equal bit at all the first error was a passing transient
//     (ST_TRANSIENT; an adder location is still reported, an input digit
//     cannot be)
//   error in both passes           : 0 equal bits -> ST_CHECKER_FAIL (sum
//                                    right, result ~z_2), else ST_MULTI_FAULT
// The decision tree and the lowest-equal-digit rule follow the document; the
// transient outcome and the output on multiple faults are this design's
// choices. Adder-line errors take precedence over the input flag, because a
// fault on a first-row sum raises both. Purely combinational.
module pcp_localizer #(
  parameter int N = 128
) (
  input  logic [N-1:0]                   e1,          // pass-1 first-row errors
  input  logic [N-1:0]                   e2,          // pass-1 second-row errors
  input  logic                           input_err,   // pass-1 input-parity error
  input  logic                           err2,        // any indicator in pass 2
  input  bsd_pkg::bsd_digit_t [N:0]      z_f,
  input  bsd_pkg::bsd_digit_t [N:0]      z_2,
  output bsd_pkg::sbsa_status_e          status,
  output logic                           adder_fault,
  output logic [N-1:0]                   fa_e1,
  output logic [N-1:0]                   fa_e2,
  output logic                           input_fault,
  output logic [$clog2(N+1)-1:0]         input_loc,
  output bsd_pkg::bsd_digit_t [N:0]      z_out
);
  import bsd_pkg::*;

  logic           err1;
  logic [N:0]     eq_digit;   // digit i has at least one equal bit

  always_comb begin
    err1        = (|e1) | (|e2) | input_err;
    for (int i = 0; i <= N; i++)
      eq_digit[i] = (z_f[i].p == z_2[i].p) | (z_f[i].n == z_2[i].n);
    status      = ST_OK;
    adder_fault = 1'b0;
    fa_e1       = '0;
    fa_e2       = '0;
    input_fault = 1'b0;
    input_loc   = '0;
    z_out       = ~z_2;
    if (!err1) begin
      z_out = z_f;
    end else if (err2) begin
      status = (|eq_digit) ? ST_MULTI_FAULT : ST_CHECKER_FAIL;
    end else begin
      status = (|eq_digit) ? ST_CORRECTED : ST_TRANSIENT;
      if ((|e1) | (|e2)) begin
        adder_fault = 1'b1;
        fa_e1       = e1;
        fa_e2       = e2;
      end else begin
        input_fault = |eq_digit;
        for (int i = N; i >= 0; i--)
          if (eq_digit[i]) input_loc = $bits(input_loc)'(i);
      end
    end
  end

endmodule
