// ibp_localizer: decision logic of the SBSA-IBP self-repairing adder.
//
// Every full adder and every operand digit has its own error line, so no
// comparison of results is needed to locate a fault: the first-pass error
// lines are the location.
//
//   no error in pass 1             : ST_OK, result z_f
//   error in pass 1, none in pass 2: ST_CORRECTED, result ~z_2; the
//                                    first-pass lines are reported as the
//                                    faulty adders (loc_e1, loc_e2) and
//                                    operand digits (loc_ia, loc_ib)
//   error in both passes           : the sums of the two passes are
//                                    compared: exact complements ->
//                                    ST_CHECKER_FAIL (sum right, result
//                                    ~z_2), otherwise ST_MULTI_FAULT
// A pass-1 error whose two sums are exact complements is reported as
// ST_TRANSIENT (the error lines still give its location). That outcome and
// the result given on multiple faults are this design's choices; the rest
// follows the document. Purely combinational.
module ibp_localizer #(
  parameter int N = 128
) (
  input  logic [N-1:0]                   e1,
  input  logic [N-1:0]                   e2,
  input  logic [N-1:0]                   ie_a,
  input  logic [N-1:0]                   ie_b,
  input  logic                           err2,
  input  bsd_pkg::bsd_digit_t [N:0]      z_f,
  input  bsd_pkg::bsd_digit_t [N:0]      z_2,
  output bsd_pkg::sbsa_status_e          status,
  output logic [N-1:0]                   loc_e1,
  output logic [N-1:0]                   loc_e2,
  output logic [N-1:0]                   loc_ia,
  output logic [N-1:0]                   loc_ib,
  output bsd_pkg::bsd_digit_t [N:0]      z_out
);
  import bsd_pkg::*;

  logic err1, any_eq;

  always_comb begin
    err1   = (|e1) | (|e2) | (|ie_a) | (|ie_b);
    any_eq = |(~(z_f ^ z_2));
    status = ST_OK;
    loc_e1 = '0;
    loc_e2 = '0;
    loc_ia = '0;
    loc_ib = '0;
    z_out  = ~z_2;
    if (!err1) begin
      z_out = z_f;
    end else if (err2) begin
      status = any_eq ? ST_MULTI_FAULT : ST_CHECKER_FAIL;
    end else begin
      status = any_eq ? ST_CORRECTED : ST_TRANSIENT;
      loc_e1 = e1;
      loc_e2 = e2;
      loc_ia = ie_a;
      loc_ib = ie_b;
    end
  end

endmodule
