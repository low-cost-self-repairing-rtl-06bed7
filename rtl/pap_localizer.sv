// pap_localizer: decision logic of the SBSA-PaP self-repairing adder.
//
// Inputs are the two sums of one addition, z_f from the first pass (true
// operands) and z_2 from the second pass (complemented operands), and the
// error indicators of both passes. For a fault-free bit the two passes give
// complementary values; a bit on which they agree (an "equality") is a bit
// that a stuck-at or multi-cycle transient fault corrupted in the first pass
// and that the complement masked in the second.
//
//   no error in pass 1             : ST_OK, result z_f
//   error in pass 1, none in pass 2: result ~z_2, and from the number of
//                                    equal bits: 0 -> ST_TRANSIENT,
//                                    1 -> type 1, 2 or 3 fault,
//                                    2 -> type 2 or 3, 3+ -> type 3
//                                    (all ST_CORRECTED)
//   error in both passes           : 0 equal bits -> ST_CHECKER_FAIL
//                                    (the sum is right: result ~z_2),
//                                    otherwise ST_MULTI_FAULT (result ~z_2,
//                                    not to be trusted)
// The fault types are those of the shifted-operand scheme the design builds
// on: type 1 is a fault in an adder stage output (up to one wrong sum bit),
// types 2 and 3 are faults on operand lines (up to two and three wrong sum
// bits). eq_mask marks the equal bits, so it also points at the faulty sum
// digits. The decision tree follows the document; the result on multiple
// faults is this design's choice. Purely combinational; the inputs are
// registered by the caller.
module pap_localizer #(
  parameter int N = 128
) (
  input  logic                           err1,   // any indicator in pass 1
  input  logic                           err2,   // any indicator in pass 2
  input  bsd_pkg::bsd_digit_t [N:0]      z_f,
  input  bsd_pkg::bsd_digit_t [N:0]      z_2,
  output bsd_pkg::sbsa_status_e          status,
  output bsd_pkg::pap_fault_type_e       ftype,
  output logic [2*N+1:0]                 eq_mask,
  output logic [$clog2(2*N+3)-1:0]       eq_count,
  output bsd_pkg::bsd_digit_t [N:0]      z_out
);
  import bsd_pkg::*;

  always_comb begin
    eq_mask  = err1 ? ~(z_f ^ z_2) : '0;
    eq_count = $bits(eq_count)'($countones(eq_mask));
    ftype    = FT_NONE;
    z_out    = ~z_2;
    if (!err1) begin
      status = ST_OK;
      z_out  = z_f;
    end else if (err2) begin
      status = (eq_count == 0) ? ST_CHECKER_FAIL : ST_MULTI_FAULT;
    end else begin
      status = (eq_count == 0) ? ST_TRANSIENT : ST_CORRECTED;
      if      (eq_count == 1) ftype = FT_T123;
      else if (eq_count == 2) ftype = FT_T23;
      else if (eq_count >= 3) ftype = FT_T3;
    end
  end

endmodule
