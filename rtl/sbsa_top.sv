// sbsa_top: the three self-repairing binary signed-digit adders side by side.
//
// SBSA-PaP (parity prediction), SBSA-PCP (word parities plus self-checking
// full adders) and SBSA-IBP (digit parities plus self-checking full adders)
// share the operand inputs a and b; each has its own handshake, its own
// parity inputs, its own fault-injection masks and its own result and
// report, so the three can be run on the same operands and compared. All
// three add two N-digit BSD numbers into an (N+1)-digit sum, detect faults
// with their checkers, recompute once with complemented operands when a
// checker fires, and return the complement of the second sum. See the
// sub-modules for the port meanings and the timing (result two cycles after
// acceptance without error, three with the recomputation).
module sbsa_top #(
  parameter int N = 128
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  bsd_pkg::bsd_digit_t [N-1:0]    a,
  input  bsd_pkg::bsd_digit_t [N-1:0]    b,
  // ---- SBSA-PaP
  input  logic                           pap_in_valid,
  output logic                           pap_in_ready,
  input  logic                           pap_pa,
  input  logic                           pap_pb,
  input  logic [4*N-1:0]                 pap_flt_in_sa0,
  input  logic [4*N-1:0]                 pap_flt_in_sa1,
  input  logic [4*N-1:0]                 pap_flt_add1_sa0,
  input  logic [4*N-1:0]                 pap_flt_add1_sa1,
  input  logic [2*N+1:0]                 pap_flt_z_sa0,
  input  logic [2*N+1:0]                 pap_flt_z_sa1,
  input  logic [1:0]                     pap_flt_chk_sa0,
  input  logic [1:0]                     pap_flt_chk_sa1,
  output logic                           pap_out_valid,
  output bsd_pkg::bsd_digit_t [N:0]      pap_z,
  output bsd_pkg::sbsa_status_e          pap_status,
  output bsd_pkg::pap_fault_type_e       pap_ftype,
  output logic [2*N+1:0]                 pap_eq_mask,
  output logic [$clog2(2*N+3)-1:0]       pap_eq_count,
  // ---- SBSA-PCP
  input  logic                           pcp_in_valid,
  output logic                           pcp_in_ready,
  input  logic                           pcp_pa,
  input  logic                           pcp_pb,
  input  logic [4*N-1:0]                 pcp_flt_in_sa0,
  input  logic [4*N-1:0]                 pcp_flt_in_sa1,
  input  logic [4*N-1:0]                 pcp_flt_fa_sa0,
  input  logic [4*N-1:0]                 pcp_flt_fa_sa1,
  input  logic [2*N:0]                   pcp_flt_chk_sa0,
  input  logic [2*N:0]                   pcp_flt_chk_sa1,
  output logic                           pcp_out_valid,
  output bsd_pkg::bsd_digit_t [N:0]      pcp_z,
  output bsd_pkg::sbsa_status_e          pcp_status,
  output logic                           pcp_adder_fault,
  output logic [N-1:0]                   pcp_fa_e1,
  output logic [N-1:0]                   pcp_fa_e2,
  output logic                           pcp_input_fault,
  output logic [$clog2(N+1)-1:0]         pcp_input_loc,
  // ---- SBSA-IBP
  input  logic                           ibp_in_valid,
  output logic                           ibp_in_ready,
  input  logic [N-1:0]                   ibp_pa,
  input  logic [N-1:0]                   ibp_pb,
  input  logic [4*N-1:0]                 ibp_flt_in_sa0,
  input  logic [4*N-1:0]                 ibp_flt_in_sa1,
  input  logic [4*N-1:0]                 ibp_flt_fa_sa0,
  input  logic [4*N-1:0]                 ibp_flt_fa_sa1,
  input  logic [4*N-1:0]                 ibp_flt_chk_sa0,
  input  logic [4*N-1:0]                 ibp_flt_chk_sa1,
  output logic                           ibp_out_valid,
  output bsd_pkg::bsd_digit_t [N:0]      ibp_z,
  output bsd_pkg::sbsa_status_e          ibp_status,
  output logic [N-1:0]                   ibp_loc_e1,
  output logic [N-1:0]                   ibp_loc_e2,
  output logic [N-1:0]                   ibp_loc_ia,
  output logic [N-1:0]                   ibp_loc_ib
);

  sbsa_pap #(.N(N)) u_pap (
    .clk, .rst_n, .in_valid (pap_in_valid), .in_ready (pap_in_ready),
    .a, .b, .pa (pap_pa), .pb (pap_pb),
    .flt_in_sa0 (pap_flt_in_sa0), .flt_in_sa1 (pap_flt_in_sa1),
    .flt_add1_sa0 (pap_flt_add1_sa0), .flt_add1_sa1 (pap_flt_add1_sa1),
    .flt_z_sa0 (pap_flt_z_sa0), .flt_z_sa1 (pap_flt_z_sa1),
    .flt_chk_sa0 (pap_flt_chk_sa0), .flt_chk_sa1 (pap_flt_chk_sa1),
    .out_valid (pap_out_valid), .z (pap_z), .status (pap_status),
    .ftype (pap_ftype), .eq_mask (pap_eq_mask), .eq_count (pap_eq_count)
  );

  sbsa_pcp #(.N(N)) u_pcp (
    .clk, .rst_n, .in_valid (pcp_in_valid), .in_ready (pcp_in_ready),
    .a, .b, .pa (pcp_pa), .pb (pcp_pb),
    .flt_in_sa0 (pcp_flt_in_sa0), .flt_in_sa1 (pcp_flt_in_sa1),
    .flt_fa_sa0 (pcp_flt_fa_sa0), .flt_fa_sa1 (pcp_flt_fa_sa1),
    .flt_chk_sa0 (pcp_flt_chk_sa0), .flt_chk_sa1 (pcp_flt_chk_sa1),
    .out_valid (pcp_out_valid), .z (pcp_z), .status (pcp_status),
    .adder_fault (pcp_adder_fault), .fa_e1 (pcp_fa_e1), .fa_e2 (pcp_fa_e2),
    .input_fault (pcp_input_fault), .input_loc (pcp_input_loc)
  );

  sbsa_ibp #(.N(N)) u_ibp (
    .clk, .rst_n, .in_valid (ibp_in_valid), .in_ready (ibp_in_ready),
    .a, .b, .pa (ibp_pa), .pb (ibp_pb),
    .flt_in_sa0 (ibp_flt_in_sa0), .flt_in_sa1 (ibp_flt_in_sa1),
    .flt_fa_sa0 (ibp_flt_fa_sa0), .flt_fa_sa1 (ibp_flt_fa_sa1),
    .flt_chk_sa0 (ibp_flt_chk_sa0), .flt_chk_sa1 (ibp_flt_chk_sa1),
    .out_valid (ibp_out_valid), .z (ibp_z), .status (ibp_status),
    .loc_e1 (ibp_loc_e1), .loc_e2 (ibp_loc_e2),
    .loc_ia (ibp_loc_ia), .loc_ib (ibp_loc_ib)
  );

endmodule
