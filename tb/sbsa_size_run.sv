// sbsa_size_run: test driver for sbsa_top at one size N, used by
// tb_sbsa_sizes to run the digit counts the designs are evaluated at.
//
// It instantiates sbsa_top #(N) and runs OPS additions on all three variants
// at once with random operands. The additions cycle through three cases:
// no fault (ST_OK, 2 cycles), one operand line stuck at the complement of its
// value (ST_CORRECTED, 3 cycles, located by PCP and IBP), and one stuck
// full-adder output in PCP/IBP with one stuck sum line in PaP (ST_CORRECTED
// where it hit). Every result is compared with A + B computed with integers.
// Interface: clk in; done goes high when finished, with checks and failures
// holding the counts. Uses the same handshake as the other testbenches:
// inputs change on the falling edge.
module sbsa_size_run #(
  parameter int N   = 8,
  parameter int OPS = 60
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  import bsd_pkg::*;
  import tb_bsd_pkg::*;
  localparam int CW = $clog2(2*N+3);
  localparam int LW = $clog2(N+1);

  logic rst_n = 0, in_valid = 0;
  bsd_digit_t [N-1:0] a, b;
  logic pap_in_ready, pap_pa, pap_pb, pap_out_valid;
  logic [4*N-1:0] pap_fi0, pap_fi1, zero4;
  logic [2*N+1:0] pap_fz0, pap_fz1, pap_eq_mask;
  bsd_digit_t [N:0] pap_z, pcp_z, ibp_z;
  sbsa_status_e    pap_status, pcp_status, ibp_status;
  pap_fault_type_e pap_ftype;
  logic [CW-1:0]   pap_eq_count;
  logic pcp_in_ready, pcp_out_valid, pcp_adder_fault, pcp_input_fault;
  logic [4*N-1:0] fi0, fi1, ff0, ff1;
  logic [N-1:0]   pcp_fa_e1, pcp_fa_e2;
  logic [LW-1:0]  pcp_input_loc;
  logic ibp_in_ready, ibp_out_valid;
  logic [N-1:0]   ibp_pa, ibp_pb, ibp_loc_e1, ibp_loc_e2, ibp_loc_ia, ibp_loc_ib;

  assign zero4 = '0;

  sbsa_top #(.N(N)) dut (
    .clk, .rst_n, .a, .b,
    .pap_in_valid(in_valid), .pap_in_ready, .pap_pa, .pap_pb,
    .pap_flt_in_sa0(fi0), .pap_flt_in_sa1(fi1),
    .pap_flt_add1_sa0(zero4), .pap_flt_add1_sa1(zero4),
    .pap_flt_z_sa0(pap_fz0), .pap_flt_z_sa1(pap_fz1),
    .pap_flt_chk_sa0(2'b00), .pap_flt_chk_sa1(2'b00),
    .pap_out_valid, .pap_z, .pap_status, .pap_ftype, .pap_eq_mask, .pap_eq_count,
    .pcp_in_valid(in_valid), .pcp_in_ready, .pcp_pa(pap_pa), .pcp_pb(pap_pb),
    .pcp_flt_in_sa0(fi0), .pcp_flt_in_sa1(fi1),
    .pcp_flt_fa_sa0(ff0), .pcp_flt_fa_sa1(ff1),
    .pcp_flt_chk_sa0((2*N+1)'(0)), .pcp_flt_chk_sa1((2*N+1)'(0)),
    .pcp_out_valid, .pcp_z, .pcp_status, .pcp_adder_fault, .pcp_fa_e1, .pcp_fa_e2,
    .pcp_input_fault, .pcp_input_loc,
    .ibp_in_valid(in_valid), .ibp_in_ready, .ibp_pa, .ibp_pb,
    .ibp_flt_in_sa0(fi0), .ibp_flt_in_sa1(fi1),
    .ibp_flt_fa_sa0(ff0), .ibp_flt_fa_sa1(ff1),
    .ibp_flt_chk_sa0(zero4), .ibp_flt_chk_sa1(zero4),
    .ibp_out_valid, .ibp_z, .ibp_status, .ibp_loc_e1, .ibp_loc_e2,
    .ibp_loc_ia, .ibp_loc_ib
  );

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL N=%0d %s @%0t", N, msg, $time); end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    fi0 = '0; fi1 = '0; ff0 = '0; ff1 = '0; pap_fz0 = '0; pap_fz1 = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < OPS; t++) begin
      word_t wa, wb;
      big_t  ref_v;
      int    scen, line, zl, d;
      bit    sv;
      scen = t % 3;
      wa = rand_word(N); wb = rand_word(N);
      ref_v = word_val(wa, N) + word_val(wb, N);
      fi0 = '0; fi1 = '0; ff0 = '0; ff1 = '0; pap_fz0 = '0; pap_fz1 = '0;
      line = $urandom_range(0, 4*N-1);
      zl   = $urandom_range(0, 2*N+1);
      sv   = 1'($urandom_range(0, 1));
      d    = line / 4;
      if (scen == 1) begin
        bit v;
        case (line % 4)
          0: v = wa[2*d+1];
          1: v = wa[2*d];
          2: v = wb[2*d+1];
          default: v = wb[2*d];
        endcase
        if (v) fi0[line] = 1; else fi1[line] = 1;
      end
      if (scen == 2) begin
        if (sv) begin ff1[line] = 1; pap_fz1[zl] = 1; end
        else    begin ff0[line] = 1; pap_fz0[zl] = 1; end
      end
      @(negedge clk);
      check(pap_in_ready && pcp_in_ready && ibp_in_ready, "ready");
      a = wa[2*N-1:0]; b = wb[2*N-1:0];
      pap_pa = word_par(wa, N); pap_pb = word_par(wb, N);
      ibp_pa = digit_pars(wa, N)[N-1:0]; ibp_pb = digit_pars(wb, N)[N-1:0];
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      for (int cyc = 2; cyc <= 3; cyc++) begin
        @(negedge clk);
        if (pap_out_valid) begin
          check(word_val(word_t'(pap_z), N + 1) == ref_v, "PaP sum");
          check(cyc == (pap_status == ST_OK ? 2 : 3), "PaP latency");
          if (scen == 0) check(pap_status == ST_OK, "PaP fault-free");
          if (scen == 1) check(pap_status == ST_CORRECTED, "PaP operand fault");
        end
        if (pcp_out_valid) begin
          check(word_val(word_t'(pcp_z), N + 1) == ref_v, "PCP sum");
          check(cyc == (pcp_status == ST_OK ? 2 : 3), "PCP latency");
          if (scen == 0) check(pcp_status == ST_OK, "PCP fault-free");
          if (scen == 1) check(pcp_status == ST_CORRECTED && pcp_input_fault &&
                               int'(pcp_input_loc) == d, "PCP operand fault located");
          if (scen == 2 && pcp_status != ST_OK)
            check(pcp_status == ST_CORRECTED && pcp_adder_fault &&
                  (line % 4 < 2 ? pcp_fa_e1[d] : pcp_fa_e2[d]), "PCP adder fault located");
        end
        if (ibp_out_valid) begin
          check(word_val(word_t'(ibp_z), N + 1) == ref_v, "IBP sum");
          check(cyc == (ibp_status == ST_OK ? 2 : 3), "IBP latency");
          if (scen == 0) check(ibp_status == ST_OK, "IBP fault-free");
          if (scen == 1) check(ibp_status == ST_CORRECTED &&
                               (line % 4 < 2 ? ibp_loc_ia[d] : ibp_loc_ib[d]),
                               "IBP operand fault located");
          if (scen == 2 && ibp_status != ST_OK)
            check(ibp_status == ST_CORRECTED &&
                  (line % 4 < 2 ? ibp_loc_e1[d] : ibp_loc_e2[d]), "IBP adder fault located");
        end
      end
    end
    done = 1;
  end
endmodule
