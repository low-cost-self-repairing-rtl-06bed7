// tb_sbsa_top: end-to-end test of the three self-repairing BSD adders side by
// side, at the default size (no parameter override). This is also the
// full-size test.
//
// Every operation hands the same random operands to SBSA-PaP, SBSA-PCP and
// SBSA-IBP in the same cycle, each with the parity inputs it needs (word
// parities for PaP and PCP, digit parities for IBP), and injects one fault
// scenario into all three:
//   0 none       - all report ST_OK, 2 cycles
//   1 operand    - one operand line stuck at the complement of its value:
//                  all three repair the sum (ST_CORRECTED, 3 cycles); PCP
//                  names the digit, IBP names the digit and operand
//   2 adder      - PCP and IBP: one full-adder output stuck; PaP: one sum
//                  line stuck. Repaired where it hit; PCP/IBP name the adder
//   3 transient  - PCP: an adder fault in the first pass only (repaired);
//                  IBP and PaP: an error line raised in the first pass only
//                  (ST_TRANSIENT)
//   4 checker    - an error line of each design stuck at 1: ST_CHECKER_FAIL
//   5 multiple   - IBP: two operand faults in different digits, both located;
//                  PCP: two adder faults; PaP: operand plus sum-line fault.
//                  The sum must be right unless ST_MULTI_FAULT is reported.
// Each result's value is compared with A + B computed with integers, and the
// latency with 2 cycles (no error) or 3 (recomputed). Every mechanism is
// counted; one that never happened is a failure.
module tb_sbsa_top;
  import bsd_pkg::*;
  import tb_bsd_pkg::*;
  localparam int N  = 128;
  localparam int CW = $clog2(2*N+3);
  localparam int LW = $clog2(N+1);

  logic clk = 0, rst_n = 0;
  bsd_digit_t [N-1:0] a, b;
  // SBSA-PaP
  logic pap_in_valid = 0, pap_in_ready, pap_pa, pap_pb, pap_out_valid;
  logic [4*N-1:0] pap_fi0, pap_fi1, pap_fc0, pap_fc1;
  logic [2*N+1:0] pap_fz0, pap_fz1, pap_eq_mask;
  logic [1:0]     pap_fk0, pap_fk1;
  bsd_digit_t [N:0] pap_z;
  sbsa_status_e    pap_status;
  pap_fault_type_e pap_ftype;
  logic [CW-1:0]   pap_eq_count;
  // SBSA-PCP
  logic pcp_in_valid = 0, pcp_in_ready, pcp_pa, pcp_pb, pcp_out_valid;
  logic [4*N-1:0] pcp_fi0, pcp_fi1, pcp_ff0, pcp_ff1;
  logic [2*N:0]   pcp_fk0, pcp_fk1;
  bsd_digit_t [N:0] pcp_z;
  sbsa_status_e   pcp_status;
  logic           pcp_adder_fault, pcp_input_fault;
  logic [N-1:0]   pcp_fa_e1, pcp_fa_e2;
  logic [LW-1:0]  pcp_input_loc;
  // SBSA-IBP
  logic ibp_in_valid = 0, ibp_in_ready, ibp_out_valid;
  logic [N-1:0]   ibp_pa, ibp_pb, ibp_loc_e1, ibp_loc_e2, ibp_loc_ia, ibp_loc_ib;
  logic [4*N-1:0] ibp_fi0, ibp_fi1, ibp_ff0, ibp_ff1, ibp_fk0, ibp_fk1;
  bsd_digit_t [N:0] ibp_z;
  sbsa_status_e   ibp_status;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_ok, n_recompute, n_corrected, n_transient, n_checker, n_multi;
  int n_pcp_in_loc, n_pcp_fa_loc, n_ibp_in_loc, n_ibp_fa_loc, n_ibp_multi_loc;
  int n_ft[4];

  sbsa_top dut (
    .clk, .rst_n, .a, .b,
    .pap_in_valid, .pap_in_ready, .pap_pa, .pap_pb,
    .pap_flt_in_sa0(pap_fi0), .pap_flt_in_sa1(pap_fi1),
    .pap_flt_add1_sa0(pap_fc0), .pap_flt_add1_sa1(pap_fc1),
    .pap_flt_z_sa0(pap_fz0), .pap_flt_z_sa1(pap_fz1),
    .pap_flt_chk_sa0(pap_fk0), .pap_flt_chk_sa1(pap_fk1),
    .pap_out_valid, .pap_z, .pap_status, .pap_ftype, .pap_eq_mask, .pap_eq_count,
    .pcp_in_valid, .pcp_in_ready, .pcp_pa, .pcp_pb,
    .pcp_flt_in_sa0(pcp_fi0), .pcp_flt_in_sa1(pcp_fi1),
    .pcp_flt_fa_sa0(pcp_ff0), .pcp_flt_fa_sa1(pcp_ff1),
    .pcp_flt_chk_sa0(pcp_fk0), .pcp_flt_chk_sa1(pcp_fk1),
    .pcp_out_valid, .pcp_z, .pcp_status, .pcp_adder_fault, .pcp_fa_e1, .pcp_fa_e2,
    .pcp_input_fault, .pcp_input_loc,
    .ibp_in_valid, .ibp_in_ready, .ibp_pa, .ibp_pb,
    .ibp_flt_in_sa0(ibp_fi0), .ibp_flt_in_sa1(ibp_fi1),
    .ibp_flt_fa_sa0(ibp_ff0), .ibp_flt_fa_sa1(ibp_ff1),
    .ibp_flt_chk_sa0(ibp_fk0), .ibp_flt_chk_sa1(ibp_fk1),
    .ibp_out_valid, .ibp_z, .ibp_status, .ibp_loc_e1, .ibp_loc_e2,
    .ibp_loc_ia, .ibp_loc_ib
  );

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0t", msg, $time); end
  endtask

  // True value of operand line l (4 per digit: a.p, a.n, b.p, b.n).
  function automatic bit line_val(word_t wa, word_t wb, int l);
    int d = l / 4;
    case (l % 4)
      0: return wa[2*d+1];
      1: return wa[2*d];
      2: return wb[2*d+1];
      default: return wb[2*d];
    endcase
  endfunction

  // Checks common to the three designs.
  task automatic common(string nm, bsd_digit_t [N:0] z, sbsa_status_e st,
                        int lat, big_t ref_v);
    check(word_val(word_t'(z), N + 1) == ref_v || st == ST_MULTI_FAULT,
          $sformatf("%s sum (%s)", nm, st.name()));
    check(lat == (st == ST_OK ? 2 : 3), $sformatf("%s latency %0d", nm, lat));
    case (st)
      ST_OK:           n_ok++;
      ST_TRANSIENT:    n_transient++;
      ST_CORRECTED:    n_corrected++;
      ST_CHECKER_FAIL: n_checker++;
      ST_MULTI_FAULT:  n_multi++;
      default:         check(1'b0, "status code");
    endcase
    if (lat == 3) n_recompute++;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pap_fi0 = '0; pap_fi1 = '0; pap_fc0 = '0; pap_fc1 = '0;
    pap_fz0 = '0; pap_fz1 = '0; pap_fk0 = '0; pap_fk1 = '0;
    pcp_fi0 = '0; pcp_fi1 = '0; pcp_ff0 = '0; pcp_ff1 = '0; pcp_fk0 = '0; pcp_fk1 = '0;
    ibp_fi0 = '0; ibp_fi1 = '0; ibp_ff0 = '0; ibp_ff1 = '0; ibp_fk0 = '0; ibp_fk1 = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 360; t++) begin
      word_t wa, wb;
      big_t  ref_v;
      int    scen, line, line2, zl, cyc, lat_pap, lat_pcp, lat_ibp;
      bit    sv, sv2;
      logic [N-1:0] xa, xb, x1, x2;
      scen  = t % 6;
      wa = rand_word(N); wb = rand_word(N);
      ref_v = word_val(wa, N) + word_val(wb, N);
      pap_fi0 = '0; pap_fi1 = '0; pap_fc0 = '0; pap_fc1 = '0;
      pap_fz0 = '0; pap_fz1 = '0; pap_fk0 = '0; pap_fk1 = '0;
      pcp_fi0 = '0; pcp_fi1 = '0; pcp_ff0 = '0; pcp_ff1 = '0; pcp_fk0 = '0; pcp_fk1 = '0;
      ibp_fi0 = '0; ibp_fi1 = '0; ibp_ff0 = '0; ibp_ff1 = '0; ibp_fk0 = '0; ibp_fk1 = '0;
      xa = '0; xb = '0; x1 = '0; x2 = '0;
      line  = $urandom_range(0, 4*N-1);
      line2 = (line + 4 + 4 * $urandom_range(0, N-3)) % (4*N);   // another digit
      zl    = $urandom_range(0, 2*N+1);
      sv    = 1'($urandom_range(0, 1));
      sv2   = 1'($urandom_range(0, 1));
      case (scen)
        1: begin
          if (line_val(wa, wb, line)) begin
            pap_fi0[line] = 1; pcp_fi0[line] = 1; ibp_fi0[line] = 1;
          end else begin
            pap_fi1[line] = 1; pcp_fi1[line] = 1; ibp_fi1[line] = 1;
          end
          if (line % 4 < 2) xa[line/4] = 1; else xb[line/4] = 1;
        end
        2: begin
          if (sv) begin pcp_ff1[line] = 1; ibp_ff1[line] = 1; pap_fz1[zl] = 1; end
          else    begin pcp_ff0[line] = 1; ibp_ff0[line] = 1; pap_fz0[zl] = 1; end
          if (line % 4 < 2) x1[line/4] = 1; else x2[line/4] = 1;
        end
        3: begin
          if (sv) pcp_ff1[line] = 1; else pcp_ff0[line] = 1;
          ibp_fk1[$urandom_range(0, 2*N-1)] = 1;
          pap_fk1[$urandom_range(0, 1)] = 1;
        end
        4: begin
          pap_fk1[$urandom_range(0, 1)] = 1;
          pcp_fk1[2*N] = 1;
          ibp_fk1[2*N + $urandom_range(0, 2*N-1)] = 1;
        end
        5: begin
          if (line_val(wa, wb, line))  ibp_fi0[line]  = 1; else ibp_fi1[line]  = 1;
          if (line_val(wa, wb, line2)) ibp_fi0[line2] = 1; else ibp_fi1[line2] = 1;
          if (line % 4 < 2)  xa[line/4]  = 1; else xb[line/4]  = 1;
          if (line2 % 4 < 2) xa[line2/4] = 1; else xb[line2/4] = 1;
          if (sv)  pcp_ff1[line]  = 1; else pcp_ff0[line]  = 1;
          if (sv2) pcp_ff1[line2] = 1; else pcp_ff0[line2] = 1;
          if (line_val(wa, wb, line)) pap_fi0[line] = 1; else pap_fi1[line] = 1;
          if (sv) pap_fz1[zl] = 1; else pap_fz0[zl] = 1;
        end
        default: ;
      endcase

      @(negedge clk);
      check(pap_in_ready && pcp_in_ready && ibp_in_ready, "all ready when idle");
      a = wa[2*N-1:0]; b = wb[2*N-1:0];
      pap_pa = word_par(wa, N); pap_pb = word_par(wb, N);
      pcp_pa = pap_pa;          pcp_pb = pap_pb;
      ibp_pa = digit_pars(wa, N)[N-1:0]; ibp_pb = digit_pars(wb, N)[N-1:0];
      pap_in_valid = 1; pcp_in_valid = 1; ibp_in_valid = 1;
      @(negedge clk);                  // first pass
      pap_in_valid = 0; pcp_in_valid = 0; ibp_in_valid = 0;
      lat_pap = 0; lat_pcp = 0; lat_ibp = 0;
      for (cyc = 2; cyc <= 4; cyc++) begin
        @(negedge clk);
        if (cyc == 2 && scen == 3) begin
          pcp_ff0 = '0; pcp_ff1 = '0; ibp_fk1 = '0; pap_fk1 = '0;
        end
        if (pap_out_valid) lat_pap = cyc;
        if (pcp_out_valid) lat_pcp = cyc;
        if (ibp_out_valid) lat_ibp = cyc;
        if (pap_out_valid) begin
          common("PaP", pap_z, pap_status, cyc, ref_v);
          if (pap_status == ST_CORRECTED) n_ft[pap_ftype]++;
        end
        if (pcp_out_valid) common("PCP", pcp_z, pcp_status, cyc, ref_v);
        if (ibp_out_valid) common("IBP", ibp_z, ibp_status, cyc, ref_v);
        if (pcp_out_valid) begin
          if (pcp_status == ST_CORRECTED && pcp_input_fault) n_pcp_in_loc++;
          if (pcp_status == ST_CORRECTED && pcp_adder_fault) n_pcp_fa_loc++;
        end
        if (ibp_out_valid && ibp_status == ST_CORRECTED) begin
          if (ibp_loc_ia != '0 || ibp_loc_ib != '0) n_ibp_in_loc++;
          if (ibp_loc_e1 != '0 || ibp_loc_e2 != '0) n_ibp_fa_loc++;
          if ($countones({ibp_loc_ia, ibp_loc_ib}) > 1) n_ibp_multi_loc++;
        end
        // scenario-specific checks, on the cycle each result appears
        case (scen)
          0: begin
            if (pap_out_valid) check(pap_status == ST_OK, "PaP fault-free");
            if (pcp_out_valid) check(pcp_status == ST_OK, "PCP fault-free");
            if (ibp_out_valid) check(ibp_status == ST_OK, "IBP fault-free");
          end
          1: begin
            if (pap_out_valid)
              check(pap_status == ST_CORRECTED && pap_ftype != FT_NONE, "PaP operand fault");
            if (pcp_out_valid)
              check(pcp_status == ST_CORRECTED && pcp_input_fault && !pcp_adder_fault &&
                    int'(pcp_input_loc) == line / 4, "PCP operand fault located");
            if (ibp_out_valid)
              check(ibp_status == ST_CORRECTED && ibp_loc_ia == xa && ibp_loc_ib == xb,
                    "IBP operand fault located");
          end
          2: begin
            if (pap_out_valid && pap_status != ST_OK)
              check(pap_status == ST_CORRECTED && pap_ftype == FT_T123 &&
                    pap_eq_count == 1, "PaP sum-line fault");
            if (pcp_out_valid && pcp_status != ST_OK)
              check(pcp_status == ST_CORRECTED && pcp_adder_fault &&
                    pcp_fa_e1 == x1 && pcp_fa_e2 == x2, "PCP adder fault located");
            if (ibp_out_valid && ibp_status != ST_OK)
              check(ibp_status == ST_CORRECTED && ibp_loc_e1 == x1 && ibp_loc_e2 == x2,
                    "IBP adder fault located");
          end
          3: begin
            if (pap_out_valid) check(pap_status == ST_TRANSIENT, "PaP glitch");
            if (pcp_out_valid && pcp_status != ST_OK)
              check(pcp_status == ST_CORRECTED, "PCP first-pass adder fault");
            if (ibp_out_valid) check(ibp_status == ST_TRANSIENT, "IBP glitch");
          end
          4: begin
            if (pap_out_valid) check(pap_status == ST_CHECKER_FAIL, "PaP checker");
            if (pcp_out_valid) check(pcp_status == ST_CHECKER_FAIL, "PCP checker");
            if (ibp_out_valid) check(ibp_status == ST_CHECKER_FAIL, "IBP checker");
          end
          5: if (ibp_out_valid)
            check(ibp_status == ST_CORRECTED && ibp_loc_ia == xa && ibp_loc_ib == xb,
                  "IBP two operand faults located");
          default: ;
        endcase
      end
      check(lat_pap != 0 && lat_pcp != 0 && lat_ibp != 0, "every design answered");
    end

    check(n_ok > 0,            "mechanism: fault-free addition");
    check(n_recompute > 0,     "mechanism: complemented recomputation");
    check(n_corrected > 0,     "mechanism: fault corrected");
    check(n_transient > 0,     "mechanism: transient recognised");
    check(n_checker > 0,       "mechanism: checker failure recognised");
    check(n_multi > 0,         "mechanism: uncorrectable multiple fault flagged");
    check(n_pcp_in_loc > 0,    "mechanism: PCP operand-digit localization");
    check(n_pcp_fa_loc > 0,    "mechanism: PCP full-adder localization");
    check(n_ibp_in_loc > 0,    "mechanism: IBP operand-digit localization");
    check(n_ibp_fa_loc > 0,    "mechanism: IBP full-adder localization");
    check(n_ibp_multi_loc > 0, "mechanism: IBP multiple-fault localization");
    for (int k = 1; k < 4; k++) check(n_ft[k] > 0, $sformatf("mechanism: PaP fault class %0d", k));
    $display("ok=%0d recompute=%0d corrected=%0d transient=%0d checker=%0d multi=%0d",
             n_ok, n_recompute, n_corrected, n_transient, n_checker, n_multi);
    $display("pcp_in_loc=%0d pcp_fa_loc=%0d ibp_in_loc=%0d ibp_fa_loc=%0d ibp_multi_loc=%0d",
             n_pcp_in_loc, n_pcp_fa_loc, n_ibp_in_loc, n_ibp_fa_loc, n_ibp_multi_loc);
    $display("pap classes T123=%0d T23=%0d T3=%0d", n_ft[1], n_ft[2], n_ft[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
