// tb_sbsa_pap: end-to-end check of the SBSA-PaP self-repairing adder at its
// default size. Every operation uses random operands with their true word
// parities, and one fault scenario:
//   0 none       - ST_OK after 2 cycles
//   1 sum line   - one stuck-at sum bit: if it is wrong in the first pass the
//                  sum is repaired (ST_CORRECTED after 3 cycles), exactly that
//                  bit is equal in both passes and the class is FT_T123
//   2 operand    - one stuck-at operand line that corrupts the first pass:
//                  repaired, class other than FT_NONE
//   3 ADD1       - one stuck-at ADD1 output: repaired if detected
//   4 checker    - an indicator line stuck at 1: ST_CHECKER_FAIL, sum right
//   5 glitch     - an indicator line raised in the first pass only:
//                  ST_TRANSIENT, sum right
//   6 two faults - an operand fault that corrupts the first pass plus a sum
//                  line fault: the sum must be right unless ST_MULTI_FAULT
// The sum's value is always compared with A + B computed with integers. The
// fault classes FT_T123, FT_T23 and FT_T3 must each be reported at least once.
module tb_sbsa_pap;
  import bsd_pkg::*;
  import tb_bsd_pkg::*;
  localparam int N  = 128;
  localparam int CW = $clog2(2*N+3);

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic in_ready, out_valid, pa, pb;
  bsd_digit_t [N-1:0] a, b;
  bsd_digit_t [N:0]   z;
  logic [4*N-1:0]     fi0, fi1, fc0, fc1;
  logic [2*N+1:0]     fz0, fz1, eq_mask;
  logic [1:0]         fk0, fk1;
  logic [CW-1:0]      eq_count;
  sbsa_status_e       status;
  pap_fault_type_e    ftype;
  int checks = 0, failures = 0;
  int seen[7];
  int ft_seen[4];

  sbsa_pap dut (
    .clk, .rst_n, .in_valid, .in_ready, .a, .b, .pa, .pb,
    .flt_in_sa0(fi0), .flt_in_sa1(fi1), .flt_add1_sa0(fc0), .flt_add1_sa1(fc1),
    .flt_z_sa0(fz0), .flt_z_sa1(fz1), .flt_chk_sa0(fk0), .flt_chk_sa1(fk1),
    .out_valid, .z, .status, .ftype, .eq_mask, .eq_count
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

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fi0 = '0; fi1 = '0; fc0 = '0; fc1 = '0; fz0 = '0; fz1 = '0; fk0 = '0; fk1 = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 700; t++) begin
      word_t wa, wb;
      big_t  ref_v;
      int    scen, line, zl, lat;
      bit    sv;
      scen = t % 7;
      wa = rand_word(N); wb = rand_word(N);
      ref_v = word_val(wa, N) + word_val(wb, N);
      fi0 = '0; fi1 = '0; fc0 = '0; fc1 = '0; fz0 = '0; fz1 = '0; fk0 = '0; fk1 = '0;
      line = $urandom_range(0, 4*N-1);
      zl   = $urandom_range(0, 2*N+1);
      sv   = 1'($urandom_range(0, 1));
      case (scen)
        1: if (sv) fz1[zl] = 1; else fz0[zl] = 1;
        2, 6: begin
          // stuck at the complement of the true value: wrong in the first pass
          if (line_val(wa, wb, line)) fi0[line] = 1; else fi1[line] = 1;
          if (scen == 6) begin if (sv) fz1[zl] = 1; else fz0[zl] = 1; end
        end
        3: if (sv) fc1[line] = 1; else fc0[line] = 1;
        4: fk1[$urandom_range(0, 1)] = 1;
        5: fk1[$urandom_range(0, 1)] = 1;
        default: ;
      endcase
      @(negedge clk);
      check(in_ready, "ready when idle");
      a = wa[2*N-1:0]; b = wb[2*N-1:0];
      pa = word_par(wa, N); pb = word_par(wb, N);
      in_valid = 1;
      @(negedge clk);                  // first pass
      in_valid = 0;
      lat = 1;
      @(negedge clk);                  // first pass stored
      lat++;
      if (scen == 5) fk1 = '0;
      while (!out_valid) begin @(negedge clk); lat++; end
      // eq_mask follows the packed sum (bit 2i+1 = z_i.p, bit 2i = z_i.n);
      // the sum-line fault masks number p first (2i = z_i.p, 2i+1 = z_i.n).
      check(word_val(word_t'(z), N + 1) == ref_v || status == ST_MULTI_FAULT,
            $sformatf("sum t=%0d scen=%0d status=%s", t, scen, status.name()));
      check(lat == (status == ST_OK ? 2 : 3), $sformatf("latency %0d", lat));
      check(int'(eq_count) == $countones(eq_mask), "eq_count");
      if (status == ST_CORRECTED) ft_seen[ftype]++;
      case (scen)
        0: check(status == ST_OK, "fault-free");
        1: if (status != ST_OK) begin
          check(status == ST_CORRECTED && ftype == FT_T123 && eq_mask == ((2*N+2)'(1) << (zl ^ 1)),
                $sformatf("sum line %0d: %s %s", zl, status.name(), ftype.name()));
          seen[1]++;
        end
        2: begin
          check(status == ST_CORRECTED && ftype != FT_NONE,
                $sformatf("operand line %0d: %s", line, status.name()));
          if (status == ST_CORRECTED) seen[2]++;
        end
        3: if (status != ST_OK) begin
          check(status == ST_CORRECTED, $sformatf("ADD1 line %0d", line));
          seen[3]++;
        end
        4: begin check(status == ST_CHECKER_FAIL, "checker failure"); seen[4]++; end
        5: begin check(status == ST_TRANSIENT, "indicator glitch"); seen[5]++; end
        6: if (status == ST_MULTI_FAULT) seen[6]++;
        default: ;
      endcase
      if (status == ST_OK) seen[0]++;
    end
    for (int k = 0; k < 7; k++) begin
      check(seen[k] > 0, $sformatf("scenario %0d happened", k));
      $display("outcome %0d seen %0d times", k, seen[k]);
    end
    for (int k = 1; k < 4; k++) begin
      check(ft_seen[k] > 0, $sformatf("fault class %0d reported", k));
      $display("fault class %0d reported %0d times", k, ft_seen[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
