// tb_sbsa_ibp: end-to-end check of the SBSA-IBP self-repairing adder at its
// default size. Every operation uses random operands with their true digit
// parities, and one fault scenario:
//   0 none        - ST_OK after 2 cycles
//   1 input       - one stuck-at operand line: if it corrupts the line, the
//                   sum is repaired (ST_CORRECTED after 3 cycles) and exactly
//                   that operand digit is reported
//   2 adder       - one stuck-at full-adder output: repaired, adder reported
//   3 transient   - an adder fault in the first pass only: repaired, located
//   4 checker     - a digit-check line stuck at 1: ST_CHECKER_FAIL, sum right
//   5 two inputs  - stuck-at faults on lines of two different digits, both
//                   corrupting the first pass: both digits are reported and
//                   the sum repaired
//   6 glitch      - an adder error line raised in the first pass only:
//                   ST_TRANSIENT, sum right
//   7 two adders  - the sum must be right unless ST_MULTI_FAULT is reported
// The sum's value is always compared with A + B computed with integers.
module tb_sbsa_ibp;
  import bsd_pkg::*;
  import tb_bsd_pkg::*;
  localparam int N = 128;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic in_ready, out_valid;
  logic [N-1:0] pa, pb, l1, l2, la, lb;
  bsd_digit_t [N-1:0] a, b;
  bsd_digit_t [N:0]   z;
  logic [4*N-1:0]     fi0, fi1, ff0, ff1, fk0, fk1;
  sbsa_status_e       status;
  int checks = 0, failures = 0;
  int seen[8];

  sbsa_ibp dut (
    .clk, .rst_n, .in_valid, .in_ready, .a, .b, .pa, .pb,
    .flt_in_sa0(fi0), .flt_in_sa1(fi1), .flt_fa_sa0(ff0), .flt_fa_sa1(ff1),
    .flt_chk_sa0(fk0), .flt_chk_sa1(fk1),
    .out_valid, .z, .status, .loc_e1(l1), .loc_e2(l2), .loc_ia(la), .loc_ib(lb)
  );

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0t", msg, $time); end
  endtask

  // Stuck-at on operand line l changes that line's value.
  function automatic bit line_active(word_t wa, word_t wb, int l, bit sv);
    int d = l / 4;
    case (l % 4)
      0: return wa[2*d+1] != sv;
      1: return wa[2*d]   != sv;
      2: return wb[2*d+1] != sv;
      default: return wb[2*d] != sv;
    endcase
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fi0 = '0; fi1 = '0; ff0 = '0; ff1 = '0; fk0 = '0; fk1 = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 800; t++) begin
      word_t wa, wb;
      big_t  ref_v;
      int    scen, line, line2, lat;
      bit    sv, sv2;
      logic [N-1:0] xa, xb, x1, x2;
      scen = t % 8;
      wa = rand_word(N); wb = rand_word(N);
      ref_v = word_val(wa, N) + word_val(wb, N);
      fi0 = '0; fi1 = '0; ff0 = '0; ff1 = '0; fk0 = '0; fk1 = '0;
      xa = '0; xb = '0; x1 = '0; x2 = '0;
      line  = $urandom_range(0, 4*N-1);
      line2 = (line + 4 + 4 * $urandom_range(0, N-3)) % (4*N);   // another digit
      sv    = 1'($urandom_range(0, 1));
      sv2   = 1'($urandom_range(0, 1));
      // Both faults of scenario 5 are made active in the first pass; a stuck
      // line that is right in the first pass is wrong in the second, which
      // would make it a second-pass fault.
      if (scen == 5) begin
        sv  = !line_active(wa, wb, line, 1'b0);
        sv2 = !line_active(wa, wb, line2, 1'b0);
      end
      case (scen)
        1, 5: begin
          if (sv) fi1[line] = 1; else fi0[line] = 1;
          if (line_active(wa, wb, line, sv)) begin
            if (line % 4 < 2) xa[line/4] = 1; else xb[line/4] = 1;
          end
          if (scen == 5) begin
            if (sv2) fi1[line2] = 1; else fi0[line2] = 1;
            if (line_active(wa, wb, line2, sv2)) begin
              if (line2 % 4 < 2) xa[line2/4] = 1; else xb[line2/4] = 1;
            end
          end
        end
        2, 3: begin
          if (sv) ff1[line] = 1; else ff0[line] = 1;
          if (line % 4 < 2) x1[line/4] = 1; else x2[line/4] = 1;
        end
        4: fk1[2*N + $urandom_range(0, 2*N-1)] = 1;
        6: fk1[$urandom_range(0, 2*N-1)] = 1;
        7: begin
          if (sv) ff1[line] = 1; else ff0[line] = 1;
          if (sv2) ff1[line2] = 1; else ff0[line2] = 1;
        end
        default: ;
      endcase
      @(negedge clk);
      check(in_ready, "ready when idle");
      a = wa[2*N-1:0]; b = wb[2*N-1:0];
      pa = digit_pars(wa, N)[N-1:0]; pb = digit_pars(wb, N)[N-1:0];
      in_valid = 1;
      @(negedge clk);                  // first pass
      in_valid = 0;
      lat = 1;
      @(negedge clk);                  // first pass stored
      lat++;
      if (scen == 3) begin ff0 = '0; ff1 = '0; end
      if (scen == 6) fk1 = '0;
      while (!out_valid) begin @(negedge clk); lat++; end
      check(word_val(word_t'(z), N + 1) == ref_v || status == ST_MULTI_FAULT,
            $sformatf("sum t=%0d scen=%0d status=%s", t, scen, status.name()));
      check(lat == (status == ST_OK ? 2 : 3), $sformatf("latency %0d", lat));
      case (scen)
        0: check(status == ST_OK, "fault-free");
        1, 5: begin
          check(status == ((xa | xb) == '0 ? ST_OK : ST_CORRECTED), "input status");
          if (status != ST_OK)
            check(la == xa && lb == xb && l1 == '0 && l2 == '0,
                  $sformatf("input lines %0d/%0d located", line, line2));
          if (status == ST_CORRECTED) seen[scen]++;
        end
        2, 3: if (status != ST_OK) begin
          check(status == ST_CORRECTED && l1 == x1 && l2 == x2 && la == '0 && lb == '0,
                $sformatf("adder line %0d located", line));
          seen[scen]++;
        end
        4: begin check(status == ST_CHECKER_FAIL, "checker failure"); seen[4]++; end
        6: begin check(status == ST_TRANSIENT, "error-line glitch"); seen[6]++; end
        7: if (status == ST_MULTI_FAULT) seen[7]++;
        default: ;
      endcase
      if (status == ST_OK) seen[0]++;
    end
    for (int k = 0; k < 8; k++) begin
      check(seen[k] > 0, $sformatf("scenario %0d happened", k));
      $display("outcome %0d seen %0d times", k, seen[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
