// tb_pap_sc_adder: checks the parity-prediction self-checking BSD adder at
// its default size.
// For random operands (zero digits drawn in both codes):
//   - the sum's value equals A + B computed with integers, and neither
//     indicator fires with the true word parities;
//   - complementing operands and the boundary input complements every sum
//     bit (bit-level self-duality), still without indicator;
//   - one random stuck-at fault on an operand line, an ADD1 output or a sum
//     line: an operand line that changes value must raise Error Indicator 1;
//     any fault that makes the sum wrong must raise an indicator; and the
//     complemented recomputation with the same fault gives the right sum;
//   - a stuck-at-1 on an indicator line shows on that indicator.
module tb_pap_sc_adder;
  import bsd_pkg::*;
  import tb_bsd_pkg::*;
  localparam int N = 128;

  bsd_digit_t [N-1:0] a, b;
  bsd_digit_t [N:0]   z;
  logic               pa, pb, bnd, ei1, ei2;
  logic [4*N-1:0]     fi0, fi1, fc0, fc1;
  logic [2*N+1:0]     fz0, fz1;
  logic [1:0]         fk0, fk1;
  int checks = 0, failures = 0;

  pap_sc_adder #(.N(N)) dut (
    .a, .b, .pa, .pb, .bnd,
    .flt_in_sa0(fi0), .flt_in_sa1(fi1), .flt_add1_sa0(fc0), .flt_add1_sa1(fc1),
    .flt_z_sa0(fz0), .flt_z_sa1(fz1), .flt_chk_sa0(fk0), .flt_chk_sa1(fk1),
    .z, .ei1, .ei2
  );

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_wrong = 0;
    for (int t = 0; t < 600; t++) begin
      word_t wa, wb;
      big_t  ref_v;
      logic [2*N+1:0] z_ok, z_f, z_2;
      int kind, line;
      bit sv, changed;
      wa = rand_word(N); wb = rand_word(N);
      // Bias some operands towards long runs of equal digits.
      if (t % 4 == 0) wb = wa;
      ref_v = word_val(wa, N) + word_val(wb, N);
      pa = word_par(wa, N); pb = word_par(wb, N);
      fi0 = '0; fi1 = '0; fc0 = '0; fc1 = '0; fz0 = '0; fz1 = '0; fk0 = '0; fk1 = '0;
      a = wa[2*N-1:0]; b = wb[2*N-1:0]; bnd = 0; #1;
      z_ok = z;
      check(word_val(word_t'(z), N + 1) == ref_v, $sformatf("value t=%0d", t));
      check(!ei1 && !ei2, "no indicator fault-free");
      a = ~a; b = ~b; bnd = 1; #1;
      check(z == ~z_ok, "self-dual");
      check(!ei1 && !ei2, "no indicator complemented");
      kind = t % 3;
      sv   = 1'($urandom_range(0, 1));
      changed = 0;
      case (kind)
        0: begin
          line = $urandom_range(0, 4*N-1);
          if (sv) fi1[line] = 1; else fi0[line] = 1;
          changed = (line % 4 < 2) ? (wa[2*(line/4) + (line%4 == 0)] != sv)
                                   : (wb[2*(line/4) + (line%4 == 2)] != sv);
        end
        1: begin
          line = $urandom_range(0, 4*N-1);
          if (sv) fc1[line] = 1; else fc0[line] = 1;
        end
        default: begin
          line = $urandom_range(0, 2*N+1);
          if (sv) fz1[line] = 1; else fz0[line] = 1;
        end
      endcase
      a = wa[2*N-1:0]; b = wb[2*N-1:0]; bnd = 0; #1;
      z_f = z;
      if (kind == 0) check(ei1 == changed, $sformatf("EI1 on operand line %0d", line));
      if (z_f != z_ok) begin
        n_wrong++;
        check(ei1 || ei2, $sformatf("wrong sum flagged, kind %0d line %0d", kind, line));
      end
      a = ~a; b = ~b; bnd = 1; #1;
      z_2 = z;
      if (z_f != z_ok) check(~z_2 == z_ok, $sformatf("masked, kind %0d line %0d", kind, line));
    end
    check(n_wrong > 100, "enough activated faults");
    fi0 = '0; fi1 = '0; fc0 = '0; fc1 = '0; fz0 = '0; fz1 = '0; fk0 = '0;
    fk1 = 2'b10; #1;
    check(ei2 && !ei1, "indicator 2 line stuck at 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
