// tb_bsd_dr_adder: checks the double-recoding self-checking BSD adder at its
// default size.
// For random operands (zero digits drawn in both codes):
//   - the sum's value equals A + B computed with integers, no error line set;
//   - complementing operands and boundary inputs complements every sum bit
//     (self-duality);
//   - a random single stuck-at fault on a full-adder output: the error line
//     of exactly that adder is set exactly when the sum is wrong, and the
//     complemented recomputation with the same fault gives the right sum;
//   - a random single stuck-at fault on an operand line: the complemented
//     recomputation gives the right sum whenever the first sum is wrong.
module tb_bsd_dr_adder;
  import bsd_pkg::*;
  import tb_bsd_pkg::*;
  localparam int N = 128;

  bsd_digit_t [N-1:0] a, b, a_line, b_line;
  bsd_digit_t [N:0]   z;
  logic               h_in, c_in;
  logic [4*N-1:0]     fi0, fi1, ff0, ff1;
  logic [N-1:0]       e1, e2, s, bn_inv;
  int checks = 0, failures = 0;

  bsd_dr_adder #(.N(N)) dut (
    .a, .b, .h_in, .c_in, .flt_in_sa0(fi0), .flt_in_sa1(fi1),
    .flt_fa_sa0(ff0), .flt_fa_sa1(ff1), .z, .e1, .e2, .a_line, .b_line, .s, .bn_inv
  );

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_fa_detect = 0, n_in_mask = 0;
    for (int t = 0; t < 400; t++) begin
      word_t wa, wb;
      big_t  ref_v;
      logic [2*N+1:0] z_ok, z_f, z_2;
      int line;
      bit stuck_val, fa_fault;
      wa = rand_word(N);
      wb = rand_word(N);
      ref_v = word_val(wa, N) + word_val(wb, N);
      // Fault-free, true operands.
      a = wa[2*N-1:0]; b = wb[2*N-1:0];
      h_in = 0; c_in = 0;
      fi0 = '0; fi1 = '0; ff0 = '0; ff1 = '0;
      #1;
      z_ok = z;
      check(word_val(word_t'(z), N + 1) == ref_v, $sformatf("value t=%0d", t));
      check(e1 == '0 && e2 == '0, "no error fault-free");
      // Fault-free, complemented.
      a = ~a; b = ~b; h_in = 1; c_in = 1;
      #1;
      check(z == ~z_ok, "self-dual");
      check(e1 == '0 && e2 == '0, "no error complemented");
      // One stuck-at fault.
      fa_fault  = t[0];
      line      = $urandom_range(0, 4*N-1);
      stuck_val = 1'($urandom_range(0, 1));
      if (fa_fault) begin
        if (stuck_val) ff1[line] = 1'b1; else ff0[line] = 1'b1;
      end else begin
        if (stuck_val) fi1[line] = 1'b1; else fi0[line] = 1'b1;
      end
      a = wa[2*N-1:0]; b = wb[2*N-1:0]; h_in = 0; c_in = 0;
      #1;
      z_f = z;
      if (fa_fault) begin
        logic [N-1:0] exp_e1, exp_e2;
        exp_e1 = '0; exp_e2 = '0;
        if (z_f != z_ok) begin
          if ((line % 4) < 2) exp_e1[line/4] = 1'b1;
          else                exp_e2[line/4] = 1'b1;
        end
        check(e1 == exp_e1 && e2 == exp_e2, $sformatf("FA fault line %0d located", line));
        if (z_f != z_ok) n_fa_detect++;
      end
      a = ~a; b = ~b; h_in = 1; c_in = 1;
      #1;
      z_2 = z;
      if (z_f != z_ok) begin
        check(~z_2 == z_ok, $sformatf("masked by complement, line %0d fa=%0d", line, fa_fault));
        if (!fa_fault) n_in_mask++;
      end
    end
    check(n_fa_detect > 20 && n_in_mask > 20, "enough activated faults");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
