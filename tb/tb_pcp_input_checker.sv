// tb_pcp_input_checker: checks the SBSA-PCP word-parity input check.
// The first-row sums s_i and the b.n lines are worked out here from random
// operand words (s_i = a.p ^ ~a.n ^ b.p). With the true word parities the
// flag must stay 0; flipping one operand line (an odd number of faulty
// lines) must raise it, two flipped lines must not; complementing the
// operands must leave it 0; a stuck-at-1 on the flag line must show.
module tb_pcp_input_checker;
  import tb_bsd_pkg::*;
  localparam int N = 16;

  logic         pa, pb, sa0, sa1, input_err;
  logic [N-1:0] s, bn_inv;
  int checks = 0, failures = 0;

  pcp_input_checker #(.N(N)) dut (.pa, .pb, .s, .bn_inv, .flt_sa0(sa0), .flt_sa1(sa1), .input_err);

  task automatic apply(word_t wa, word_t wb);
    for (int i = 0; i < N; i++) begin
      s[i]      = wa[2*i+1] ^ ~wa[2*i] ^ wb[2*i+1];
      bn_inv[i] = ~wb[2*i];
    end
    #1;
  endtask

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sa0 = 0; sa1 = 0;
    for (int t = 0; t < 300; t++) begin
      word_t wa, wb, fa, fb;
      int l1, l2;
      wa = rand_word(N); wb = rand_word(N);
      pa = word_par(wa, N); pb = word_par(wb, N);
      apply(wa, wb);
      check(input_err == 0, "clean operands");
      apply(word_inv(wa, N), word_inv(wb, N));
      check(input_err == 0, "complemented operands");
      l1 = $urandom_range(0, 4*N-1);
      l2 = (l1 + 1 + $urandom_range(0, 4*N-2)) % (4*N);
      fa = wa; fb = wb;
      if (l1 < 2*N) fa[l1] = ~fa[l1]; else fb[l1-2*N] = ~fb[l1-2*N];
      apply(fa, fb);
      check(input_err == 1, $sformatf("one faulty line %0d", l1));
      if (l2 < 2*N) fa[l2] = ~fa[l2]; else fb[l2-2*N] = ~fb[l2-2*N];
      apply(fa, fb);
      check(input_err == 0, "two faulty lines cancel");
    end
    sa1 = 1;
    apply('0, '0);
    pa = 0; pb = 0; #1;
    check(input_err == 1, "flag stuck at 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
