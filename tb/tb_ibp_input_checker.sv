// tb_ibp_input_checker: checks the SBSA-IBP per-digit input check.
// With the true digit parities no flag may be set, also for complemented
// operands. Flipping one line of digit d of A (or B) must set exactly
// ie_a[d] (ie_b[d]); flipping lines in several digits must set each of
// those digits' flags. A stuck-at-1 on a flag line must show on that flag.
module tb_ibp_input_checker;
  import bsd_pkg::*;
  import tb_bsd_pkg::*;
  localparam int N = 16;

  bsd_digit_t [N-1:0] a_line, b_line;
  logic [N-1:0]       pa, pb, ie_a, ie_b;
  logic [2*N-1:0]     sa0, sa1;
  int checks = 0, failures = 0;

  ibp_input_checker #(.N(N)) dut (.a_line, .b_line, .pa, .pb, .flt_sa0(sa0), .flt_sa1(sa1), .ie_a, .ie_b);

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
    sa0 = '0; sa1 = '0;
    for (int t = 0; t < 300; t++) begin
      word_t wa, wb, fa, fb;
      logic [N-1:0] exp_a, exp_b;
      wa = rand_word(N); wb = rand_word(N);
      pa = digit_pars(wa, N)[N-1:0]; pb = digit_pars(wb, N)[N-1:0];
      a_line = wa[2*N-1:0]; b_line = wb[2*N-1:0]; #1;
      check(ie_a == '0 && ie_b == '0, "clean operands");
      a_line = ~a_line; b_line = ~b_line; #1;
      check(ie_a == '0 && ie_b == '0, "complemented operands");
      // Up to three faulty lines, in different digits.
      fa = wa; fb = wb; exp_a = '0; exp_b = '0;
      for (int k = 0; k < 1 + t % 3; k++) begin
        int d, bit_sel;
        d       = $urandom_range(0, N-1);
        bit_sel = $urandom_range(0, 1);
        if ($urandom_range(0, 1) == 1) begin
          if (!exp_a[d]) begin fa[2*d+bit_sel] = ~fa[2*d+bit_sel]; exp_a[d] = 1; end
        end else begin
          if (!exp_b[d]) begin fb[2*d+bit_sel] = ~fb[2*d+bit_sel]; exp_b[d] = 1; end
        end
      end
      a_line = fa[2*N-1:0]; b_line = fb[2*N-1:0]; #1;
      check(ie_a == exp_a && ie_b == exp_b, $sformatf("faulty digits t=%0d", t));
    end
    a_line = '0; b_line = '0; pa = '0; pb = '0;
    sa1[N+3] = 1'b1; #1;
    check(ie_b == 16'h0008 && ie_a == '0, "flag line stuck at 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
