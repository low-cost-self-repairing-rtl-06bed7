// tb_pcp_localizer: checks the SBSA-PCP decision logic.
// First the worked example of the scheme at N = 3: pass-1 sum 11100100 and
// pass-2 sum 00010111 (bits z3+ z3- ... z0+ z0-) after an input-parity error
// must locate the faulty input at digit 1. Then random cases at N = 8: an
// adder error line reports that adder; an input-only error with equal bits
// starting at digit d (and maybe d+1, d+2) reports digit d; errors in both
// passes give checker failure or multiple faults; without error the first
// sum passes through.
module tb_pcp_localizer;
  import bsd_pkg::*;
  localparam int N = 8;

  logic [N-1:0]        e1, e2, fa_e1, fa_e2;
  logic                input_err, err2, adder_fault, input_fault;
  bsd_digit_t [N:0]    z_f, z_2, z_out;
  sbsa_status_e        status;
  logic [$clog2(N+1)-1:0] input_loc;

  logic [2:0]          s_e1, s_e2, s_fa_e1, s_fa_e2;
  logic                s_err2, s_adder, s_input;
  bsd_digit_t [3:0]    s_zf, s_z2, s_zout;
  sbsa_status_e        s_status;
  logic [1:0]          s_loc;
  int checks = 0, failures = 0;

  pcp_localizer #(.N(N)) dut (.e1, .e2, .input_err, .err2, .z_f, .z_2, .status,
    .adder_fault, .fa_e1, .fa_e2, .input_fault, .input_loc, .z_out);

  pcp_localizer #(.N(3)) dut3 (.e1(s_e1), .e2(s_e2), .input_err(1'b1), .err2(s_err2),
    .z_f(s_zf), .z_2(s_z2), .status(s_status), .adder_fault(s_adder), .fa_e1(s_fa_e1),
    .fa_e2(s_fa_e2), .input_fault(s_input), .input_loc(s_loc), .z_out(s_zout));

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
    s_e1 = '0; s_e2 = '0; s_err2 = 0;
    s_zf = 8'b11100100; s_z2 = 8'b00010111;
    #1;
    check(s_status == ST_CORRECTED && s_input && !s_adder && s_loc == 2'd1, "worked example");
    check(s_zout == 8'b11101000, "worked example corrected sum");
    for (int t = 0; t < 600; t++) begin
      logic [2*N+1:0] zf, mask;
      int d, src;
      zf  = (2*N+2)'({$urandom, $urandom});
      d   = $urandom_range(0, N-1);
      src = t % 4;                 // 0 none, 1 adder, 2 input, 3 both passes
      mask = '0;
      if (src != 0) begin
        mask[2*d + 1] = 1'b1;      // z_d.p always wrong for an input fault at d
        if ($urandom_range(0, 1) == 1) mask[2*d + 2] = 1'b1;
        if ($urandom_range(0, 1) == 1) mask[2*d + 3] = 1'b1;
      end
      if (src == 3 && t % 8 == 3) mask = '0;   // complementary results
      e1 = '0; e2 = '0; input_err = 0; err2 = 0;
      case (src)
        1: if (t % 2 == 1) e1[d] = 1'b1; else e2[d] = 1'b1;
        2: input_err = 1'b1;
        3: begin input_err = 1'b1; err2 = 1'b1; end
        default: ;
      endcase
      z_f = zf;
      z_2 = ~zf ^ mask;
      #1;
      case (src)
        0: check(status == ST_OK && z_out == z_f && !adder_fault && !input_fault, "no error");
        1: check(status == ST_CORRECTED && adder_fault && fa_e1 == e1 && fa_e2 == e2 &&
                 !input_fault && z_out == ~z_2, "adder located");
        2: check(status == ST_CORRECTED && input_fault && !adder_fault &&
                 input_loc == d && z_out == ~z_2, $sformatf("input located d=%0d", d));
        default: check(status == (mask == '0 ? ST_CHECKER_FAIL : ST_MULTI_FAULT), "second error");
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
