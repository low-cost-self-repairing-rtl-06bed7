// tb_ibp_localizer: checks the SBSA-IBP decision logic with random error
// lines: no error passes the first sum through; a pass-1-only error reports
// the pass-1 lines as the location and returns ~z_2 (ST_CORRECTED, or
// ST_TRANSIENT when the two sums are exact complements); errors in both
// passes give checker failure (complementary sums) or multiple faults.
module tb_ibp_localizer;
  import bsd_pkg::*;
  localparam int N = 8;

  logic [N-1:0]     e1, e2, ia, ib, l1, l2, la, lb;
  logic             err2;
  bsd_digit_t [N:0] z_f, z_2, z_out;
  sbsa_status_e     status;
  int checks = 0, failures = 0;

  ibp_localizer #(.N(N)) dut (.e1, .e2, .ie_a(ia), .ie_b(ib), .err2, .z_f, .z_2, .status,
    .loc_e1(l1), .loc_e2(l2), .loc_ia(la), .loc_ib(lb), .z_out);

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
    for (int t = 0; t < 600; t++) begin
      logic [2*N+1:0] zf, mask;
      bit any_err;
      zf = (2*N+2)'({$urandom, $urandom});
      mask = (t % 3 == 0) ? '0 : (2*N+2)'(1) << $urandom_range(0, 2*N+1);
      e1 = (t % 5 == 1) ? N'($urandom) : '0;
      e2 = (t % 5 == 2) ? N'($urandom) : '0;
      ia = (t % 5 == 3) ? N'($urandom) : '0;
      ib = (t % 5 == 4) ? N'($urandom) : '0;
      err2 = (t % 7 == 0);
      z_f = zf; z_2 = ~zf ^ mask;
      #1;
      any_err = |{e1, e2, ia, ib};
      if (!any_err) check(status == ST_OK && z_out == z_f && l1 == '0 && la == '0, "no error");
      else if (err2) check(status == (mask == '0 ? ST_CHECKER_FAIL : ST_MULTI_FAULT) &&
                           z_out == ~z_2, "second error");
      else check(status == (mask == '0 ? ST_TRANSIENT : ST_CORRECTED) && z_out == ~z_2 &&
                 l1 == e1 && l2 == e2 && la == ia && lb == ib, "located");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
