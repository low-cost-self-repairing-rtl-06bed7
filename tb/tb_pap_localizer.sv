// tb_pap_localizer: directed and random checks of the SBSA-PaP decision.
// The second-pass sum is built as the complement of the first with k chosen
// bits left equal. Expected: ST_OK and z_f when pass 1 had no error;
// ST_TRANSIENT (k = 0) or ST_CORRECTED with type 1,2,3 / 2,3 / 3 for k = 1,
// 2, 3+ when only pass 1 erred; ST_CHECKER_FAIL (k = 0) or ST_MULTI_FAULT
// when both erred; result ~z_2 in every error case; eq_mask/eq_count name
// exactly the k bits.
module tb_pap_localizer;
  import bsd_pkg::*;
  localparam int N = 8;
  localparam int W = 2 * N + 2;

  logic                 err1, err2;
  bsd_digit_t [N:0]     z_f, z_2, z_out;
  sbsa_status_e         status;
  pap_fault_type_e      ftype;
  logic [W-1:0]         eq_mask;
  logic [$clog2(2*N+3)-1:0] eq_count;
  int checks = 0, failures = 0;

  pap_localizer #(.N(N)) dut (.err1, .err2, .z_f, .z_2, .status, .ftype, .eq_mask, .eq_count, .z_out);

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
      logic [W-1:0] zf, mask;
      int k;
      zf   = W'({$urandom, $urandom});
      k    = t % 6;
      mask = '0;
      while ($countones(mask) < k) mask[$urandom_range(0, W-1)] = 1'b1;
      z_f  = zf;
      z_2  = ~zf ^ mask;
      err1 = (t % 7 != 0);
      err2 = err1 && (t % 5 == 0);
      #1;
      if (!err1) begin
        check(status == ST_OK && z_out == z_f, "no error");
      end else begin
        check(z_out == ~z_2, "corrected output");
        check(eq_mask == mask && eq_count == k, "equality mask");
        if (err2) begin
          check(status == (k == 0 ? ST_CHECKER_FAIL : ST_MULTI_FAULT), "second error");
        end else begin
          check(status == (k == 0 ? ST_TRANSIENT : ST_CORRECTED), "status");
          check(ftype == (k == 0 ? FT_NONE : k == 1 ? FT_T123 : k == 2 ? FT_T23 : FT_T3),
                $sformatf("fault type k=%0d", k));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
