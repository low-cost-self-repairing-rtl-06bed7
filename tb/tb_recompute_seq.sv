// tb_recompute_seq: checks the pass sequencer's handshake and cycle counts.
// Each operation is accepted while in_ready is high; the testbench then
// follows the strobes cycle by cycle: cap1 one cycle after acceptance with
// inv low, then - only when err is raised in that cycle - cap2 with inv high,
// and out_valid for exactly one cycle, two cycles after acceptance without
// error and three with it. in_ready must be low while an operation runs.
module tb_recompute_seq;
  logic clk = 0, rst_n = 0, in_valid = 0, err = 0;
  logic in_ready, load, inv, cap1, cap2, out_valid;
  int checks = 0, failures = 0;

  recompute_seq dut (.clk, .rst_n, .in_valid, .in_ready, .err, .load, .inv, .cap1, .cap2, .out_valid);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0t", msg, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_err = 0, n_ok = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 200; t++) begin
      bit e;
      int lat;
      e = ($urandom_range(0, 2) == 0);
      // Idle gap of 0..2 cycles.
      repeat ($urandom_range(0, 2)) begin
        @(negedge clk);
        check(in_ready && !out_valid && !cap1 && !cap2, "idle");
      end
      @(negedge clk);
      in_valid = 1;
      #1;
      check(in_ready && load, "accept");
      @(negedge clk);               // one cycle after the accepting edge
      in_valid = 0;
      lat = 1;
      check(cap1 && !inv && !in_ready && !out_valid, "pass 1");
      err = e;
      #1;
      @(negedge clk);
      err = 0;
      lat++;
      if (e) begin
        check(cap2 && inv && !in_ready && !out_valid, "pass 2");
        @(negedge clk);
        lat++;
        n_err++;
      end else n_ok++;
      check(out_valid && !cap1 && !cap2, "result strobe");
      check(lat == (e ? 3 : 2), "latency");
      @(negedge clk);
      check(!out_valid && in_ready, "back to idle");
    end
    check(n_err > 20 && n_ok > 20, "both paths taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
