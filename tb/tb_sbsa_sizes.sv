// tb_sbsa_sizes: runs the three self-repairing adders at the smaller digit
// counts they are evaluated at, 8, 16, 32 and 64 digits (128 digits, the
// default, is covered by tb_sbsa_top). Each size is an sbsa_size_run driver
// holding its own sbsa_top: fault-free additions, corrected and located
// operand faults, and corrected adder faults, each compared with the integer
// sum and the 2/3-cycle latency. The four run in parallel; the test ends when
// all are done, and a watchdog stops it if one hangs.
module tb_sbsa_sizes;
  logic clk = 0;
  logic [3:0] done;
  int chk[4], fl[4];

  always #5 clk = ~clk;

  sbsa_size_run #(.N(8))  u_n8  (.clk, .done(done[0]), .checks(chk[0]), .failures(fl[0]));
  sbsa_size_run #(.N(16)) u_n16 (.clk, .done(done[1]), .checks(chk[1]), .failures(fl[1]));
  sbsa_size_run #(.N(32)) u_n32 (.clk, .done(done[2]), .checks(chk[2]), .failures(fl[2]));
  sbsa_size_run #(.N(64)) u_n64 (.clk, .done(done[3]), .checks(chk[3]), .failures(fl[3]));

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d",
             chk[0] + chk[1] + chk[2] + chk[3], fl[0] + fl[1] + fl[2] + fl[3] + 1);
    $finish;
  end

  initial begin
    wait (done == 4'hf);
    for (int k = 0; k < 4; k++)
      $display("size %0d digits: checks=%0d failures=%0d", 8 << k, chk[k], fl[k]);
    $display("TB_RESULT checks=%0d failures=%0d",
             chk[0] + chk[1] + chk[2] + chk[3], fl[0] + fl[1] + fl[2] + fl[3]);
    $finish;
  end
endmodule
