// tb_sbsa_pcp: end-to-end check of the SBSA-PCP self-repairing adder at its
// default size. Every operation uses random operands and the true word
// parities, and one fault scenario:
//   none       - result after 2 cycles, ST_OK
//   input      - one stuck-at operand line; if it corrupts the line the
//                result is repaired (ST_CORRECTED after 3 cycles) and the
//                faulty input digit is reported, else ST_OK
//   adder      - one stuck-at full-adder output; if active, repaired and the
//                faulty adder's error line reported
//   transient  - an adder fault present in the first pass only: the first
//                sum is damaged and the second is clean, which looks like a
//                masked fault: ST_CORRECTED with the adder located
//   glitch     - an adder error line raised in the first pass only, the sum
//                undamaged: ST_TRANSIENT
//   checker    - input-parity flag stuck at 1: ST_CHECKER_FAIL, sum right
//   double     - two adder faults: the sum must be right unless
//                ST_MULTI_FAULT is reported
// The sum's value is always compared with A + B computed with integers.
module tb_sbsa_pcp;
  import bsd_pkg::*;
  import tb_bsd_pkg::*;
  localparam int N = 128;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic in_ready, out_valid, pa, pb, adder_fault, input_fault;
  bsd_digit_t [N-1:0] a, b;
  bsd_digit_t [N:0]   z;
  logic [4*N-1:0]     fi0, fi1, ff0, ff1;
  logic [2*N:0]       fk0, fk1;
  sbsa_status_e       status;
  logic [N-1:0]       fa_e1, fa_e2;
  logic [$clog2(N+1)-1:0] input_loc;
  int checks = 0, failures = 0;
  int seen[7];

  sbsa_pcp dut (
    .clk, .rst_n, .in_valid, .in_ready, .a, .b, .pa, .pb,
    .flt_in_sa0(fi0), .flt_in_sa1(fi1), .flt_fa_sa0(ff0), .flt_fa_sa1(ff1),
    .flt_chk_sa0(fk0), .flt_chk_sa1(fk1),
    .out_valid, .z, .status, .adder_fault, .fa_e1, .fa_e2, .input_fault, .input_loc
  );

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0t", msg, $time); end
  endtask

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
    for (int t = 0; t < 700; t++) begin
      word_t wa, wb;
      big_t  ref_v;
      int    scen, line, line2, lat;
      bit    sv;
      scen = t % 7;
      wa = rand_word(N); wb = rand_word(N);
      ref_v = word_val(wa, N) + word_val(wb, N);
      fi0 = '0; fi1 = '0; ff0 = '0; ff1 = '0; fk0 = '0; fk1 = '0;
      line  = $urandom_range(0, 4*N-1);
      line2 = (line + 4 + 4 * $urandom_range(0, N-3)) % (4*N);   // another digit
      sv    = 1'($urandom_range(0, 1));
      case (scen)
        1: if (sv) fi1[line] = 1; else fi0[line] = 1;
        2, 3: if (sv) ff1[line] = 1; else ff0[line] = 1;
        4: fk1[2*N] = 1;
        6: fk1[$urandom_range(0, 2*N-1)] = 1;
        5: begin
          if (sv) ff1[line] = 1; else ff0[line] = 1;
          if ($urandom_range(0, 1) == 1) ff1[line2] = 1; else ff0[line2] = 1;
        end
        default: ;
      endcase
      @(negedge clk);
      check(in_ready, "ready when idle");
      a = wa[2*N-1:0]; b = wb[2*N-1:0];
      pa = word_par(wa, N); pb = word_par(wb, N);
      in_valid = 1;
      @(negedge clk);                  // the accepting edge has passed: first pass
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
        1: if (status != ST_OK) begin
             check(status == ST_CORRECTED && input_fault && !adder_fault &&
                   input_loc == line / 4, $sformatf("input line %0d located", line));
             seen[1]++;
           end
        2: if (status != ST_OK) begin
             logic [N-1:0] x1, x2;
             x1 = '0; x2 = '0;
             if (line % 4 < 2) x1[line/4] = 1; else x2[line/4] = 1;
             check(status == ST_CORRECTED && adder_fault && !input_fault &&
                   fa_e1 == x1 && fa_e2 == x2, $sformatf("adder line %0d located", line));
             seen[2]++;
           end
        3: if (status != ST_OK) begin
             check(status == ST_CORRECTED && adder_fault, "transient in an adder");
             seen[3]++;
           end
        6: begin
             check(status == ST_TRANSIENT && adder_fault, "error-line glitch");
             seen[6]++;
           end
        4: begin
             check(status == ST_CHECKER_FAIL, "checker failure");
             seen[4]++;
           end
        5: if (status == ST_MULTI_FAULT) seen[5]++;
        default: ;
      endcase
      if (status == ST_OK) seen[0]++;
    end
    for (int k = 0; k < 7; k++) begin
      check(seen[k] > 0, $sformatf("scenario %0d happened", k));
      $display("outcome %0d seen %0d times", k, seen[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
