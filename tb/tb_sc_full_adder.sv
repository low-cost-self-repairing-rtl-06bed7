// tb_sc_full_adder: exhaustive check of the self-checking full adder.
// Fault-free: for all 8 input combinations Sum/Cout must equal the binary sum
// of the inputs and Ef must be 0. Faulty: for each of the four single
// stuck-at faults on Sum or Cout and every input combination, Ef must be 1
// exactly when an output differs from the fault-free value.
module tb_sc_full_adder;
  logic a, b, cin, sum, cout, ef;
  logic [1:0] sa0, sa1;
  int checks = 0, failures = 0;

  sc_full_adder dut (.a, .b, .cin, .flt_sa0(sa0), .flt_sa1(sa1), .sum, .cout, .ef);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 5; f++) begin
      sa0 = '0; sa1 = '0;
      case (f)
        1: sa0[0] = 1'b1;
        2: sa1[0] = 1'b1;
        3: sa0[1] = 1'b1;
        4: sa1[1] = 1'b1;
        default: ;
      endcase
      for (int v = 0; v < 8; v++) begin
        logic [1:0] ref_sum;
        logic       wrong;
        {a, b, cin} = 3'(v);
        #1;
        ref_sum = 2'(a) + 2'(b) + 2'(cin);
        wrong   = ({cout, sum} != ref_sum);
        checks++;
        if (f == 0 && (wrong || ef)) begin
          failures++;
          $display("FAIL fault-free in=%b sum=%b cout=%b ef=%b", 3'(v), sum, cout, ef);
        end
        if (f != 0 && ef != wrong) begin
          failures++;
          $display("FAIL fault %0d in=%b wrong=%b ef=%b", f, 3'(v), wrong, ef);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
