// tb_tx_cla_adder: exhaustive check of the 8-bit carry look-ahead
// adder/subtractor against integer arithmetic: every a, b, for add and sub,
// sum and carry out (for sub, carry = no borrow = a >= b).
module tb_tx_cla_adder;
  logic [7:0] a, b, sum;
  logic       sub, co;
  int checks = 0, failures = 0;

  tx_cla_adder #(.WIDTH(8)) dut (.a, .b, .sub, .sum, .carry_out(co));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_s, exp_c;
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < 256; i++)
        for (int j = 0; j < 256; j++) begin
          a = 8'(i); b = 8'(j); sub = s[0];
          #1;
          if (s == 0) begin exp_s = (i + j) & 255; exp_c = (i + j) >> 8; end
          else        begin exp_s = (i - j) & 255; exp_c = (i >= j) ? 1 : 0; end
          checks++;
          if (sum !== 8'(exp_s) || co !== exp_c[0]) begin
            failures++;
            if (failures < 10)
              $display("FAIL sub=%0d a=%0d b=%0d sum=%0d co=%0d exp %0d %0d",
                       s, i, j, sum, co, exp_s, exp_c);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
