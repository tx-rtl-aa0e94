// tb_tx_logic: checks every function of the logic block on random operands.
module tb_tx_logic;
  import tx_pkg::*;
  logic [7:0] a, b, y;
  logic_fn_e  fn;
  int checks = 0, failures = 0;

  tx_logic #(.WIDTH(8)) dut (.a, .b, .fn, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] e;
    for (int n = 0; n < 3000; n++) begin
      a = 8'($urandom); b = 8'($urandom);
      fn = logic_fn_e'(n % 6);
      #1;
      case (n % 6)
        0: e = a & b;
        1: e = a | b;
        2: e = a ^ b;
        3: e = ~a;
        4: e = b;
        default: e = 8'h00;
      endcase
      checks++;
      if (y !== e) begin
        failures++;
        $display("FAIL fn=%0d a=%h b=%h y=%h exp %h", n % 6, a, b, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
