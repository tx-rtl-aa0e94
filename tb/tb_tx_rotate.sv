// tb_tx_rotate: exhaustive check of the rotation/bypass unit: pass,
// rotate left and rotate right by one bit, computed bit by bit.
module tb_tx_rotate;
  import tx_pkg::*;
  logic [7:0] a, y;
  rot_fn_e    fn;
  int checks = 0, failures = 0;

  tx_rotate #(.WIDTH(8)) dut (.a, .fn, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] e;
    for (int i = 0; i < 256; i++)
      for (int k = 0; k < 3; k++) begin
        a = 8'(i); fn = rot_fn_e'(k);
        #1;
        for (int bit_i = 0; bit_i < 8; bit_i++)
          case (k)
            0: e[bit_i] = a[bit_i];
            1: e[bit_i] = a[(bit_i + 7) % 8];
            default: e[bit_i] = a[(bit_i + 1) % 8];
          endcase
        checks++;
        if (y !== e) begin
          failures++;
          $display("FAIL fn=%0d a=%b y=%b exp %b", k, a, y, e);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
