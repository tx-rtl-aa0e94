// tb_tx_par: drives the program counter cluster with random selections
// (hold, increment, load address field, return) and return-address saves,
// checking PC and the saved return address against a model every cycle,
// including the wrap from 4095 to 0.
module tb_tx_par;
  import tx_pkg::*;
  logic clk = 0, rst, ret_we;
  pc_sel_e sel;
  logic [11:0] ads, pc, retads;
  logic [11:0] m_pc, m_ret, old_ret;
  int checks = 0, failures = 0;

  tx_par dut (.clk, .rst, .sel, .ret_we, .ads, .pc, .retads);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; sel = PC_HOLD; ret_we = 0; ads = 0;
    @(posedge clk); #1 rst = 0;
    m_pc = 0; m_ret = 0;
    for (int n = 0; n < 10000; n++) begin
      sel = pc_sel_e'($urandom_range(0, 3));
      ret_we = ($urandom_range(0, 3) == 0);
      ads = (n % 500 == 7) ? 12'hFFF : 12'($urandom);
      @(posedge clk); #1;
      // both registers update at the same edge from their old values
      old_ret = m_ret;
      if (ret_we) m_ret = m_pc;
      case (sel)
        PC_INC:  m_pc = m_pc + 1;
        PC_ADS:  m_pc = ads;
        PC_RET:  m_pc = old_ret;
        default: ;
      endcase
      checks++;
      if (pc !== m_pc || retads !== m_ret) begin
        failures++;
        $display("FAIL sel=%s pc=%h exp %h ret=%h exp %h", sel.name(), pc, m_pc, retads, m_ret);
        m_pc = pc; m_ret = retads;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
