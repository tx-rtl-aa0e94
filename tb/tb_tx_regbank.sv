// tb_tx_regbank: random writes and reads of the 16 x 8 register bank
// against an array model; checks the R[] read port and the accumulator,
// BP and DS taps after every cycle, and that reset clears all registers.
module tb_tx_regbank;
  import tx_pkg::*;
  logic clk = 0, rst, we;
  logic [3:0] w_addr, r_addr;
  logic [7:0] w_data, r_data, acc, bp, ds;
  logic [7:0] model [16];
  int checks = 0, failures = 0;

  tx_regbank dut (.clk, .rst, .we, .w_addr, .w_data, .r_addr, .r_data, .acc, .bp, .ds);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    rst = 1; we = 0; w_addr = 0; w_data = 0; r_addr = 0;
    @(posedge clk); #1 rst = 0;
    foreach (model[i]) model[i] = 0;
    for (int i = 0; i < 16; i++) begin
      r_addr = 4'(i); #1 check("reset", r_data, 8'h00);
    end
    for (int n = 0; n < 4000; n++) begin
      we = 1'($urandom); w_addr = 4'($urandom); w_data = 8'($urandom);
      @(posedge clk); #1;
      if (we) model[w_addr] = w_data;
      we = 0;
      r_addr = 4'($urandom);
      #1;
      check("r_data", r_data, model[r_addr]);
      check("acc", acc, model[15]);
      check("bp", bp, model[11]);
      check("ds", ds, model[13]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
