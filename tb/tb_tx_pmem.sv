// tb_tx_pmem: loads the 2048 x 16 program memory with random words through
// the load port and reads every word back, then random reads.
module tb_tx_pmem;
  import tx_pkg::*;
  logic clk = 0, ld_we;
  logic [11:0] addr, ld_addr;
  logic [15:0] rdata, ld_data;
  logic [15:0] model [2048];
  int checks = 0, failures = 0;

  tx_pmem #(.DEPTH(2048)) dut (.clk, .addr, .rdata, .ld_we, .ld_addr, .ld_data);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld_we = 0; addr = 0; ld_addr = 0; ld_data = 0;
    for (int i = 0; i < 2048; i++) begin
      ld_we = 1; ld_addr = 12'(i); ld_data = 16'($urandom); model[i] = ld_data;
      @(posedge clk); #1;
    end
    ld_we = 0;
    for (int i = 0; i < 2048 + 5000; i++) begin
      addr = (i < 2048) ? 12'(i) : 12'($urandom);
      #1;
      checks++;
      if (rdata !== model[addr[10:0]]) begin
        failures++;
        $display("FAIL addr=%h rdata=%h exp %h", addr, rdata, model[addr[10:0]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
