// tb_tx_dmem: random processor-port and host-port writes and reads of the
// 2048 x 8 data memory against an array model; also checks that 12-bit
// addresses above 2047 alias onto the lower half.
module tb_tx_dmem;
  import tx_pkg::*;
  logic clk = 0, we, h_we;
  logic [11:0] addr, h_addr;
  logic [7:0] wdata, rdata, h_wdata, h_rdata;
  logic [7:0] model [2048];
  int checks = 0, failures = 0;

  tx_dmem #(.DEPTH(2048)) dut (.clk, .addr, .we, .wdata, .rdata, .h_addr, .h_we, .h_wdata, .h_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; h_we = 0; addr = 0; h_addr = 0; wdata = 0; h_wdata = 0;
    // fill through the host port
    for (int i = 0; i < 2048; i++) begin
      h_we = 1; h_addr = 12'(i); h_wdata = 8'($urandom); model[i] = h_wdata;
      @(posedge clk); #1;
    end
    h_we = 0;
    for (int n = 0; n < 20000; n++) begin
      we = 1'($urandom); addr = 12'($urandom); wdata = 8'($urandom);
      h_addr = 12'($urandom);
      #1;
      checks++;
      if (rdata !== model[addr[10:0]] || h_rdata !== model[h_addr[10:0]]) begin
        failures++;
        $display("FAIL addr=%h rdata=%h exp %h h_addr=%h h_rdata=%h exp %h",
                 addr, rdata, model[addr[10:0]], h_addr, h_rdata, model[h_addr[10:0]]);
      end
      @(posedge clk); #1;
      if (we) model[addr[10:0]] = wdata;
      we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
