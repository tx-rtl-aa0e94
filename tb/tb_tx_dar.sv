// tb_tx_dar: drives the data address cluster through lda/sta-style loads
// (D-AR <= address field) and the two-cycle indexed sequence of ldx/stx
// (latch BP + R[r2], then D-AR <= DS*16 + that sum, modulo 4096) with random
// BP, R and DS, and checks that D-AR holds when not loaded.
module tb_tx_dar;
  import tx_pkg::*;
  logic clk = 0, rst, ea_we;
  dar_sel_e sel;
  logic [11:0] ads, dar;
  logic [7:0] bp, r_bus, ds;
  int checks = 0, failures = 0;

  tx_dar dut (.clk, .rst, .sel, .ea_we, .ads, .bp, .r_bus, .ds, .dar);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [11:0] exp);
    checks++;
    if (dar !== exp) begin
      failures++;
      $display("FAIL %s dar=%h exp %h (bp=%h r=%h ds=%h)", what, dar, exp, bp, r_bus, ds);
    end
  endtask

  initial begin
    logic [11:0] e;
    rst = 1; sel = DA_HOLD; ea_we = 0; ads = 0; bp = 0; r_bus = 0; ds = 0;
    @(posedge clk); #1 rst = 0;
    check("reset", 12'h000);
    for (int n = 0; n < 3000; n++) begin
      if ($urandom_range(0, 1) == 0) begin
        ads = 12'($urandom); sel = DA_ADS;
        @(posedge clk); #1 sel = DA_HOLD;
        check("ads", ads);
      end else begin
        bp = 8'($urandom); r_bus = 8'($urandom);
        ds = ($urandom_range(0, 2) == 0) ? 8'($urandom) : 8'h00;
        e = 12'(int'(bp) + int'(r_bus) + 16 * int'(ds));
        ea_we = 1;
        @(posedge clk); #1 ea_we = 0;
        // BP and R may change after the first cycle without effect
        bp = 8'($urandom); r_bus = 8'($urandom);
        sel = DA_IDX;
        @(posedge clk); #1 sel = DA_HOLD;
        check("idx", e);
      end
      // hold
      e = dar; ads = 12'($urandom);
      @(posedge clk); #1;
      check("hold", e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
