// tb_cbm_regfile_rg: random writes and reads of the gated register file
// against an array model. Checks the one-cycle read timing of the registered
// one-hot selects, that a disabled port and x0 read zero, and that a value
// written at a clock edge is seen by a read in the next cycle.
module tb_cbm_regfile_rg;

  logic clk = 0, rst_n = 0;
  logic [4:0] ra, rb, wa;
  logic ea, eb, we;
  logic [31:0] da, db, wd;
  int checks = 0, failures = 0;

  logic [31:0] model [32];
  logic [31:0] exp_a, exp_b;

  cbm_regfile_rg dut (
    .clk_i(clk), .rst_ni(rst_n),
    .raddr_a_i(ra), .ren_a_i(ea), .raddr_b_i(rb), .ren_b_i(eb),
    .rdata_a_o(da), .rdata_b_o(db),
    .we_i(we), .waddr_i(wa), .wdata_i(wd));

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = '0;
    ea = 0; eb = 0; we = 0; ra = 0; rb = 0; wa = 0; wd = 0;
    #12 rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      // present addresses and a write in this cycle
      ra = 5'($urandom); rb = 5'($urandom);
      ea = ($urandom % 4) != 0; eb = ($urandom % 4) != 0;
      we = ($urandom % 2) != 0; wa = 5'($urandom); wd = $urandom;
      @(posedge clk);
      // the write happens at this edge; the selects are captured at this edge
      if (we && wa != 0) model[wa] = wd;
      exp_a = ea ? model[ra] : 32'h0;
      exp_b = eb ? model[rb] : 32'h0;
      #1;
      we = 0; ea = 0; eb = 0;
      check("port a", da, exp_a);
      check("port b", db, exp_b);
      // the register written at the next edge is not visible before it
    end
    // write then read back-to-back on the same register
    we = 1; wa = 5'd7; wd = 32'hCAFE_F00D; ra = 5'd7; ea = 1;
    @(posedge clk); #1; we = 0;
    check("read of register written at the same edge", da, 32'hCAFE_F00D);
    // x0 never writable
    we = 1; wa = 5'd0; wd = 32'hFFFF_FFFF; @(posedge clk); #1; we = 0;
    ra = 5'd0; ea = 1; @(posedge clk); #1;
    check("x0", da, 32'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
