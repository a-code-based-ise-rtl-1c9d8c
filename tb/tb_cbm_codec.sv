// tb_cbm_codec: checks the 182-XOR codec against the GF(2^4) matrix product,
// its involution property and linearity, on unit vectors and random words.
module tb_cbm_codec;
  import cbm_ref_pkg::*;

  logic [31:0] x, y, x2, y2;
  int checks = 0, failures = 0;

  cbm_codec dut  (.x_i(x),  .y_o(y));
  cbm_codec dut2 (.x_i(y),  .y_o(x2));   // decode of the encoding
  logic [31:0] xb;
  cbm_codec dut3 (.x_i(xb), .y_o(y2));

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      x = 32'd1 << i; xb = '0; #1;
      check("unit vector", y, mds_mul(x));
    end
    for (int n = 0; n < 2000; n++) begin
      x  = $urandom;
      xb = $urandom;
      #1;
      check("random", y, mds_mul(x));
      check("involution", x2, x);
      check("second instance", y2, mds_mul(xb));
    end
    // A known value: A times element 0 = 1 is the first column of A
    x = 32'h0000_0001; #1;
    check("first column", y, 32'hF8A5_C432);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
