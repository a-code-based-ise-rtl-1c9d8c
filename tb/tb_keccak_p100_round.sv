// tb_keccak_p100_round: checks one Keccak-p[100] round against fixed vectors
// computed with an independent software model and against the bit-level
// reference round for random states and all 16 round indices.
module tb_keccak_p100_round;
  import cbm_ref_pkg::*;

  logic [99:0] s, o;
  logic [3:0]  r;
  int checks = 0, failures = 0;

  keccak_p100_round dut (.state_i(s), .round_i(r), .state_o(o));

  task automatic check(string what, logic [99:0] got, logic [99:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [99:0] rand100();
    return {4'($urandom), $urandom, $urandom, $urandom};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [99:0] vs [6] = '{100'h0000000000000000000000000, 100'hfffffffffffffffffffffffff,
                            100'h6269e0d37f2a74de452e6b438, 100'h1892f902bd23f0824128b2f33,
                            100'h8e8e25d940ed904759531985d, 100'h66f03675a1600a35a099950d8};
    logic [3:0]  vr [6] = '{4'd0, 4'd5, 4'd1, 4'd11, 4'd6, 4'd2};
    logic [99:0] ve [6] = '{100'h0000000000000000000000001, 100'hffffffffffffffffffffffffe,
                            100'h02b729a29e5501f17353afcc1, 100'hdde59ca5237ee894557ed94fb,
                            100'h78b35fba2d835fd8d298cc9ad, 100'hd4582946bf29b68dd8ca69ed0};
    logic [99:0] acc;
    for (int i = 0; i < 6; i++) begin
      s = vs[i]; r = vr[i]; #1;
      check("fixed vector", o, ve[i]);
    end
    // 16 rounds from the zero state (the full Keccak-f[100] permutation)
    acc = '0;
    for (int i = 0; i < 16; i++) begin
      s = acc; r = 4'(i); #1;
      acc = o;
    end
    check("Keccak-f[100](0)", acc, 100'h10aae77d05820f26dabedc566);
    for (int n = 0; n < 500; n++) begin
      s = rand100(); r = 4'($urandom); #1;
      check("random", o, keccak_round(s, int'(r)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
