// Testbench for present_round: forward round against the reference
// (pLayer(sLayer(s ^ rk))), inverse round against the reference, and
// inverse(forward(s)) == s under the same round key.
module tb_present_round;
  import tb_present_ref::*;

  logic [63:0] s_in, rk64, s_out;
  logic        inverse;
  int checks = 0, failures = 0;

  present_round dut (.s_in(s_in), .rk64(rk64), .inverse(inverse), .s_out(s_out));

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] s, k, f;
    // Single-bit inputs exercise every position of the permutation.
    for (int i = 0; i < 64; i++) begin
      s = 64'h1 << i;
      inverse = 1'b0; s_in = s; rk64 = '0; #1;
      check(s_out, ref_perm(ref_slayer(s)), $sformatf("fwd bit %0d", i));
    end
    for (int n = 0; n < 500; n++) begin
      s = rand_block(); k = rand_block();
      inverse = 1'b0; s_in = s; rk64 = k; #1;
      f = s_out;
      check(f, ref_perm(ref_slayer(s ^ k)), "random fwd");
      inverse = 1'b1; s_in = s; #1;
      check(s_out, ref_slayer_inv(ref_perm_inv(s)) ^ k, "random inv");
      s_in = f; #1;
      check(s_out, s, "inv(fwd)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
