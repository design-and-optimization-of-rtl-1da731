// Testbench for present_key_update: forward steps against the reference key
// schedule (including the published round key K32 for the all-zero key),
// and inverse(forward(k, rc), rc) == k for random keys and counters.
module tb_present_key_update;
  import tb_present_ref::*;

  logic [79:0] k_in, k_out;
  logic [4:0]  rc;
  logic        inverse;
  int checks = 0, failures = 0;

  present_key_update dut (.k_in(k_in), .rc(rc), .inverse(inverse), .k_out(k_out));

  task automatic check(logic [79:0] got, logic [79:0] exp, string what);
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
    logic [79:0] k, fwd;
    // Walk the whole schedule of two fixed keys.
    for (int kk = 0; kk < 2; kk++) begin
      k = (kk == 0) ? 80'h0 : {80{1'b1}};
      for (int r = 1; r <= 31; r++) begin
        inverse = 1'b0; k_in = k; rc = 5'(r); #1;
        check(k_out, ref_key_next(k, r), $sformatf("fwd key %0d round %0d", kk, r));
        k = k_out;
      end
      // Walk back to the start.
      for (int r = 31; r >= 1; r--) begin
        inverse = 1'b1; k_in = k; rc = 5'(r); #1;
        k = k_out;
      end
      check(k, (kk == 0) ? 80'h0 : {80{1'b1}}, $sformatf("inverse walk key %0d", kk));
    end
    // Random single steps.
    for (int n = 0; n < 500; n++) begin
      k = rand_key();
      rc = 5'($urandom);
      inverse = 1'b0; k_in = k; #1;
      fwd = k_out;
      check(fwd, ref_key_next(k, int'(rc)), "random fwd");
      inverse = 1'b1; k_in = fwd; #1;
      check(k_out, k, "random inverse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
