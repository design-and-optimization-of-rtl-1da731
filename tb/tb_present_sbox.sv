// Testbench for present_sbox: all 16 inputs in both directions against the
// reference table, and S^-1(S(x)) == x.
module tb_present_sbox;
  import tb_present_ref::*;

  logic       inverse;
  logic [3:0] x, y;
  int checks = 0, failures = 0;

  present_sbox dut (.inverse(inverse), .x(x), .y(y));

  task automatic check(logic [3:0] got, logic [3:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      inverse = 1'b0; x = 4'(i); #1;
      check(y, ref_s(4'(i)), $sformatf("S[%h]", i));
      inverse = 1'b1; x = ref_s(4'(i)); #1;
      check(y, 4'(i), $sformatf("S^-1[S[%h]]", i));
      inverse = 1'b1; x = 4'(i); #1;
      check(y, ref_s_inv(4'(i)), $sformatf("S^-1[%h]", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
