// Testbench for present_core.
//
// Three engines receive the same requests: the default ENC_CYCLES = 4 (eight
// rounds per clock), ENC_CYCLES = 31 (one round per clock) and ENC_CYCLES = 9
// (four rounds per clock, so only eight passes are needed).
// Checks: the four published PRESENT-80 known-answer vectors, random
// encryptions and decryptions against the reference model, decryption of
// each ciphertext back to its plaintext, and the latency of every request
// (ceil(31/UNROLL) clock edges for encryption, twice that for decryption).
module tb_present_core;
  import tb_present_ref::*;

  localparam int NE = 3;
  localparam int ENC_C [NE] = '{4, 31, 9};

  logic clk = 1'b0;
  logic rst_n;
  logic start, decrypt;
  logic [79:0] key;
  logic [63:0] din;
  logic [NE-1:0] busy, done;
  logic [63:0] dout [NE];
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  for (genvar e = 0; e < NE; e++) begin : g_dut
    present_core #(.ENC_CYCLES(ENC_C[e])) dut (
      .clk(clk), .rst_n(rst_n), .start(start), .decrypt(decrypt),
      .key(key), .din(din), .busy(busy[e]), .done(done[e]), .dout(dout[e])
    );
  end

  function automatic int exp_latency(int e, bit dec);
    int u = (31 + ENC_C[e] - 1) / ENC_C[e];
    int c = (31 + u - 1) / u;
    return dec ? 2 * c : c;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // One request to both engines; returns their results.
  task automatic run(bit dec, logic [79:0] k, logic [63:0] d, output logic [63:0] res [NE]);
    int lat [NE];
    bit got [NE];
    int n = 0;
    @(negedge clk);
    start = 1'b1; decrypt = dec; key = k; din = d;
    foreach (got[e]) got[e] = 1'b0;
    do begin
      @(negedge clk);
      n++;
      start = 1'b0; key = rand_key(); din = rand_block(); decrypt = 1'($urandom);
      for (int e = 0; e < NE; e++) if (done[e] && !got[e]) begin
        got[e] = 1'b1; lat[e] = n; res[e] = dout[e];
      end
    end while (got.sum() with (int'(item)) != NE && n < 200);
    for (int e = 0; e < NE; e++) begin
      check(got[e] && lat[e] == exp_latency(e, dec),
            $sformatf("engine %0d %s latency %0d expected %0d", e, dec ? "dec" : "enc",
                      lat[e], exp_latency(e, dec)));
    end
    @(negedge clk);
    check(busy == '0 && done == '0, "engines idle after done");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] res [NE];
    logic [63:0] ct, pt;
    logic [79:0] k;
    logic [63:0] kat_pt [4] = '{64'h0, 64'h0, {64{1'b1}}, {64{1'b1}}};
    logic [79:0] kat_k  [4] = '{80'h0, {80{1'b1}}, 80'h0, {80{1'b1}}};
    logic [63:0] kat_ct [4] = '{64'h5579C1387B228445, 64'hE72C46C0F5945049,
                                64'hA112FFC72F68417B, 64'h3333DCD3213210D2};
    rst_n = 1'b0; start = 1'b0; decrypt = 1'b0; key = '0; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int i = 0; i < 4; i++) begin
      run(1'b0, kat_k[i], kat_pt[i], res);
      for (int e = 0; e < NE; e++)
        check(res[e] == kat_ct[i], $sformatf("KAT %0d enc engine %0d: %h", i, e, res[e]));
      run(1'b1, kat_k[i], kat_ct[i], res);
      for (int e = 0; e < NE; e++)
        check(res[e] == kat_pt[i], $sformatf("KAT %0d dec engine %0d: %h", i, e, res[e]));
    end

    for (int n = 0; n < 100; n++) begin
      k = rand_key(); pt = rand_block();
      run(1'b0, k, pt, res);
      ct = ref_encrypt(pt, k);
      for (int e = 0; e < NE; e++)
        check(res[e] == ct, $sformatf("random enc engine %0d", e));
      run(1'b1, k, ct, res);
      for (int e = 0; e < NE; e++)
        check(res[e] == pt, $sformatf("random dec engine %0d", e));
      // Decrypting an arbitrary block must match the reference too.
      ct = rand_block();
      run(1'b1, k, ct, res);
      for (int e = 0; e < NE; e++)
        check(res[e] == ref_decrypt(ct, k), $sformatf("random dec2 engine %0d", e));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
