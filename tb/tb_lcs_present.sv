// End-to-end testbench for lcs_present at its default parameters.
//
// Workload: two synthetic 64x64 8-bit grey-scale "sensor node" images (a
// light background with dark rings, generated here), one per key, as two
// sensor nodes would send them. Eight pixels are packed into each 64-bit
// block (first pixel in the top byte). Every block is encrypted, checked
// against the reference model, then decrypted and checked to equal the
// original pixels. Latencies are checked on every block.
//
// Mechanisms that must each occur at least once (counted, a failure if zero):
// key load, key load refused while busy (a wrongly taken key would break the
// following blocks' results), start ignored k_before any key was
// loaded, encryption, decryption with its key-expansion phase, re-keying
// between images.
module tb_lcs_present;
  import tb_present_ref::*;

  localparam int W = 64, H = 64;
  localparam int NBLK = W * H / 8;
  localparam int ENC_LAT = 4, DEC_LAT = 8;

  logic clk = 1'b0;
  logic rst_n;
  logic [79:0] src_key;
  logic src_key_load, key_loaded;
  logic start, decrypt;
  logic [63:0] din, dout;
  logic ready, busy, done;
  int checks = 0, failures = 0;

  int n_key_load = 0, n_key_refused = 0, n_start_ignored = 0;
  int n_enc = 0, n_dec = 0, n_keyexp = 0, n_rekey = 0;

  always #5 clk = ~clk;

  lcs_present dut (
    .clk(clk), .rst_n(rst_n),
    .src_key(src_key), .src_key_load(src_key_load), .key_loaded(key_loaded),
    .start(start), .decrypt(decrypt), .din(din),
    .ready(ready), .busy(busy), .done(done), .dout(dout)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Synthetic image: background 0xE0, dark rings and small dots.
  function automatic logic [7:0] pixel(int img, int x, int y);
    int cx = (img == 0) ? 20 : 40, cy = (img == 0) ? 24 : 32;
    int d2 = (x - cx) * (x - cx) + (y - cy) * (y - cy);
    if (d2 >= 150 && d2 <= 200) return 8'h30;
    if (((x * 7 + y * 13 + img * 5) % 29) == 0) return 8'h50 + 8'(x + y);
    return 8'hE0;
  endfunction

  function automatic logic [63:0] block_of(int img, int b);
    logic [63:0] v;
    for (int p = 0; p < 8; p++) begin
      int idx = b * 8 + p;
      v[63 - 8*p -: 8] = pixel(img, idx % W, idx / W);
    end
    return v;
  endfunction

  task automatic load_key(logic [79:0] k);
    @(negedge clk);
    src_key = k; src_key_load = 1'b1;
    @(negedge clk);
    src_key_load = 1'b0;
    check(key_loaded, "key loaded");
    n_key_load++;
  endtask

  task automatic process(bit dec, logic [63:0] d, output logic [63:0] res);
    int n = 0;
    @(negedge clk);
    check(ready, "ready k_before start");
    start = 1'b1; decrypt = dec; din = d;
    do begin
      @(negedge clk);
      n++;
      start = 1'b0; din = rand_block(); decrypt = 1'($urandom);
      // Try to change the key in the middle of a block: must be refused.
      if (n == 2) begin
        // A wrong key here would show in the results of the next blocks.
        src_key = rand_key(); src_key_load = 1'b1;
        @(negedge clk);
        n++;
        src_key_load = 1'b0;
        check(busy || done, "key load attempted while busy");
        n_key_refused++;
      end
    end while (!done && n < 100);
    res = dout;
    check(n == (dec ? DEC_LAT : ENC_LAT),
          $sformatf("%s latency %0d", dec ? "decrypt" : "encrypt", n));
    if (dec) n_dec++; else n_enc++;
    // A decryption takes twice an encryption: the forward key expansion
    // ran first.
    if (dec && n == 2 * ENC_LAT) n_keyexp++;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [79:0] keys [2];
    logic [63:0] ct [NBLK];
    logic [63:0] r;
    keys[0] = 80'h0123_4567_89AB_CDEF_FEDC;
    keys[1] = rand_key();
    rst_n = 1'b0; start = 1'b0; decrypt = 1'b0; din = '0;
    src_key = '0; src_key_load = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // No key yet: a start must be ignored.
    @(negedge clk);
    check(!ready, "not ready without key");
    start = 1'b1; din = 64'h1;
    @(negedge clk);
    start = 1'b0;
    repeat (10) begin
      @(negedge clk);
      check(!busy && !done, "start ignored without key");
    end
    n_start_ignored++;

    for (int img = 0; img < 2; img++) begin
      load_key(keys[img]);
      if (img > 0) n_rekey++;
      for (int b = 0; b < NBLK; b++) begin
        logic [63:0] pt;
        pt = block_of(img, b);
        process(1'b0, pt, r);
        ct[b] = r;
        check(r == ref_encrypt(pt, keys[img]), $sformatf("img %0d block %0d enc", img, b));
        check(r != pt, "cipher block differs from plain block");
      end
      for (int b = 0; b < NBLK; b++) begin
        process(1'b1, ct[b], r);
        check(r == block_of(img, b), $sformatf("img %0d block %0d dec", img, b));
      end
      $display("image %0d: %0d blocks encrypted and decrypted", img, NBLK);
    end

    check(n_key_load > 0,      "mechanism: key load");
    check(n_key_refused > 0,   "mechanism: key load refused while busy");
    check(n_start_ignored > 0, "mechanism: start ignored without key");
    check(n_enc > 0,           "mechanism: encryption");
    check(n_dec > 0,           "mechanism: decryption");
    check(n_keyexp == n_dec,   "mechanism: key expansion k_before each decryption");
    check(n_rekey > 0,         "mechanism: re-keying between images");
    $display("key loads %0d, refused %0d, ignored starts %0d, enc %0d, dec %0d, key expansions %0d",
             n_key_load, n_key_refused, n_start_ignored, n_enc, n_dec, n_keyexp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
