// LCS-PRESENT top: a key source feeding a PRESENT-80 block cipher engine.
//
// The design pairs a key-generating circuit (the "LCS circuit") with a
// PRESENT block that encrypts and decrypts 64-bit blocks under an 80-bit key,
// for example the pixels of a sensor-node image packed eight 8-bit pixels per
// block. The key circuit's internals are not specified, so its output enters
// here as the `src_key` port: a one-cycle `src_key_load` pulse copies it into
// the key register, and every following block is processed under that key
// until the next load. Holding the key in a register, the load strobe and
// the `ready` flag are this design's own choices.
//
// Interface: when `ready` is high (a key has been loaded and the engine is
// idle), a `start` pulse with `decrypt` and `din` begins one block.
// `done` pulses when `dout` holds the result: ENC_CYCLES clock edges after
// `start` for encryption, 2*ENC_CYCLES for decryption (see present_core).
// `start` while not ready is ignored. A key load while the engine is busy is
// refused (`key_loaded` does not change) so a block never sees a key change
// half way.
module lcs_present
  import present_pkg::*;
#(
  parameter int unsigned ENC_CYCLES = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  // key source (output of the key-generating circuit)
  input  key_t   src_key,
  input  logic   src_key_load,
  output logic   key_loaded,
  // block interface
  input  logic   start,
  input  logic   decrypt,
  input  block_t din,
  output logic   ready,
  output logic   busy,
  output logic   done,
  output block_t dout
);

  key_t key_q;
  logic core_start;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      key_q      <= '0;
      key_loaded <= 1'b0;
    end else if (src_key_load && !busy) begin
      key_q      <= src_key;
      key_loaded <= 1'b1;
    end
  end

  assign ready      = key_loaded && !busy;
  assign core_start = start && ready;

  present_core #(
    .ENC_CYCLES (ENC_CYCLES)
  ) u_core (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (core_start),
    .decrypt (decrypt),
    .key     (key_q),
    .din     (din),
    .busy    (busy),
    .done    (done),
    .dout    (dout)
  );

endmodule
