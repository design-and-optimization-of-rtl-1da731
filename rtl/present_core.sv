// PRESENT block: PRESENT-80 encryption and decryption engine with controller.
//
// The engine holds a 64-bit state register and an 80-bit key register and
// runs UNROLL rounds per clock through a chain of present_round and
// present_key_update stages. UNROLL is derived from ENC_CYCLES, the number of
// clock cycles one encryption takes: the design states a delay of four clock
// cycles, so ENC_CYCLES defaults to 4 and UNROLL = ceil(31/4) = 8. Stages whose
// round number falls outside 1..31 in the last pass pass their inputs through.
//
// Encryption (decrypt = 0): the cycle that accepts `start` already computes
// rounds 1..UNROLL from `din` and `key`; after ENC_CYCLES clock edges in all,
// `dout` = state ^ K32 and `done` pulses for one cycle.
//
// Decryption (decrypt = 1): decryption needs the last round key K32 first.
// The engine runs the key schedule forward for ENC_CYCLES cycles (the data
// stages idle, the ciphertext waits in the state register), then XORs K32 into
// the state and runs the inverse rounds 31..1 for ENC_CYCLES more cycles,
// walking the key schedule backwards with the inverse key step. Total latency
// is 2*ENC_CYCLES edges. This two-phase decryption is this design's choice.
//
// Interface: `start` is taken only while `busy` is low; `din`, `key` and
// `decrypt` are sampled with it. `dout` holds the last result until the next
// one is written. Active-low synchronous reset clears the controller.
module present_core
  import present_pkg::*;
#(
  parameter int unsigned ENC_CYCLES = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  logic   decrypt,
  input  key_t   key,
  input  block_t din,
  output logic   busy,
  output logic   done,
  output block_t dout
);

  localparam int unsigned UNROLL = (NUM_ROUNDS + ENC_CYCLES - 1) / ENC_CYCLES;

  typedef enum logic [1:0] {
    S_IDLE,
    S_ENC,   // encryption rounds
    S_KEY,   // forward key expansion ahead of decryption
    S_DEC    // decryption rounds
  } state_e;

  typedef enum logic [1:0] {
    PH_ENC,
    PH_KEY,
    PH_DEC
  } phase_e;

  state_e     st_q, st_d;
  block_t     state_q;
  key_t       key_q;
  logic [5:0] rnd_q;        // round number handled by stage 0
  logic       first_q;      // first decryption pass: add K32 first

  phase_e     phase;
  logic [5:0] rbase;
  block_t     s_head, s_tail;   // state into stage 0 / out of the last stage
  key_t       k_head, k_tail;   // key into stage 0 / out of the last stage
  logic       last;         // this pass finishes the current phase

  // ------------------------------------------------------------------
  // Inputs of the round chain
  // ------------------------------------------------------------------
  always_comb begin
    phase = PH_ENC;
    unique case (st_q)
      S_IDLE: phase = decrypt ? PH_KEY : PH_ENC;
      S_ENC:  phase = PH_ENC;
      S_KEY:  phase = PH_KEY;
      S_DEC:  phase = PH_DEC;
      default: phase = PH_ENC;
    endcase
  end

  assign rbase = (st_q == S_IDLE) ? 6'd1 : rnd_q;

  always_comb begin
    if (st_q == S_IDLE) begin
      s_head = din;
      k_head = key;
    end else begin
      s_head = (st_q == S_DEC && first_q) ? (state_q ^ key_q[KEY_W-1 -: BLOCK_W])
                                          : state_q;
      k_head = key_q;
    end
  end

  // ------------------------------------------------------------------
  // Unrolled round chain
  // ------------------------------------------------------------------
  for (genvar j = 0; j < UNROLL; j++) begin : g_stage
    logic [5:0] r;
    logic       active;
    block_t     s_in, s_next, s_out;
    key_t       k_in, k_next, k_out;
    block_t     rk64;

    if (j == 0) begin : g_first
      assign s_in = s_head;
      assign k_in = k_head;
    end else begin : g_next
      assign s_in = g_stage[j-1].s_out;
      assign k_in = g_stage[j-1].k_out;
    end

    assign r      = (phase == PH_DEC) ? (rbase - 6'(j)) : (rbase + 6'(j));
    assign active = (phase == PH_DEC) ? (rbase > 6'(j))
                                      : (r <= 6'(NUM_ROUNDS));

    present_key_update u_key (
      .k_in    (k_in),
      .rc      (r[RC_W-1:0]),
      .inverse (phase == PH_DEC),
      .k_out   (k_next)
    );

    // Encryption uses K_r before the update, decryption K_r after the
    // inverse update.
    assign rk64 = (phase == PH_DEC) ? k_next[KEY_W-1 -: BLOCK_W]
                                    : k_in[KEY_W-1 -: BLOCK_W];

    present_round u_round (
      .s_in    (s_in),
      .rk64    (rk64),
      .inverse (phase == PH_DEC),
      .s_out   (s_next)
    );

    assign k_out = active ? k_next : k_in;
    assign s_out = (active && phase != PH_KEY) ? s_next : s_in;
  end

  assign s_tail = g_stage[UNROLL-1].s_out;
  assign k_tail = g_stage[UNROLL-1].k_out;

  assign last = (phase == PH_DEC) ? (rbase <= 6'(UNROLL))
                                  : (rbase + 6'(UNROLL) > 6'(NUM_ROUNDS));

  // ------------------------------------------------------------------
  // Controller
  // ------------------------------------------------------------------
  always_comb begin
    st_d = st_q;
    unique case (st_q)
      S_IDLE: if (start) begin
        if (decrypt) st_d = last ? S_DEC : S_KEY;
        else         st_d = last ? S_IDLE : S_ENC;
      end
      S_ENC:  if (last) st_d = S_IDLE;
      S_KEY:  if (last) st_d = S_DEC;
      S_DEC:  if (last) st_d = S_IDLE;
      default: st_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_q    <= S_IDLE;
      state_q <= '0;
      key_q   <= '0;
      rnd_q   <= 6'd1;
      first_q <= 1'b0;
      done    <= 1'b0;
      dout    <= '0;
    end else begin
      st_q <= st_d;
      done <= 1'b0;
      if (st_q != S_IDLE || start) begin
        state_q <= s_tail;
        key_q   <= k_tail;
        first_q <= 1'b0;
        if (phase == PH_DEC) rnd_q <= rbase - 6'(UNROLL);
        else                 rnd_q <= rbase + 6'(UNROLL);
        if (last) begin
          unique case (phase)
            PH_ENC: begin
              dout <= s_tail ^ k_tail[KEY_W-1 -: BLOCK_W];
              done <= 1'b1;
            end
            PH_KEY: begin
              rnd_q   <= 6'(NUM_ROUNDS);
              first_q <= 1'b1;
            end
            PH_DEC: begin
              dout <= s_tail;
              done <= 1'b1;
            end
            default: ;
          endcase
        end
      end
    end
  end

  assign busy = (st_q != S_IDLE);

  // A request while the engine is busy would be dropped.
  a_no_start_when_busy : assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !start)
    else $error("present_core: start asserted while busy");

endmodule
