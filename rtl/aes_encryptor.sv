// aes_encryptor: fully unrolled, sub-pipelined AES-128 encryption core.
//
// Plaintext and cipher key are first captured in input registers. The
// initial AddRoundKey XORs them and a register holds the result. Ten round
// units follow, each with a register after every transformation (four
// stages in rounds 1..9, three in round 10); the last register of round 10
// is the output register. The key expansion unit runs alongside and hands
// every round its key in the cycle it is used. With all stages filled, the
// core takes one 128-bit block and delivers one 128-bit ciphertext per
// clock.
//
// Interface: drive plain_text and cipher_key with in_valid high for one
// cycle per block; a new block may follow in the very next cycle, and each
// block may use a different key. out_valid marks cipher_text.
// Timing: a block sampled at clock edge k appears on cipher_text after edge
// k + LATENCY - 1, i.e. LATENCY = 41 cycles from input port to output port
// (1 input register + 1 initial key addition + 9 x 4 + 3).
// Byte order: FIPS-197, byte 0 of a block in bits 127:120.
//
// The structure (input registers, initial key addition, ten unrolled
// rounds with inter-round and sub-round registers, central key expansion
// unit) follows the architecture; the valid flags, their asynchronous
// active-low reset and the per-block key pipeline are this design's own.
module aes_encryptor
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  block_t plain_text,
  input  block_t cipher_key,
  output logic   out_valid,
  output block_t cipher_text
);

  // Input registers
  logic   in_v_q;
  block_t pt_q, key_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) in_v_q <= 1'b0;
    else        in_v_q <= in_valid;

  always_ff @(posedge clk) begin
    pt_q  <= plain_text;
    key_q <= cipher_key;
  end

  // Key expansion unit
  block_t round_key [NR+1];

  aes_key_expansion u_key_expansion (
    .clk       (clk),
    .cipher_key(key_q),
    .round_key (round_key)
  );

  // Initial AddRoundKey and its register
  block_t ark0_d;
  logic   state_v [NR+1];
  block_t state_q [NR+1];

  aes_add_round_key u_ark0 (.in_state(pt_q), .round_key(round_key[0]), .out_state(ark0_d));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state_v[0] <= 1'b0;
    else        state_v[0] <= in_v_q;

  always_ff @(posedge clk) state_q[0] <= ark0_d;

  // Rounds 1..10
  for (genvar r = 1; r <= NR; r++) begin : g_round
    aes_round #(.FINAL(r == NR)) u_round (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (state_v[r-1]),
      .in_state (state_q[r-1]),
      .round_key(round_key[r]),
      .out_valid(state_v[r]),
      .out_state(state_q[r])
    );
  end

  assign out_valid   = state_v[NR];
  assign cipher_text = state_q[NR];

endmodule
