// aes_key_expansion: pipelined AES-128 key expansion unit.
//
// Derives the eleven round keys (44 words) from the 128-bit cipher key with
// ten chained aes_key_step stages, and hands each round key to the data
// pipeline exactly in the cycle its AddRoundKey needs it. Because the keys
// travel down their own pipeline next to the data, every block may carry a
// different cipher key and the unit still accepts one key per clock.
//
// Timing: cipher_key is the key held in the input register in cycle 0.
// round_key[0] is cipher_key itself (same cycle, for the initial key
// addition). round_key[r] for r >= 1 appears in cycle
// aes_pkg::key_use_cycle(r): 4r for rounds 1..9 and 39 for round 10. Step r
// is computed from round_key[r-1] and registered, and the result is then
// delayed to the cycle of use.
//
// A key expansion unit feeding every round follows the architecture; the
// registered, per-block key pipeline is this design's own choice.
module aes_key_expansion
  import aes_pkg::*;
(
  input  logic   clk,
  input  block_t cipher_key,
  output block_t round_key [NR+1]
);

  assign round_key[0] = cipher_key;

  for (genvar r = 1; r <= NR; r++) begin : g_round
    localparam int unsigned DELAY = key_use_cycle(r) - key_use_cycle(r - 1);

    block_t next_key;
    block_t dly_q [DELAY];

    aes_key_step u_step (
      .prev_key(round_key[r-1]),
      .round   (4'(r)),
      .next_key(next_key)
    );

    always_ff @(posedge clk) begin
      dly_q[0] <= next_key;
      for (int i = 1; i < DELAY; i++) dly_q[i] <= dly_q[i-1];
    end

    assign round_key[r] = dly_q[DELAY-1];
  end

endmodule
