// aes_round: one sub-pipelined AES round.
//
// The round applies SubBytes, ShiftRows, MixColumns and AddRoundKey, and a
// register follows every one of these transformations, so a round is four
// pipeline stages deep (rounds 1..9). With FINAL = 1 it is the tenth round,
// which has no MixColumns and is three stages deep. Each stage passes a
// valid flag along with the state, so the pipeline accepts a new block every
// clock and bubbles travel through it unchanged.
//
// Timing: a block presented on in_state with in_valid in cycle t appears on
// out_state with out_valid in cycle t + STAGES, STAGES being ROUND_STAGES (4) or
// FINAL_STAGES (3). AddRoundKey reads round_key combinationally in cycle
// t + STAGES - 1, when the block sits in the last
// internal register; the key expansion unit supplies the key for that cycle.
// An assertion checks that out_valid only follows an in_valid exactly STAGES
// cycles earlier. Its reset-disable clause makes Verilator's lint report
// rst_n as used both synchronously and asynchronously (SYNCASYNCNET); that
// use is in the assertion only, the flip-flops see rst_n as an asynchronous
// reset alone.
//
// Registering every transformation and the per-stage valid flags follow the
// sub-pipelining scheme of the architecture; the valid flags and their
// asynchronous active-low reset are this design's own addition. The state
// registers are not reset: their contents only matter when the matching
// valid flag is set.
module aes_round
  import aes_pkg::*;
#(
  parameter bit FINAL = 1'b0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  block_t in_state,
  input  block_t round_key,
  output logic   out_valid,
  output block_t out_state
);

  block_t sb_d, sr_d, ark_in, ark_d;
  block_t sb_q, sr_q, ark_q;
  logic   sb_v, sr_v, mc_v, ark_v;

  // SubBytes -> register
  aes_sub_bytes u_sub_bytes (.in_state(in_state), .out_state(sb_d));

  // ShiftRows -> register
  aes_shift_rows u_shift_rows (.in_state(sb_q), .out_state(sr_d));

  // MixColumns -> register (absent from the final round)
  if (!FINAL) begin : g_mix
    block_t mc_d, mc_q;

    aes_mix_columns u_mix_columns (.in_state(sr_q), .out_state(mc_d));

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) mc_v <= 1'b0;
      else        mc_v <= sr_v;

    always_ff @(posedge clk) mc_q <= mc_d;

    assign ark_in = mc_q;
  end else begin : g_no_mix
    assign mc_v   = sr_v;
    assign ark_in = sr_q;
  end

  // AddRoundKey -> register (the register at the end of the round)
  aes_add_round_key u_add_round_key (.in_state(ark_in), .round_key(round_key), .out_state(ark_d));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sb_v  <= 1'b0;
      sr_v  <= 1'b0;
      ark_v <= 1'b0;
    end else begin
      sb_v  <= in_valid;
      sr_v  <= sb_v;
      ark_v <= mc_v;
    end
  end

  always_ff @(posedge clk) begin
    sb_q  <= sb_d;
    sr_q  <= sr_d;
    ark_q <= ark_d;
  end

  assign out_valid = ark_v;
  assign out_state = ark_q;

  // A block leaves exactly STAGES cycles after it entered. The check is off
  // while reset is held, when the valid flags may not yet be cleared.
  localparam int unsigned STAGES = FINAL ? FINAL_STAGES : ROUND_STAGES;

  a_stages : assert property (@(posedge clk) disable iff (!rst_n)
                              out_valid |-> $past(in_valid, STAGES))
    else $error("out_valid without a block %0d cycles earlier", STAGES);

endmodule
