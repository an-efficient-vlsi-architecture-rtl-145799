// tb_aes_encryptor: end-to-end test of the AES-128 encryptor at its
// default (and only) configuration.
//
// Phases:
//  1. Known-answer tests, one block at a time: FIPS-197 Appendix B
//     (3243f6a8885a308d313198a2e0370734 / 2b7e1516... -> 3925841d...) and
//     Appendix C.1 (00112233... / 00010203... -> 69c4e0d8...).
//  2. A stream of back-to-back blocks, a different random key for each,
//     long enough to fill all 41 pipeline registers at once; n blocks must
//     finish in k + n - 1 cycles (k = 41 segments).
//  3. Random traffic with bubbles, bursts and repeated keys.
//  4. A reset in the middle of a stream: blocks in flight must be dropped.
// A scoreboard holds every accepted block with its reference ciphertext
// (from the behavioural model) and its input cycle; every output must match
// the oldest entry and arrive exactly 41 cycles after its input.
// Counted mechanisms (each must occur at least once): consecutive-cycle
// outputs (one block per clock), a completely full pipeline, bubbles in the
// stream, a key change between consecutive blocks, a mid-stream reset.
// Watchdog after 20000 cycles.
module tb_aes_encryptor;
  import aes_ref_pkg::*;

  localparam int LATENCY = 41;
  localparam int STREAM  = 3 * LATENCY;

  typedef struct {
    logic [127:0] ct;
    int           cycle;
  } exp_t;

  logic         clk = 0, rst_n = 0;
  logic         in_valid = 0;
  logic [127:0] plain_text = '0, cipher_key = '0;
  logic         out_valid;
  logic [127:0] cipher_text;

  exp_t         sb [$];
  int checks = 0, failures = 0, cycle = 0;
  int n_back_to_back = 0, n_full = 0, n_bubble = 0, n_key_change = 0, n_reset = 0;
  int in_flight = 0, outputs = 0, last_out_cycle = 0;
  logic         prev_out_valid = 0, prev_in_valid = 0, seen_in = 0;
  logic [127:0] prev_key = '0;

  aes_encryptor dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .plain_text(plain_text),
    .cipher_key(cipher_key), .out_valid(out_valid), .cipher_text(cipher_text));

  always #5 clk = ~clk;

  task automatic fail(string msg);
    failures++;
    $display("FAIL cycle %0d: %s", cycle, msg);
  endtask

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) fail($sformatf("%s: got %032h expected %032h", what, got, exp));
  endtask

  // Monitor and scoreboard, sampled just after each rising edge.
  always @(posedge clk) begin
    #1;
    cycle++;
    if (out_valid) begin
      outputs++;
      checks++;
      if (sb.size() == 0) fail("output without an input");
      else begin
        exp_t e;
        e = sb.pop_front();
        check(cipher_text, e.ct, "cipher_text");
        checks++;
        if (cycle - e.cycle != LATENCY)
          fail($sformatf("latency %0d, expected %0d", cycle - e.cycle, LATENCY));
        in_flight--;
      end
      if (prev_out_valid) n_back_to_back++;
      last_out_cycle = cycle;
    end
    // all 41 registers hold a block: the output register plus 40 behind it
    if (out_valid && in_flight == LATENCY - 1) n_full++;
    prev_out_valid = out_valid;
  end

  // Apply one cycle of input (block or bubble) before the next rising edge.
  task automatic drive(bit v, logic [127:0] pt, logic [127:0] key,
                       bit literal = 0, logic [127:0] literal_ct = '0);
    exp_t e;
    @(negedge clk);
    in_valid   = v;
    plain_text = pt;
    cipher_key = key;
    if (v) begin
      e.ct    = literal ? literal_ct : ref_encrypt(pt, key);
      e.cycle = cycle;  // cycle in which the block sits on the input ports
      sb.push_back(e);
      in_flight++;
      if (seen_in && prev_in_valid && key != prev_key) n_key_change++;
      if (seen_in && !prev_in_valid) n_bubble++;
      prev_key = key;
      seen_in  = 1;
    end
    prev_in_valid = v;
  endtask

  task automatic idle(int n);
    repeat (n) drive(0, '0, '0);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] k;
    int first_cycle, outputs_before;
    ref_init();
    repeat (3) @(negedge clk);
    checks++;
    if (out_valid) fail("out_valid during reset");
    rst_n = 1;
    checks++;
    if (aes_pkg::LATENCY != LATENCY)
      fail($sformatf("aes_pkg::LATENCY is %0d, measured design has %0d", aes_pkg::LATENCY, LATENCY));

    // 1. known-answer tests, literal expected values
    drive(1, 128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c,
          1, 128'h3925841d02dc09fbdc118597196a0b32);
    idle(LATENCY + 2);
    drive(1, 128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f,
          1, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    idle(LATENCY + 2);
    checks++;
    if (outputs != 2) fail($sformatf("%0d outputs after the known-answer tests", outputs));

    // 2. back-to-back stream, new key every block. n blocks through a
    //    k-segment pipeline take k + n - 1 cycles: the last ciphertext must
    //    come k + n - 1 cycles after the first block entered (k = LATENCY).
    first_cycle = cycle + 1;
    outputs_before = outputs;
    for (int i = 0; i < STREAM; i++) drive(1, rand128(), rand128());
    idle(LATENCY + 3);
    checks++;
    if (outputs - outputs_before != STREAM)
      fail($sformatf("%0d of %0d streamed blocks came out", outputs - outputs_before, STREAM));
    else if (last_out_cycle - first_cycle != LATENCY + STREAM - 1)
      fail($sformatf("%0d blocks took %0d cycles, expected k+n-1 = %0d",
                     STREAM, last_out_cycle - first_cycle, LATENCY + STREAM - 1));

    // 3. random traffic: bubbles, bursts, repeated keys
    k = rand128();
    for (int i = 0; i < 600; i++) begin
      if ($urandom % 8 == 0) k = rand128();
      drive(($urandom % 3) != 0, rand128(), k);
    end

    // 4. reset with blocks in flight
    for (int i = 0; i < 20; i++) drive(1, rand128(), rand128());
    @(negedge clk);
    in_valid = 0;
    rst_n = 0;
    prev_in_valid = 0;
    sb.delete();
    in_flight = 0;
    n_reset++;
    @(negedge clk);
    rst_n = 1;
    idle(LATENCY + 5);
    drive(1, 128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c,
          1, 128'h3925841d02dc09fbdc118597196a0b32);
    idle(LATENCY + 5);
    checks++;
    if (sb.size() != 0) fail($sformatf("%0d blocks never came out", sb.size()));

    $display("mechanisms: back_to_back=%0d full_pipeline=%0d bubbles=%0d key_changes=%0d resets=%0d outputs=%0d",
             n_back_to_back, n_full, n_bubble, n_key_change, n_reset, outputs);
    checks += 5;
    if (n_back_to_back == 0) fail("no back-to-back outputs");
    if (n_full == 0)         fail("pipeline never full");
    if (n_bubble == 0)       fail("no bubble");
    if (n_key_change == 0)   fail("no key change between consecutive blocks");
    if (n_reset == 0)        fail("no mid-stream reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
