// tb_aes_round: one sub-pipelined round, both variants.
//
// A normal round (four stages) and a final round (three stages, no
// MixColumns) receive the same stream of 300 random states, with random
// bubbles in in_valid. Each round key is driven in the cycle its
// AddRoundKey reads it, STAGES-1 cycles after the state. Every cycle the
// outputs are compared with the block that entered exactly STAGES cycles
// earlier (this checks the latency of 4 and 3 cycles and the one-block-per-
// clock rate), and out_valid with its valid flag. Also checks that reset
// clears the valid flags. Watchdog after 5000 cycles.
module tb_aes_round;
  import aes_ref_pkg::*;

  localparam int N = 300;

  logic         clk = 0, rst_n = 0;
  logic         in_valid;
  logic [127:0] in_state, key_n, key_f;
  logic         v_n, v_f;
  logic [127:0] out_n, out_f;

  logic [127:0] st [N];
  logic [127:0] ky [N];
  bit           vl [N];
  int checks = 0, failures = 0, cycle = 0, busy_n = 0;

  aes_round #(.FINAL(1'b0)) dut_n (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_state(in_state),
    .round_key(key_n), .out_valid(v_n), .out_state(out_n));

  aes_round #(.FINAL(1'b1)) dut_f (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_state(in_state),
    .round_key(key_f), .out_valid(v_f), .out_state(out_f));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL cycle %0d %s: got %032h expected %032h", cycle, what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      st[i] = rand128();
      ky[i] = rand128();
      vl[i] = ($urandom % 4) != 0;
    end
    in_valid = 0;
    in_state = '0;
    key_n = '0;
    key_f = '0;
    repeat (3) @(negedge clk);
    check({127'b0, v_n}, 128'b0, "valid in reset (normal)");
    check({127'b0, v_f}, 128'b0, "valid in reset (final)");
    rst_n = 1;
    for (int k = 0; k < N + 5; k++) begin
      @(negedge clk);
      // outputs after edge k: blocks k-4 (normal) and k-3 (final)
      if (k >= 4) begin
        check({127'b0, v_n}, {127'b0, vl[k-4] && (k - 4 < N)}, "out_valid (normal)");
        if (k - 4 < N && vl[k-4]) begin
          check(out_n, ref_mix_columns(ref_shift_rows(ref_sub_bytes(st[k-4]))) ^ ky[k-4],
                "out_state (normal)");
          busy_n++;
        end
      end
      if (k >= 3) begin
        check({127'b0, v_f}, {127'b0, vl[k-3] && (k - 3 < N)}, "out_valid (final)");
        if (k - 3 < N && vl[k-3])
          check(out_f, ref_shift_rows(ref_sub_bytes(st[k-3])) ^ ky[k-3], "out_state (final)");
      end
      // drive block k, and the keys of the blocks at AddRoundKey
      in_valid = (k < N) ? vl[k] : 1'b0;
      in_state = (k < N) ? st[k] : '0;
      key_n    = (k >= 3 && k - 3 < N) ? ky[k-3] : '0;
      key_f    = (k >= 2 && k - 2 < N) ? ky[k-2] : '0;
    end
    if (busy_n == 0) begin
      failures++;
      $display("FAIL no block went through");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
