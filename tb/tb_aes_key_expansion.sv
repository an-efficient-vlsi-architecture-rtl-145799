// tb_aes_key_expansion: the pipelined key expansion unit.
//
// A new random key (the first one the FIPS-197 key 2b7e1516...) is applied
// every clock. Round key r must show, in cycle 0 / 4r (r = 1..9) / 39
// (r = 10) after its cipher key, the reference model's round key r of that
// cipher key; all eleven outputs are checked every cycle, which also checks
// that a new key is accepted every clock. Round key 10 of the FIPS key is
// checked against its published value d014f9a8... Watchdog after 5000
// cycles.
module tb_aes_key_expansion;
  import aes_ref_pkg::*;

  localparam int N = 120;
  localparam int USE [11] = '{0, 4, 8, 12, 16, 20, 24, 28, 32, 36, 39};

  logic         clk = 0;
  logic [127:0] cipher_key;
  logic [127:0] round_key [11];
  keys_t        exp_keys [N];
  int checks = 0, failures = 0;

  aes_key_expansion dut (.clk(clk), .cipher_key(cipher_key), .round_key(round_key));

  always #5 clk = ~clk;

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
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
    exp_keys[0] = ref_expand(128'h2b7e151628aed2a6abf7158809cf4f3c);
    for (int i = 1; i < N; i++) exp_keys[i] = ref_expand(rand128());
    cipher_key = exp_keys[0][0];
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      // key k is on cipher_key since negedge k (k = 0 at the first one)
      cipher_key = exp_keys[k][0];
      #1;
      for (int r = 0; r <= 10; r++)
        if (k - USE[r] >= 0)
          check(round_key[r], exp_keys[k - USE[r]][r], $sformatf("cycle %0d round key %0d", k, r));
      if (k == 39) check(round_key[10], 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "FIPS round key 10");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
