// tb_aes_key_step: one key-expansion step for every round number.
//
// Walks the FIPS-197 Appendix A.1 schedule for key 2b7e1516...: every step
// is fed the previous round key and round number; rounds 1 and 10 are also
// checked against their published values (a0fafe17... and d014f9a8...).
// Then random keys, all ten steps each, against the reference expansion.
// Combinational; watchdog.
module tb_aes_key_step;
  import aes_ref_pkg::*;

  logic [127:0] prev_key, next_key;
  logic [3:0]   round;
  int checks = 0, failures = 0;
  keys_t k;

  aes_key_step dut (.prev_key(prev_key), .round(round), .next_key(next_key));

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    k = ref_expand(128'h2b7e151628aed2a6abf7158809cf4f3c);
    for (int r = 1; r <= 10; r++) begin
      prev_key = k[r-1];
      round    = 4'(r);
      #1;
      check(next_key, k[r], $sformatf("FIPS key, step %0d", r));
      if (r == 1)  check(next_key, 128'ha0fafe1788542cb123a339392a6c7605, "FIPS round key 1");
      if (r == 10) check(next_key, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "FIPS round key 10");
    end
    for (int i = 0; i < 30; i++) begin
      k = ref_expand(rand128());
      for (int r = 1; r <= 10; r++) begin
        prev_key = k[r-1];
        round    = 4'(r);
        #1;
        check(next_key, k[r], $sformatf("random key, step %0d", r));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
