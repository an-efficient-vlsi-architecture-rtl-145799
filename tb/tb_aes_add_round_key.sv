// tb_aes_add_round_key: AddRoundKey.
//
// The FIPS-197 Appendix B initial key addition (plaintext 3243f6a8... with
// key 2b7e1516... gives 193de3be...), then 200 random state/key pairs whose
// expected value is formed byte by byte. Combinational; watchdog.
module tb_aes_add_round_key;
  import aes_ref_pkg::*;

  logic [127:0] in_state, round_key, out_state;
  int checks = 0, failures = 0;

  aes_add_round_key dut (.in_state(in_state), .round_key(round_key), .out_state(out_state));

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  function automatic logic [127:0] bytewise_xor(logic [127:0] a, logic [127:0] b);
    st_t sa = to_st(a);
    st_t sb = to_st(b);
    st_t o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) o[r][c] = sa[r][c] ^ sb[r][c];
    return from_st(o);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_state  = 128'h3243f6a8885a308d313198a2e0370734;
    round_key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    #1;
    check(out_state, 128'h193de3bea0f4e22b9ac68d2ae9f84808, "FIPS-197 round 0");
    for (int i = 0; i < 200; i++) begin
      in_state  = rand128();
      round_key = rand128();
      #1;
      check(out_state, bytewise_xor(in_state, round_key), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
