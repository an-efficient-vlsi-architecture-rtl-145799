// tb_aes_sub_bytes: SubBytes on whole states.
//
// The FIPS-197 Appendix B round-1 state (19 3d e3 be ...) is checked against
// its published SubBytes result, then 500 random states are compared with
// the reference model. Combinational; watchdog included.
module tb_aes_sub_bytes;
  import aes_ref_pkg::*;

  logic [127:0] in_state, out_state;
  int checks = 0, failures = 0;

  aes_sub_bytes dut (.in_state(in_state), .out_state(out_state));

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
    in_state = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    #1;
    check(out_state, 128'hd42711aee0bf98f1b8b45de51e415230, "FIPS-197 round 1");
    for (int i = 0; i < 500; i++) begin
      in_state = rand128();
      #1;
      check(out_state, ref_sub_bytes(in_state), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
