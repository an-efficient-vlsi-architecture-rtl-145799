// tb_aes_mix_columns: MixColumns.
//
// Checks the FIPS-197 round-1 example (d4 bf 5d 30 -> 04 66 81 e5 ...), the
// well-known column db 13 53 45 -> 8e 4d a1 bc, and 300 random states
// against the reference model's matrix product. Combinational; watchdog.
module tb_aes_mix_columns;
  import aes_ref_pkg::*;

  logic [127:0] in_state, out_state;
  int checks = 0, failures = 0;

  aes_mix_columns dut (.in_state(in_state), .out_state(out_state));

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
    in_state = 128'hd4bf5d30e0b452aeb84111f11e2798e5;
    #1;
    check(out_state, 128'h046681e5e0cb199a48f8d37a2806264c, "FIPS-197 round 1");
    in_state = 128'hdb135345f20a225c01010101c6c6c6c6;
    #1;
    check(out_state, 128'h8e4da1bc9fdc589d01010101c6c6c6c6, "test columns");
    for (int i = 0; i < 300; i++) begin
      in_state = rand128();
      #1;
      check(out_state, ref_mix_columns(in_state), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
