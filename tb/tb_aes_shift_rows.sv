// tb_aes_shift_rows: ShiftRows.
//
// A state whose byte n holds the value n makes every moved byte visible:
// the result must be 00 05 0a 0f 04 09 0e 03 08 0d 02 07 0c 01 06 0b
// (row r rotated left by r). Then the FIPS-197 round-1 example and 200
// random states against the reference model. Combinational; watchdog.
module tb_aes_shift_rows;
  import aes_ref_pkg::*;

  logic [127:0] in_state, out_state;
  int checks = 0, failures = 0;

  aes_shift_rows dut (.in_state(in_state), .out_state(out_state));

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
    in_state = 128'h000102030405060708090a0b0c0d0e0f;
    #1;
    check(out_state, 128'h00050a0f04090e03080d02070c01060b, "index pattern");
    in_state = 128'hd42711aee0bf98f1b8b45de51e415230;
    #1;
    check(out_state, 128'hd4bf5d30e0b452aeb84111f11e2798e5, "FIPS-197 round 1");
    for (int i = 0; i < 200; i++) begin
      in_state = rand128();
      #1;
      check(out_state, ref_shift_rows(in_state), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
