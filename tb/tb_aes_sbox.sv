// tb_aes_sbox: exhaustive check of the S-box.
//
// All 256 inputs are compared with the reference model's S-box (inverse
// found by search, affine map in rotate form), and four entries with
// published values (00->63, 01->7c, 53->ed, ff->16) are checked literally.
// Combinational; a watchdog ends the run if it hangs.
module tb_aes_sbox;
  import aes_ref_pkg::*;

  logic [7:0] in_byte, out_byte;
  int checks = 0, failures = 0;

  aes_sbox dut (.in_byte(in_byte), .out_byte(out_byte));

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
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
    ref_init();
    for (int i = 0; i < 256; i++) begin
      in_byte = 8'(i);
      #1;
      check(out_byte, sbox_tab[i], $sformatf("sbox(%02h)", i));
    end
    in_byte = 8'h00; #1; check(out_byte, 8'h63, "sbox(00) literal");
    in_byte = 8'h01; #1; check(out_byte, 8'h7c, "sbox(01) literal");
    in_byte = 8'h53; #1; check(out_byte, 8'hed, "sbox(53) literal");
    in_byte = 8'hff; #1; check(out_byte, 8'h16, "sbox(ff) literal");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
