// Testbench of the AES S-box: both implementations (look-up table and
// composite-field arithmetic) are compared on all 256 inputs with the
// reference model and with values printed in the AES standard.
`timescale 1ns/1ps
module tb_aes_sbox;
  import aes_gcm_pkg::*;
  import tb_gcm_ref_pkg::*;

  logic [7:0] in, out_lut, out_cfa;
  int checks = 0, failures = 0;

  aes_sbox #(.IMPL(SBOX_LUT)) u_lut (.in(in), .out(out_lut));
  aes_sbox #(.IMPL(SBOX_CFA)) u_cfa (.in(in), .out(out_cfa));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      in = 8'(i);
      #1;
      check(out_lut == ref_sbox(8'(i)), $sformatf("LUT S(%02h)=%02h", i, out_lut));
      check(out_cfa == ref_sbox(8'(i)), $sformatf("CFA S(%02h)=%02h", i, out_cfa));
    end
    // values from the standard's table
    in = 8'h00; #1; check(out_lut == 8'h63 && out_cfa == 8'h63, "S(00)");
    in = 8'h53; #1; check(out_lut == 8'hed && out_cfa == 8'hed, "S(53)");
    in = 8'hff; #1; check(out_lut == 8'h16 && out_cfa == 8'h16, "S(ff)");
    in = 8'h10; #1; check(out_lut == 8'hca && out_cfa == 8'hca, "S(10)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
