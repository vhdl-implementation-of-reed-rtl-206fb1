// tb_gf_mult: exhaustive test of the GF(2^8) multiplier against
// log/antilog-table products (all 65536 operand pairs).
module tb_gf_mult;
  import rs_ref_pkg::*;
  sym_t a, b, p;
  int checks = 0, failures = 0;
  gf_mult dut (.a(a), .b(b), .p(p));
  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = sym_t'(i); b = sym_t'(j); #1;
        checks++;
        if (p !== rmul(a, b)) begin
          failures++;
          if (failures < 10) $display("FAIL %02x*%02x = %02x, expected %02x", a, b, p, rmul(a, b));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
