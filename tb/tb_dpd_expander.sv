// tb_dpd_expander: exhaustive check of the DPD-to-BCD expander. All 1024
// declets are applied; each BCD result must equal the digits of the value
// given by the case-table decoder in dec_ref_pkg.
module tb_dpd_expander;
  import bcc_pkg::*;
  import dec_ref_pkg::*;

  logic [9:0] dpd;
  bcd3_t      bcd;
  int checks = 0, failures = 0;

  dpd_expander dut (.dpd(dpd), .bcd(bcd));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1024; n++) begin
      dpd = 10'(n);
      #1;
      checks++;
      if (bcd !== ref_bcd3(ref_dpd_decode(dpd))) begin
        failures++;
        if (failures < 10) $display("FAIL dpd=%03h bcd=%03h exp=%03h", dpd, bcd,
                                    ref_bcd3(ref_dpd_decode(dpd)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
