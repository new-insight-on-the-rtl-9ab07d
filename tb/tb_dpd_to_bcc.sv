// tb_dpd_to_bcc: exhaustive check of the DPD-to-BCC converter. Every one
// of the 1024 declets, redundant codes included, must convert to the value
// given by the case-table decoder.
module tb_dpd_to_bcc;
  import dec_ref_pkg::*;

  logic [9:0] dpd, bcc;
  int checks = 0, failures = 0;

  dpd_to_bcc dut (.dpd(dpd), .bcc(bcc));

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
      if (bcc !== 10'(ref_dpd_decode(dpd))) begin
        failures++;
        if (failures < 10) $display("FAIL dpd=%03h bcc=%0d exp=%0d", dpd, bcc, ref_dpd_decode(dpd));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
