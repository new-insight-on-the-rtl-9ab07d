// tb_bcc_to_dpd: exhaustive check of the BCC-to-DPD converter: every BCC
// digit 0..999 must give the canonical declet of the case-table encoder.
module tb_bcc_to_dpd;
  import dec_ref_pkg::*;

  logic [9:0] bcc, dpd;
  int checks = 0, failures = 0;

  bcc_to_dpd dut (.bcc(bcc), .dpd(dpd));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      bcc = 10'(n);
      #1;
      checks++;
      if (dpd !== ref_dpd_encode(n)) begin
        failures++;
        if (failures < 10) $display("FAIL val=%0d dpd=%03h exp=%03h", n, dpd, ref_dpd_encode(n));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
