// tb_dpd_compressor: exhaustive check of the BCD-to-DPD compressor. All
// 1000 three-digit values are applied; the declet must equal the canonical
// encoding from the small/large case table in dec_ref_pkg.
module tb_dpd_compressor;
  import bcc_pkg::*;
  import dec_ref_pkg::*;

  bcd3_t      bcd;
  logic [9:0] dpd;
  int checks = 0, failures = 0;

  dpd_compressor dut (.bcd(bcd), .dpd(dpd));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      bcd = bcd3_t'(ref_bcd3(n));
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
