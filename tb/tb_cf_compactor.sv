// tb_cf_compactor: checks the combination-field compactor for Decimal-64
// over every MSD (0..9) and every biased exponent (0..767), plus the three
// special classes. The reference builds the field with integer arithmetic
// (leading 5 bits = 8*Eh + MSD, or 24 + 2*Eh + MSD-8 for MSD 8 and 9).
module tb_cf_compactor;
  import bcc_pkg::*;

  int checks = 0, failures = 0;

  logic [3:0]  msd;
  logic [9:0]  exp;
  num_class_e  nc;
  logic [12:0] cf;

  cf_compactor #(.K(64)) dut (.msd(msd), .exp(exp), .nc(nc), .cf(cf));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int unsigned expect_cf);
    checks++;
    if (cf != 13'(expect_cf)) begin
      failures++;
      if (failures < 10) $display("FAIL msd=%0d exp=%0d nc=%s cf=%h exp_cf=%h",
                                  msd, exp, nc.name(), cf, expect_cf);
    end
  endtask

  initial begin
    nc = NC_FINITE;
    for (int m = 0; m < 10; m++)
      for (int e = 0; e < 768; e++) begin
        int unsigned lead;
        msd = 4'(m); exp = 10'(e); nc = NC_FINITE;
        lead = (m < 8) ? (e / 256) * 8 + m : 24 + (e / 256) * 2 + (m - 8);
        #1 check(lead * 256 + e % 256);
      end
    msd = 4'd3; exp = 10'd398;
    nc = NC_INF;  #1 check(30 * 256);
    nc = NC_QNAN; #1 check(31 * 256);
    nc = NC_SNAN; #1 check(31 * 256 + 128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
