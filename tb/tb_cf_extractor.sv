// tb_cf_extractor: exhaustive check of the combination-field extractor for
// Decimal-64 (all 8192 field values) and Decimal-32 (all 2048). The
// reference reads the field as integers: the 5 leading bits are split into
// MSD and the exponent's two leading bits by value ranges (< 24: small
// MSD; 24..29: MSD 8/9; 30: infinity; 31: NaN).
module tb_cf_extractor;
  import bcc_pkg::*;

  int checks = 0, failures = 0;

  logic [12:0] cf64;  logic [3:0] msd64;  logic [9:0] exp64;  num_class_e nc64;
  logic [10:0] cf32;  logic [3:0] msd32;  logic [7:0] exp32;  num_class_e nc32;

  cf_extractor #(.K(64)) dut64 (.cf(cf64), .msd(msd64), .exp(exp64), .nc(nc64));
  cf_extractor #(.K(32)) dut32 (.cf(cf32), .msd(msd32), .exp(exp32), .nc(nc32));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int unsigned cf, int unsigned w, int unsigned msd,
                       int unsigned ex, num_class_e nc);
    int unsigned lead, rest, emsd, eexp;
    num_class_e enc;
    lead = cf >> w;
    rest = cf % (1 << w);
    enc  = NC_FINITE;
    if (lead < 24) begin
      emsd = lead % 8;  eexp = (lead / 8) * (1 << w) + rest;
    end else if (lead < 30) begin
      emsd = 8 + lead % 2;  eexp = ((lead - 24) / 2) * (1 << w) + rest;
    end else begin
      emsd = msd; eexp = ex;   // don't care for specials
      enc  = (lead == 30) ? NC_INF : ((rest >> (w - 1)) ? NC_SNAN : NC_QNAN);
    end
    checks++;
    if (msd != emsd || ex != eexp || nc != enc) begin
      failures++;
      if (failures < 10) $display("FAIL w=%0d cf=%h msd=%0d exp=%0d nc=%s", w, cf, msd, ex, nc.name());
    end
  endtask

  initial begin
    for (int n = 0; n < 8192; n++) begin
      cf64 = 13'(n);
      #1 check(n, 8, msd64, exp64, nc64);
    end
    for (int n = 0; n < 2048; n++) begin
      cf32 = 11'(n);
      #1 check(n, 6, msd32, exp32, nc32);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
