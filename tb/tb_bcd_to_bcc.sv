// tb_bcd_to_bcc: exhaustive check of the three-digit BCD to binary
// converter: for every value 0..999 the output must equal the value.
module tb_bcd_to_bcc;
  import bcc_pkg::*;
  import dec_ref_pkg::*;

  bcd3_t      bcd;
  logic [9:0] bcc;
  int checks = 0, failures = 0;

  bcd_to_bcc dut (.bcd(bcd), .bcc(bcc));

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
      if (bcc !== 10'(n)) begin
        failures++;
        if (failures < 10) $display("FAIL val=%0d bcc=%0d", n, bcc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
