// tb_bcc_to_bcd: exhaustive check of the binary to three-digit BCD
// converter over the BCC range 0..999.
module tb_bcc_to_bcd;
  import bcc_pkg::*;
  import dec_ref_pkg::*;

  logic [9:0] bcc;
  bcd3_t      bcd;
  int checks = 0, failures = 0;

  bcc_to_bcd dut (.bcc(bcc), .bcd(bcd));

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
      if (bcd !== ref_bcd3(n)) begin
        failures++;
        if (failures < 10) $display("FAIL val=%0d bcd=%03h", n, bcd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
