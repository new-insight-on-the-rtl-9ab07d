// tb_dpd_to_bcc_word: checks the input-port DPD-to-BCC word converter for
// Decimal-32, -64 and -128 (2, 5 and 11 declets). Random words are applied;
// sign and combination field must pass unchanged and every declet must
// match the case-table reference in dec_ref_pkg. For Decimal-64, complete
// words built from random coefficients are also checked against the word
// builder of the reference package.
module tb_dpd_to_bcc_word;
  import dec_ref_pkg::*;

  logic [31:0]  i32, o32;
  logic [63:0]  i64, o64;
  logic [127:0] i128, o128;
  int checks = 0, failures = 0;

  dpd_to_bcc_word #(.K(32))  dut32  (.dpd_word(i32),  .bcc_word(o32));
  dpd_to_bcc_word #(.K(64))  dut64  (.dpd_word(i64),  .bcc_word(o64));
  dpd_to_bcc_word #(.K(128)) dut128 (.dpd_word(i128), .bcc_word(o128));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [9:0] conv(logic [9:0] x);
    return 10'(ref_dpd_decode(x));
  endfunction

  function automatic logic [9:0] rnd_declet();
    return 10'($urandom);
  endfunction

  task automatic check_word(int unsigned k, logic [127:0] x, logic [127:0] y);
    int unsigned j;
    logic [127:0] e;
    j = (15 * k / 16 - 10) / 10;
    e = x;
    for (int n = 0; n < int'(j); n++) e[10*n +: 10] = conv(x[10*n +: 10]);
    checks++;
    if (e != y) begin
      failures++;
      if (failures < 10) $display("FAIL k=%0d in=%h out=%h exp=%h", k, x, y, e);
    end
  endtask

  initial begin
    for (int it = 0; it < 3000; it++) begin
      i32 = $urandom; i64 = {$urandom, $urandom};
      i128 = {$urandom, $urandom, $urandom, $urandom};
      for (int n = 0; n < 2; n++)  i32[10*n +: 10]  = rnd_declet();
      for (int n = 0; n < 5; n++)  i64[10*n +: 10]  = rnd_declet();
      for (int n = 0; n < 11; n++) i128[10*n +: 10] = rnd_declet();
      #1;
      check_word(32, 128'(i32), 128'(o32));
      check_word(64, 128'(i64), 128'(o64));
      check_word(128, i128, o128);
    end
    for (int it = 0; it < 2000; it++) begin
      dec64_t d;
      d = rand_dec64(16);
      d.sign = 1'($urandom);
      i64 = make_word64(d, 1'b0);
      #1;
      checks++;
      if (o64 !== make_word64(d, 1'b1)) begin
        failures++;
        if (failures < 10) $display("FAIL word in=%h out=%h", i64, o64);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
