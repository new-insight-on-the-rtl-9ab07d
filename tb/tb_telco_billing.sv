// tb_telco_billing: a telephone-billing workload in the style of the TELCO
// benchmark, run on the decimal unit at its default size. For every call:
//   P = secs * Drate;  B = P * Btax;  D = P * Dtax;
//   C = P + B + D;     T = T + C
// Call durations and the three rates enter as Decimal-64 (DPD) words and
// are converted to BCC-64 once, at the input port. The three additions per
// call run on the unit's BCC adder; the two products per call and the rate
// product come from a behavioural multiplier in this testbench (the unit
// has no multiplier) that works directly on BCC words and rounds to
// micro-units (exponent -6, round half to even). Each call's charge C and
// the final total T leave through the output port as DPD words.
// All values are kept at exponent -6, so the additions need no alignment.
// Checks: every C and every T against an integer model; the number of
// format conversions must be 2n + 4 for n calls (n + 3 in, n + 1 out),
// where a unit that expands DPD for every operation would need 18n + 3.
// Runs n = 1000, 2000, ..., 10000 calls.
module tb_telco_billing;
  import bcc_pkg::*;
  import dec_ref_pkg::*;

  localparam int unsigned EXP_M6 = 398 - 6;   // biased exponent of 10^-6
  localparam int unsigned EXP_0  = 398;

  logic [63:0] in_dpd, in_bcc, add_a, add_b, add_res, out_bcc, out_dpd;
  logic        add_inexact, add_overflow, add_invalid, add_unsupported;
  logic [2:0]  add_shift;
  logic [5:0]  add_spec;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint conv_in = 0, conv_out = 0;

  bcc_dfp_unit dut (
    .in_dpd(in_dpd), .in_bcc(in_bcc),
    .add_a(add_a), .add_b(add_b), .add_res(add_res),
    .add_inexact(add_inexact), .add_overflow(add_overflow),
    .add_invalid(add_invalid), .add_unsupported(add_unsupported),
    .add_shift(add_shift), .add_spec(add_spec),
    .out_bcc(out_bcc), .out_dpd(out_dpd)
  );

  initial begin : watchdog
    repeat (5000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic dec64_t dec(longint unsigned coef, int unsigned exp);
    dec64_t d;
    d.sign = 1'b0; d.exp = exp; d.coef = coef;
    return d;
  endfunction

  // Integer divide by 10^6, rounding half to even.
  function automatic longint unsigned round_micro(longint unsigned v);
    longint unsigned q, r;
    q = v / 1000000; r = v % 1000000;
    if (r > 500000 || (r == 500000 && q[0])) q++;
    return q;
  endfunction

  // Behavioural multiplier on BCC-64 words; result at exponent -6.
  function automatic logic [63:0] bcc_mul(logic [63:0] x, int unsigned ex,
                                          logic [63:0] y, int unsigned ey);
    longint unsigned p;
    int e;
    p = bcc64_coef(x) * bcc64_coef(y);
    e = int'(ex) + int'(ey) - 398;          // biased exponent of the product
    while (e < int'(EXP_M6)) begin p = round_micro(p); e += 6; end
    return make_word64(dec(p, EXP_M6), 1'b1);
  endfunction

  task automatic port_in(dec64_t d, output logic [63:0] bcc);
    @(negedge clk);
    in_dpd = make_word64(d, 1'b0);
    @(posedge clk);
    bcc = in_bcc;
    conv_in++;
  endtask

  task automatic bcc_add(logic [63:0] x, logic [63:0] y, output logic [63:0] s);
    @(negedge clk);
    add_a = x; add_b = y;
    @(posedge clk);
    s = add_res;
    checks++;
    if (add_inexact || add_overflow || add_invalid || add_unsupported) begin
      failures++;
      $display("FAIL unexpected adder flag");
    end
  endtask

  task automatic port_out(logic [63:0] bcc, longint unsigned want, string what);
    @(negedge clk);
    out_bcc = bcc;
    @(posedge clk);
    conv_out++;
    checks++;
    if (out_dpd !== make_word64(dec(want, EXP_M6), 1'b0)) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%h want coef %0d", what, out_dpd, want);
    end
  endtask

  initial begin
    in_dpd = '0; add_a = '0; add_b = '0; out_bcc = '0;
    for (int n = 1000; n <= 10000; n += 1000) begin
      logic [63:0] drate, btax, dtax, tot;
      longint unsigned t_ref;
      conv_in = 0; conv_out = 0;
      // rates: 0.00894 per second, 6.75 % and 3.41 % taxes (in micro-units)
      port_in(dec(8940, EXP_M6), drate);
      port_in(dec(67500, EXP_M6), btax);
      port_in(dec(34100, EXP_M6), dtax);
      tot = make_word64(dec(0, EXP_M6), 1'b1);   // T = 0 (a register reset)
      t_ref = 0;
      for (int i = 0; i < n; i++) begin
        logic [63:0] secs, p, b, d, pb, c;
        longint unsigned s, pr, br, dr, cr;
        s = longint'($urandom_range(3600, 1));
        port_in(dec(s, EXP_0), secs);
        p = bcc_mul(secs, EXP_0, drate, EXP_M6);
        b = bcc_mul(p, EXP_M6, btax, EXP_M6);
        d = bcc_mul(p, EXP_M6, dtax, EXP_M6);
        bcc_add(p, b, pb);
        bcc_add(pb, d, c);
        bcc_add(tot, c, tot);
        // integer model
        pr = s * 8940;
        br = round_micro(pr * 67500);
        dr = round_micro(pr * 34100);
        cr = pr + br + dr;
        t_ref += cr;
        port_out(c, cr, "C[i]");
      end
      port_out(tot, t_ref, "T");
      checks++;
      if (conv_in + conv_out != 2 * n + 4) begin
        failures++;
        $display("FAIL conversions %0d, expected %0d", conv_in + conv_out, 2 * n + 4);
      end
      $display("n=%0d total=%0d micro-units conversions: BCC unit %0d, per-operation DPD %0d",
               n, t_ref, conv_in + conv_out, 18 * n + 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
