// tb_bcc_dfp_unit: end-to-end test of the decimal unit at its default size
// (Decimal-64 / BCC-64). Each operation follows the path of the design:
//   1. two Decimal-64 words with DPD trailing fields enter through the
//      input port one after the other and are converted to BCC-64;
//   2. the BCC adder adds the two BCC-64 words;
//   3. the result leaves through the output port and is converted back to
//      a Decimal-64 word.
// The Decimal-64 result is compared with the word an integer model
// predicts, the BCC intermediate words with the reference builder, and
// every flag with the model. Events counted (each must occur): every one
// of the eight DPD small/large cases at the input port, speculation that
// produced a carry, speculation that had to be removed, decimal carries
// between BCC digits, alignment shifts, truncated (inexact) alignment,
// overflow, opposite signs and non-multiple-of-3 shifts (unsupported),
// infinities, NaNs, inf - inf (invalid) and MSDs of 8 or 9.
module tb_bcc_dfp_unit;
  import bcc_pkg::*;
  import dec_ref_pkg::*;

  logic [63:0] in_dpd, in_bcc, add_a, add_b, add_res, out_bcc, out_dpd;
  logic        add_inexact, add_overflow, add_invalid, add_unsupported;
  logic [2:0]  add_shift;
  logic [5:0]  add_spec;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int dpd_case [8];
  int n_spec_carry = 0, n_spec_fix = 0, n_dcarry = 0, n_shift = 0, n_inexact = 0;
  int n_overflow = 0, n_unsup = 0, n_inf = 0, n_nan = 0, n_invalid = 0, n_msd89 = 0;

  bcc_dfp_unit dut (
    .in_dpd(in_dpd), .in_bcc(in_bcc),
    .add_a(add_a), .add_b(add_b), .add_res(add_res),
    .add_inexact(add_inexact), .add_overflow(add_overflow),
    .add_invalid(add_invalid), .add_unsupported(add_unsupported),
    .add_shift(add_shift), .add_spec(add_spec),
    .out_bcc(out_bcc), .out_dpd(out_dpd)
  );

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, logic [63:0] got, logic [63:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%h want=%h", what, got, want);
    end
  endtask

  function automatic logic [63:0] special64(bit sign, int kind);
    logic [12:0] cf;
    cf = (kind == 1) ? 13'h1E00 : (kind == 2) ? 13'h1F00 : 13'h1F80;
    return {sign, cf, 50'd0};
  endfunction

  // Count the DPD small/large case of each declet entering the unit.
  task automatic count_cases(logic [63:0] w);
    for (int n = 0; n < 5; n++) begin
      int unsigned v;
      v = ref_dpd_decode(w[10*n +: 10]);
      dpd_case[{v / 100 > 7, (v / 10) % 10 > 7, v % 10 > 7}]++;
    end
  endtask

  // Pass one Decimal-64 word through the input port.
  task automatic convert_in(logic [63:0] w, output logic [63:0] bcc);
    @(negedge clk);
    in_dpd = w;
    @(posedge clk);
    bcc = in_bcc;
    count_cases(w);
  endtask

  initial begin
    in_dpd = '0; add_a = '0; add_b = '0; out_bcc = '0;
    foreach (dpd_case[i]) dpd_case[i] = 0;
    for (int it = 0; it < 6000; it++) begin
      dec64_t da, db, rd;
      int ka, kb;
      logic [63:0] wa, wb, ba, bb;
      add_ref_t r;
      da = rand_dec64($urandom_range(16, 1));
      db = rand_dec64($urandom_range(16, 1));
      case ($urandom_range(9))
        0, 1, 2, 3: db.exp = da.exp;
        4, 5, 6: begin
          int unsigned d;
          d = 3 * $urandom_range(6, 1);
          db.exp = (da.exp >= d) ? da.exp - d : da.exp + d;
        end
        default: ;
      endcase
      if (it % 50 == 3) begin   // long carry chain through all digits
        da.coef = 64'd9_999_999_999_999_999 - longint'($urandom_range(20));
        db.coef = longint'($urandom_range(40));
        db.exp  = da.exp;
      end
      db.sign = ($urandom_range(9) == 0);
      da.sign = db.sign ^ ($urandom_range(24) == 0);
      ka = ($urandom_range(39) == 0) ? $urandom_range(3, 1) : 0;
      kb = ($urandom_range(39) == 0) ? $urandom_range(3, 1) : 0;
      if (it % 700 == 11) begin ka = 1; kb = 1; db.sign = ~da.sign; end
      wa = (ka != 0) ? special64(da.sign, ka) : make_word64(da, 1'b0);
      wb = (kb != 0) ? special64(db.sign, kb) : make_word64(db, 1'b0);

      // 1. input port
      convert_in(wa, ba);
      convert_in(wb, bb);
      expect_eq("in_bcc a", ba, (ka != 0) ? special64(da.sign, ka) : make_word64(da, 1'b1));
      expect_eq("in_bcc b", bb, (kb != 0) ? special64(db.sign, kb) : make_word64(db, 1'b1));

      // 2. BCC addition
      r = ref_add64(da, ka, db, kb);
      @(negedge clk);
      add_a = ba; add_b = bb;
      @(posedge clk);
      expect_eq("add_res", add_res, r.word);
      if (add_res !== r.word && failures < 10) $display("  ops %h %h", ba, bb);
      checks++;
      if ({add_inexact, add_overflow, add_invalid, add_unsupported} !==
          {r.inexact, r.overflow, r.invalid, r.unsup}) begin
        failures++;
        if (failures < 10) $display("FAIL flags got=%b want=%b", {add_inexact, add_overflow,
          add_invalid, add_unsupported}, {r.inexact, r.overflow, r.invalid, r.unsup});
      end
      if (ka == 0 && kb == 0 && !r.unsup) begin
        checks++;
        if (int'(add_shift) != ((r.shift > 6) ? 6 : int'(r.shift))) begin
          failures++;
          $display("FAIL shift got=%0d want=%0d", add_shift, r.shift);
        end
        checks++;   // BCC digits that speculated, as the model predicts
        if ($countones(add_spec[4:0]) != r.spec_carry + r.spec_fix) begin
          failures++;
          $display("FAIL spec got=%b want %0d digits", add_spec, r.spec_carry + r.spec_fix);
        end
      end

      // 3. output port
      @(negedge clk);
      out_bcc = add_res;
      @(posedge clk);
      if (r.word[62:58] == 5'b11110 || r.word[62:58] == 5'b11111)
        expect_eq("out_dpd", out_dpd, r.word);
      else begin
        rd.sign = r.word[63];
        rd.exp  = (r.word[62:61] == 2'b11) ? {r.word[60:59], r.word[57:50]} : {r.word[62:61], r.word[57:50]};
        rd.coef = bcc64_coef(r.word);
        expect_eq("out_dpd", out_dpd, make_word64(rd, 1'b0));
        if (r.word[62:61] == 2'b11) n_msd89++;
      end

      n_spec_carry += r.spec_carry;  n_spec_fix += r.spec_fix;
      n_dcarry     += r.digit_carries;
      n_shift      += int'(ka == 0 && kb == 0 && !r.unsup && r.shift > 0);
      n_inexact    += int'(add_inexact);  n_overflow += int'(add_overflow);
      n_unsup      += int'(add_unsupported); n_invalid += int'(add_invalid);
      n_inf        += int'(ka == 1 || kb == 1);
      n_nan        += int'(ka >= 2 || kb >= 2);
    end

    $display("dpd cases (B,C,D large?) 000..111: %0d %0d %0d %0d %0d %0d %0d %0d",
             dpd_case[0], dpd_case[1], dpd_case[2], dpd_case[3],
             dpd_case[4], dpd_case[5], dpd_case[6], dpd_case[7]);
    $display("spec_carry=%0d spec_fix=%0d digit_carries=%0d shifts=%0d inexact=%0d overflow=%0d",
             n_spec_carry, n_spec_fix, n_dcarry, n_shift, n_inexact, n_overflow);
    $display("unsupported=%0d inf=%0d nan=%0d invalid=%0d msd_8_or_9=%0d",
             n_unsup, n_inf, n_nan, n_invalid, n_msd89);
    foreach (dpd_case[i]) begin
      checks++;
      if (dpd_case[i] == 0) begin failures++; $display("FAIL never saw DPD case %0d", i); end
    end
    checks++;
    if (n_spec_carry == 0 || n_spec_fix == 0 || n_dcarry == 0 || n_shift == 0 ||
        n_inexact == 0 || n_overflow == 0 || n_unsup == 0 || n_inf == 0 ||
        n_nan == 0 || n_invalid == 0 || n_msd89 == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
