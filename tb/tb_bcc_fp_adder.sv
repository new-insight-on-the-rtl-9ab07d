// tb_bcc_fp_adder: checks the BCC-64 floating-point adder against an
// integer model. Operands are random 16-digit coefficients with random
// exponents; the exponent difference is drawn so that equal exponents,
// differences that are multiples of 3 (digit shifts of 1..7 BCC digits),
// and differences that are not occur. Some operands are given opposite
// signs, and some are infinities or NaNs. The reference aligns by integer
// division by 1000^shift, adds, and rebuilds the expected BCC-64 word; it
// also predicts each flag. Coverage counters must all be non-zero.
module tb_bcc_fp_adder;
  import bcc_pkg::*;
  import dec_ref_pkg::*;

  localparam longint unsigned LIM = 64'd10_000_000_000_000_000;

  logic [63:0] a, b, res;
  logic        inexact, overflow, invalid, unsupported;
  logic [2:0]  shift;
  logic [5:0]  spec;
  int checks = 0, failures = 0;
  int n_aligned = 0, n_inexact = 0, n_overflow = 0, n_invalid = 0;
  int n_unsup = 0, n_special = 0, n_equal = 0;

  bcc_fp_adder #(.K(64)) dut (
    .a(a), .b(b), .res(res), .inexact(inexact), .overflow(overflow),
    .invalid(invalid), .unsupported(unsupported), .shift(shift), .spec(spec)
  );

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] special_word(bit sign, int kind);
    // kind 1: infinity, 2: quiet NaN, 3: signalling NaN
    logic [12:0] cf;
    cf = (kind == 1) ? 13'h1E00 : (kind == 2) ? 13'h1F00 : 13'h1F80;
    return {sign, cf, 50'($urandom) & 50'h3FF};
  endfunction

  function automatic logic [63:0] nan_word(bit sign);
    return {sign, 13'h1F00, 50'd0};
  endfunction

  initial begin
    for (int it = 0; it < 20000; it++) begin
      dec64_t da, db;
      int ka, kb;              // 0 finite, 1 inf, 2 qNaN, 3 sNaN
      logic [63:0] exp_res;
      bit e_inexact, e_overflow, e_invalid, e_unsup;
      int unsigned d;
      da = rand_dec64($urandom_range(16, 1));
      db = rand_dec64($urandom_range(16, 1));
      case ($urandom_range(9))
        0, 1, 2: db.exp = da.exp;
        3, 4, 5, 6: begin
          d = 3 * $urandom_range(7, 1);
          if (da.exp >= d) db.exp = da.exp - d; else db.exp = da.exp + d;
        end
        default: ;
      endcase
      if ($urandom_range(9) == 0) begin
        da.coef = LIM - 1 - longint'($urandom_range(1000));
        db.exp  = da.exp;
      end
      db.sign = ($urandom_range(19) == 0);
      da.sign = db.sign ^ ($urandom_range(29) == 0);
      ka = ($urandom_range(29) == 0) ? $urandom_range(3, 1) : 0;
      kb = ($urandom_range(29) == 0) ? $urandom_range(3, 1) : 0;
      if (it % 500 == 7) begin   // directed: inf + (-inf) or inf + inf
        ka = 1; kb = 1; da.sign = 1'($urandom_range(1)); db.sign = ~da.sign ^ (it % 1000 == 7);
      end
      a = ka != 0 ? special_word(da.sign, ka) : make_word64(da, 1'b1);
      b = kb != 0 ? special_word(db.sign, kb) : make_word64(db, 1'b1);

      // reference
      e_inexact = 0; e_overflow = 0; e_invalid = 0; e_unsup = 0;
      if (ka >= 2)                                exp_res = nan_word(da.sign);
      else if (kb >= 2)                           exp_res = nan_word(db.sign);
      else if (ka == 1 && kb == 1 && da.sign != db.sign) begin
        exp_res = nan_word(da.sign); e_invalid = 1;
      end
      else if (ka == 1)                           exp_res = {da.sign, 13'h1E00, 50'd0};
      else if (kb == 1)                           exp_res = {db.sign, 13'h1E00, 50'd0};
      else begin
        dec64_t hi_op, lo_op, r;
        int unsigned sh;
        longint unsigned p, aligned, s;
        hi_op   = (da.exp >= db.exp) ? da : db;
        lo_op = (da.exp >= db.exp) ? db : da;
        d     = hi_op.exp - lo_op.exp;
        if (da.sign != db.sign || d % 3 != 0) begin
          exp_res = nan_word(da.sign); e_unsup = 1;
        end else begin
          sh = d / 3;
          p = 1;
          for (int i = 0; i < int'(sh) && i < 7; i++) p = (i < 6) ? p * 1000 : p;
          aligned = (sh >= 6) ? 0 : lo_op.coef / p;
          e_inexact = (sh >= 6) ? (lo_op.coef != 0) : (lo_op.coef % p != 0);
          s = hi_op.coef + aligned;
          e_overflow = s >= LIM;
          r.sign = hi_op.sign; r.exp = hi_op.exp; r.coef = s % LIM;
          exp_res = make_word64(r, 1'b1);
          if (sh > 0) n_aligned++; else n_equal++;
        end
      end
      if (ka != 0 || kb != 0) n_special++;

      #1;
      checks++;
      if (res !== exp_res || inexact !== e_inexact || overflow !== e_overflow ||
          invalid !== e_invalid || unsupported !== e_unsup) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%h b=%h res=%h exp=%h flags=%b%b%b%b exp_flags=%b%b%b%b",
                   a, b, res, exp_res, inexact, overflow, invalid, unsupported,
                   e_inexact, e_overflow, e_invalid, e_unsup);
      end
      if (ka == 0 && kb == 0 && !e_unsup) begin
        int unsigned want_sh;
        want_sh = (da.exp >= db.exp ? da.exp - db.exp : db.exp - da.exp) / 3;
        if (want_sh > 6) want_sh = 6;
        checks++;
        if (int'(shift) != int'(want_sh)) begin
          failures++;
          if (failures < 10) $display("FAIL shift got=%0d want=%0d", shift, want_sh);
        end
      end
      n_inexact  += int'(inexact);
      n_overflow += int'(overflow);
      n_invalid  += int'(invalid);
      n_unsup    += int'(unsupported);
    end
    $display("coverage equal=%0d aligned=%0d inexact=%0d overflow=%0d invalid=%0d unsupported=%0d special=%0d",
             n_equal, n_aligned, n_inexact, n_overflow, n_invalid, n_unsup, n_special);
    checks++;
    if (n_equal == 0 || n_aligned == 0 || n_inexact == 0 || n_overflow == 0 ||
        n_invalid == 0 || n_unsup == 0 || n_special == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
