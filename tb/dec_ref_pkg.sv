// dec_ref_pkg: reference models for the testbenches, written from the
// DPD coding tables and the interchange-format rules rather than from the
// gate equations used in the RTL.
//   ref_dpd_encode : 0..999 -> canonical DPD declet, by the eight-case
//                    small/large table (digits 8 and 9 are "large")
//   ref_dpd_decode : DPD declet -> 0..999, by the vwxst case table
//   ref_cf_*       : combination-field coding with integer arithmetic
//   word helpers   : build and split Decimal-64 / BCC-64 words whose
//                    coefficient is kept as a 64-bit integer
package dec_ref_pkg;

  function automatic logic [9:0] ref_dpd_encode(int unsigned val);
    logic [3:0] B, C, D;
    logic [2:0] pqr, stu;
    logic       v;
    logic [2:0] wxy;
    B = 4'(val / 100); C = 4'((val / 10) % 10); D = 4'(val % 10);
    case ({B > 7, C > 7, D > 7})
      3'b000: begin pqr = B[2:0]; stu = C[2:0]; v = 0; wxy = D[2:0]; end
      3'b001: begin pqr = B[2:0]; stu = C[2:0]; v = 1; wxy = {2'b00, D[0]}; end
      3'b010: begin pqr = B[2:0]; stu = {D[2:1], C[0]}; v = 1; wxy = {2'b01, D[0]}; end
      3'b100: begin pqr = {D[2:1], B[0]}; stu = C[2:0]; v = 1; wxy = {2'b10, D[0]}; end
      3'b110: begin pqr = {D[2:1], B[0]}; stu = {2'b00, C[0]}; v = 1; wxy = {2'b11, D[0]}; end
      3'b101: begin pqr = {C[2:1], B[0]}; stu = {2'b01, C[0]}; v = 1; wxy = {2'b11, D[0]}; end
      3'b011: begin pqr = B[2:0]; stu = {2'b10, C[0]}; v = 1; wxy = {2'b11, D[0]}; end
      default: begin pqr = {2'b00, B[0]}; stu = {2'b11, C[0]}; v = 1; wxy = {2'b11, D[0]}; end
    endcase
    return {pqr, stu, v, wxy};
  endfunction

  function automatic int unsigned ref_dpd_decode(logic [9:0] dpd);
    logic p, q, r, s, t, u, v, w, x, y;
    int unsigned B, C, D;
    {p, q, r, s, t, u, v, w, x, y} = dpd;
    if (!v) begin
      B = 32'({p, q, r}); C = 32'({s, t, u}); D = 32'({w, x, y});
    end else begin
      case ({w, x})
        2'b00: begin B = 32'({p, q, r}); C = 32'({s, t, u}); D = 8 + y; end
        2'b01: begin B = 32'({p, q, r}); C = 8 + u; D = 32'({s, t, y}); end
        2'b10: begin B = 8 + r; C = 32'({s, t, u}); D = 32'({p, q, y}); end
        default: case ({s, t})
          2'b00: begin B = 8 + r; C = 8 + u; D = 32'({p, q, y}); end
          2'b01: begin B = 8 + r; C = 32'({p, q, u}); D = 8 + y; end
          2'b10: begin B = 32'({p, q, r}); C = 8 + u; D = 8 + y; end
          default: begin B = 8 + r; C = 8 + u; D = 8 + y; end
        endcase
      endcase
    end
    return 100 * B + 10 * C + D;
  endfunction

  function automatic logic [11:0] ref_bcd3(int unsigned val);
    return {4'(val / 100), 4'((val / 10) % 10), 4'(val % 10)};
  endfunction

  // ---- Decimal-64 / BCC-64 words (w = 8, 5 declets, 16 digits) ----
  localparam longint unsigned POW3 [6] = '{64'd1, 64'd1000, 64'd1000000,
                                           64'd1000000000, 64'd1000000000000,
                                           64'd1000000000000000};

  typedef struct {
    bit              sign;
    int unsigned     exp;    // biased, 0..767
    longint unsigned coef;   // 0 .. 10^16-1
  } dec64_t;

  function automatic logic [12:0] ref_cf64(int unsigned msd, int unsigned exp);
    logic [9:0] e;
    e = 10'(exp);
    if (msd >= 8) return {2'b11, e[9:8], 1'(msd - 8), e[7:0]};
    return {e[9:8], 3'(msd), e[7:0]};
  endfunction

  // Build a word; bcc = 1 gives BCC declets, bcc = 0 DPD declets.
  function automatic logic [63:0] make_word64(dec64_t d, bit bcc);
    logic [63:0] wd;
    longint unsigned c;
    c = d.coef;
    wd[63] = d.sign;
    for (int n = 0; n < 5; n++) begin
      int unsigned g;
      g = int'(c % 1000);
      c = c / 1000;
      wd[10*n +: 10] = bcc ? 10'(g) : ref_dpd_encode(g);
    end
    wd[62:50] = ref_cf64(int'(c), d.exp);
    return wd;
  endfunction

  // Random finite operand; ndig limits the coefficient's digit count.
  function automatic dec64_t rand_dec64(int unsigned ndig);
    dec64_t d;
    longint unsigned c;
    c = 0;
    for (int n = 0; n < int'(ndig); n++) c = c * 10 + longint'($urandom_range(9));
    d.sign = 1'b0;
    d.exp  = $urandom_range(767);
    d.coef = c;
    return d;
  endfunction

  // Coefficient of a finite BCC-64 word as an integer.
  function automatic longint unsigned bcc64_coef(logic [63:0] wd);
    longint unsigned c;
    logic [12:0] cf;
    cf = wd[62:50];
    c  = (cf[12:11] == 2'b11) ? 64'(8 + cf[8]) : 64'(cf[10:8]);
    for (int n = 4; n >= 0; n--) c = c * 1000 + 64'(wd[10*n +: 10]);
    return c;
  endfunction

  // Expected result of the BCC-64 adder. kind: 0 finite, 1 infinity,
  // 2 quiet NaN, 3 signalling NaN. Returns the expected BCC-64 word and
  // flags; also the per-digit speculation events of a finite addition.
  typedef struct {
    logic [63:0] word;
    bit inexact, overflow, invalid, unsup;
    int unsigned shift;
    int spec_fix, spec_carry, digit_carries;
  } add_ref_t;

  function automatic add_ref_t ref_add64(dec64_t da, int ka, dec64_t db, int kb);
    add_ref_t r;
    localparam longint unsigned LIM = 64'd10_000_000_000_000_000;
    r = '{word: '0, inexact: 0, overflow: 0, invalid: 0, unsup: 0, shift: 0,
          spec_fix: 0, spec_carry: 0, digit_carries: 0};
    if (ka >= 2)      r.word = {da.sign, 13'h1F00, 50'd0};
    else if (kb >= 2) r.word = {db.sign, 13'h1F00, 50'd0};
    else if (ka == 1 && kb == 1 && da.sign != db.sign) begin
      r.word = {da.sign, 13'h1F00, 50'd0}; r.invalid = 1;
    end
    else if (ka == 1) r.word = {da.sign, 13'h1E00, 50'd0};
    else if (kb == 1) r.word = {db.sign, 13'h1E00, 50'd0};
    else begin
      dec64_t hi, lo, res;
      int unsigned d;
      longint unsigned aligned, s, x, y;
      int c;
      hi = (da.exp >= db.exp) ? da : db;
      lo = (da.exp >= db.exp) ? db : da;
      d  = hi.exp - lo.exp;
      if (da.sign != db.sign || d % 3 != 0) begin
        r.word = {da.sign, 13'h1F00, 50'd0}; r.unsup = 1;
      end else begin
        r.shift = d / 3;
        if (r.shift >= 6) begin
          aligned = 0; r.inexact = lo.coef != 0;
        end else begin
          aligned = lo.coef / POW3[r.shift]; r.inexact = (lo.coef % POW3[r.shift]) != 0;
        end
        s = hi.coef + aligned;
        r.overflow = s >= LIM;
        res.sign = hi.sign; res.exp = hi.exp; res.coef = s % LIM;
        r.word = make_word64(res, 1'b1);
        // digit-level view: speculation when the 7 MSBs sum to >= 124
        x = hi.coef; y = aligned; c = 0;
        for (int n = 0; n < 5; n++) begin
          int unsigned ga, gb;
          bit sp;
          ga = int'(x % 1000); gb = int'(y % 1000); x = x / 1000; y = y / 1000;
          sp = (ga / 8 + gb / 8) >= 124;
          c  = (ga + gb + c >= 1000) ? 1 : 0;
          if (sp && c == 1) r.spec_carry++;
          if (sp && c == 0) r.spec_fix++;
          r.digit_carries += c;
        end
      end
    end
    return r;
  endfunction

endpackage
