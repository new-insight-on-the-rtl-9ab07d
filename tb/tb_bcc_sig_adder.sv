// tb_bcc_sig_adder: checks the 54-bit BCC significand adder (one BCD MSD
// plus five BCC digits = 16 decimal digits). Operands are built from random
// 16-digit integers, biased towards digit values near the speculation
// threshold (992..999) and towards all-nines chains; the reference is plain
// 64-bit integer addition followed by re-splitting into MSD and BCC digits.
// Coverage counters make sure speculation with and without a digit carry,
// and the final carry out, all occur. A second instance with J = 11 (the
// 114-bit adder of a 34-digit significand) is checked against a
// digit-by-digit radix-1000 model.
module tb_bcc_sig_adder;
  localparam int unsigned J = 5;
  localparam int unsigned N = 4 + 10 * J;
  localparam longint unsigned LIM = 64'd10_000_000_000_000_000;

  logic [N-1:0] a, b, sum;
  logic         cin, cout;
  logic [J:0]   spec;
  int checks = 0, failures = 0;
  int spec_carry = 0, spec_nocarry = 0, couts = 0;

  bcc_sig_adder #(.J(J)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .spec(spec));

  localparam int unsigned JW = 11;
  localparam int unsigned NW = 4 + 10 * JW;
  logic [NW-1:0] wa, wb, wsum;
  logic          wcout;
  logic [JW:0]   wspec;
  bcc_sig_adder #(.J(JW)) dut_w (.a(wa), .b(wb), .cin(cin), .sum(wsum), .cout(wcout), .spec(wspec));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] pack(longint unsigned v);
    logic [N-1:0] r;
    for (int n = 0; n < J; n++) begin
      r[10*n +: 10] = 10'(v % 1000);
      v = v / 1000;
    end
    r[N-1 -: 4] = 4'(v);
    return r;
  endfunction

  function automatic longint unsigned rand_val(int mode);
    longint unsigned v = 0;
    for (int n = 0; n < J; n++) begin
      int unsigned g;
      case (mode)
        0: g = $urandom_range(999);
        1: g = $urandom_range(999, 985);
        default: g = 999;
      endcase
      v = v + longint'(g) * pow1000(n);
    end
    v = v + longint'($urandom_range(9)) * pow1000(J);
    return v;
  endfunction

  function automatic longint unsigned pow1000(int n);
    longint unsigned p = 1;
    for (int i = 0; i < n; i++) p = p * 1000;
    return p;
  endfunction

  initial begin
    for (int it = 0; it < 20000; it++) begin
      longint unsigned va, vb, vs;
      va = rand_val($urandom_range(2));
      vb = rand_val($urandom_range(2));
      if (it % 97 == 0) vb = LIM - 1 - va;   // sum of all nines
      a = pack(va); b = pack(vb); cin = 1'($urandom_range(1));
      vs = va + vb + longint'(cin);
      #1;
      checks++;
      if (sum !== pack(vs % LIM) || cout !== (vs >= LIM)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d cin=%0d sum=%h cout=%0d", va, vb, cin, sum, cout);
      end
      for (int n = 0; n < J; n++)
        if (spec[n]) begin
          if (({1'b0, a[10*n +: 10]} + {1'b0, b[10*n +: 10]}) >= 11'd999) spec_carry++;
          else spec_nocarry++;
        end
      if (cout) couts++;
    end
    // 114-bit instance: digit-by-digit reference
    for (int it = 0; it < 5000; it++) begin
      logic [NW-1:0] want;
      int c;
      for (int n = 0; n < int'(JW); n++) begin
        wa[10*n +: 10] = 10'((it % 3 == 0) ? $urandom_range(999, 980) : $urandom_range(999));
        wb[10*n +: 10] = 10'((it % 5 == 0) ? 999 - wa[10*n +: 10] : $urandom_range(999));
      end
      wa[NW-1 -: 4] = 4'($urandom_range(9));
      wb[NW-1 -: 4] = 4'($urandom_range(9));
      cin = 1'($urandom_range(1));
      c = int'(cin);
      for (int n = 0; n < int'(JW); n++) begin
        int t;
        t = int'(wa[10*n +: 10]) + int'(wb[10*n +: 10]) + c;
        c = (t >= 1000) ? 1 : 0;
        want[10*n +: 10] = 10'(t - 1000 * c);
      end
      begin
        int t;
        t = int'(wa[NW-1 -: 4]) + int'(wb[NW-1 -: 4]) + c;
        c = (t >= 10) ? 1 : 0;
        want[NW-1 -: 4] = 4'(t - 10 * c);
      end
      #1;
      checks++;
      if (wsum !== want || wcout !== 1'(c)) begin
        failures++;
        if (failures < 10) $display("FAIL J=11 a=%h b=%h sum=%h want=%h", wa, wb, wsum, want);
      end
    end
    checks++;
    if (spec_carry == 0 || spec_nocarry == 0 || couts == 0) begin
      failures++;
      $display("FAIL coverage spec_carry=%0d spec_nocarry=%0d couts=%0d", spec_carry, spec_nocarry, couts);
    end
    $display("coverage spec_carry=%0d spec_nocarry=%0d couts=%0d", spec_carry, spec_nocarry, couts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
