// tb_mm_skip_d: checks the skip detector against whole-number arithmetic.
// Random carry-save pairs (SS, SC) and operands x with two zero low bits are
// added as integers: the next pair is (SS ^ SC ^ x) >> 1 and the majority
// carry vector. Its parity gives q_{i+1}; the iteration i+1 may be skipped
// exactly when A_{i+1} = 0, the next pair is even and its sum bit 0 is zero,
// and then halving both vectors must equal halving their sum, whose parity
// gives q_{i+2}. Every input combination of A_{i+1}, A_{i+2}, skip_en is used.
module tb_mm_skip_d;
  localparam int unsigned VW = 16;
  logic [1:0] ss_lo, sc_lo;
  logic       sum2, a_nxt1, a_nxt2, skip_en;
  logic       skip, q_next, a_next;
  int checks = 0, failures = 0, n_skip = 0;

  mm_skip_d dut (.ss_lo(ss_lo), .sc_lo(sc_lo), .sum2(sum2), .a_nxt1(a_nxt1),
                 .a_nxt2(a_nxt2), .skip_en(skip_en), .skip(skip),
                 .q_next(q_next), .a_next(a_next));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [VW-1:0] ss, sc, x, s, c, ssn, scn;
    int unsigned tot, tot2;
    logic q1_ref, q2_ref, sk_ref;
    for (int k = 0; k < 4000; k++) begin
      ss = VW'($urandom) >> 2;
      sc = VW'($urandom) >> 2;
      x  = (VW'($urandom) >> 2) & ~VW'(3);
      s  = ss ^ sc ^ x;
      c  = (ss & sc) | (ss & x) | (sc & x);
      ssn = s >> 1;
      scn = c;
      tot = int'(ssn) + int'(scn);          // (SS + SC + x) / 2, low bit dropped
      q1_ref = tot[0];
      for (int m = 0; m < 8; m++) begin
        {a_nxt1, a_nxt2, skip_en} = 3'(m);
        ss_lo = ss[1:0]; sc_lo = sc[1:0]; sum2 = s[2];
        #1;
        sk_ref = skip_en && !a_nxt1 && !q1_ref && !ssn[0];
        checks += 3;
        if (skip != sk_ref) begin
          failures++;
          $display("FAIL skip ss=%h sc=%h x=%h m=%0d", ss, sc, x, m);
        end
        if (sk_ref) begin
          n_skip++;
          tot2 = int'(ssn >> 1) + int'(scn >> 1);
          q2_ref = tot2[0];
          checks++;
          if (tot2 != tot / 2 || tot[0]) begin
            failures++;
            $display("FAIL skip not exact ss=%h sc=%h x=%h", ss, sc, x);
          end
          if (q_next != q2_ref || a_next != a_nxt2) begin
            failures++;
            $display("FAIL skip outputs ss=%h sc=%h x=%h", ss, sc, x);
          end
        end else if (q_next != q1_ref || a_next != a_nxt1) begin
          failures++;
          $display("FAIL outputs ss=%h sc=%h x=%h q=%b want %b", ss, sc, x, q_next, q1_ref);
        end
      end
    end
    checks++;
    if (n_skip == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
