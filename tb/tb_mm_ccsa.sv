// tb_mm_ccsa: random check of the one-level configurable carry-save adder at
// its default width.
// 1F_CSA: s + 2c must equal ss + sc + x exactly.
// 2H_CSA: s + 2c must equal ss + sc (inputs kept below 2^(W-1) so nothing
// leaves the row), s must be the second half-adder row's sum, and repeating
// the step must reach a zero carry vector, with the binary sum in s, within
// W/2 + 1 steps, since each step moves the lowest carry up by two bits.
module tb_mm_ccsa;
  localparam int unsigned W = 38;
  logic         alpha;
  logic [W-1:0] ss, sc, x, s, c;
  int checks = 0, failures = 0;

  mm_ccsa dut (.alpha(alpha), .ss(ss), .sc(sc), .x(x), .s(s), .c(c));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd();
    return W'({$urandom, $urandom});
  endfunction

  initial begin
    logic [W+1:0] lhs, rhs;
    logic [W-1:0] t, c1, cs, cc, want;
    int steps;
    for (int k = 0; k < 2000; k++) begin
      alpha = 1'b1; ss = rnd(); sc = rnd(); x = rnd();
      #1;
      lhs = (W+2)'(s) + ((W+2)'(c) << 1);
      rhs = (W+2)'(ss) + (W+2)'(sc) + (W+2)'(x);
      checks++;
      if (lhs != rhs) begin
        failures++;
        $display("FAIL 1F ss=%h sc=%h x=%h", ss, sc, x);
      end
      alpha = 1'b0; ss = rnd() >> 1; sc = rnd() >> 1; x = rnd();
      #1;
      lhs = (W+2)'(s) + ((W+2)'(c) << 1);
      rhs = (W+2)'(ss) + (W+2)'(sc);
      t = ss ^ sc; c1 = (ss & sc) << 1;
      checks += 2;
      if (lhs != rhs) begin
        failures++;
        $display("FAIL 2H sum ss=%h sc=%h", ss, sc);
      end
      if (s != (t ^ c1)) begin
        failures++;
        $display("FAIL 2H row ss=%h sc=%h", ss, sc);
      end
      // conversion to binary by repeated 2H steps
      want = ss + sc;
      steps = 0;
      while (sc != '0 && steps < W) begin
        #1;
        cs = s; cc = c << 1;
        ss = cs; sc = cc;
        steps++;
        #1;
      end
      checks += 2;
      if (ss != want) begin
        failures++;
        $display("FAIL conversion got %h want %h", ss, want);
      end
      if (steps > W / 2 + 1) begin
        failures++;
        $display("FAIL conversion took %0d steps", steps);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
