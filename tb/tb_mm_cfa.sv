// tb_mm_cfa: exhaustive check of the configurable full adder cell.
// alpha = 1: s + 2c must equal ss + sc + x.
// alpha = 0: the cell must be the second of two serial half adders:
//   c1_out = ss & sc (first-row carry), s + 2c = (ss ^ sc) + c1_in.
module tb_mm_cfa;
  logic alpha, ss, sc, x, c1_in;
  logic s, c, c1_out;
  int checks = 0, failures = 0;

  mm_cfa dut (.alpha(alpha), .ss(ss), .sc(sc), .x(x), .c1_in(c1_in),
              .s(s), .c(c), .c1_out(c1_out));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {alpha, ss, sc, x, c1_in} = 5'(v);
      #1;
      checks += 2;
      if (alpha) begin
        if (int'(s) + 2 * int'(c) != int'(ss) + int'(sc) + int'(x)) begin
          failures++;
          $display("FAIL FA v=%b s=%b c=%b", 5'(v), s, c);
        end
      end else begin
        if (int'(s) + 2 * int'(c) != int'(ss ^ sc) + int'(c1_in)) begin
          failures++;
          $display("FAIL HA2 v=%b s=%b c=%b", 5'(v), s, c);
        end
      end
      if (c1_out != (ss & sc)) begin
        failures++;
        $display("FAIL HA1 carry v=%b", 5'(v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
