// tb_mm_operand_prep: for random odd moduli N and multiplicands B, B^ must be
// 8B and N^ must be N + 1 when N mod 4 = 3 and 3N + 1 when N mod 4 = 1; in
// both cases N^ is a multiple of 4 and congruent to 1 modulo N (for N > 1).
module tb_mm_operand_prep;
  localparam int unsigned K = 32;
  localparam int unsigned W = K + 6;
  logic [K:0]   b;
  logic [K-1:0] n;
  logic [W-1:0] b_hat, n_hat;
  int checks = 0, failures = 0, n1 = 0, n3 = 0;

  mm_operand_prep dut (.b(b), .n(n), .b_hat(b_hat), .n_hat(n_hat));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned nl, want_n;
    for (int k = 0; k < 1000; k++) begin
      n = K'($urandom) | K'(1);
      if (k == 0) n = '1;
      if (k == 1) n = K'(1);
      b = (K+1)'({$urandom, $urandom});
      #1;
      nl = longint'(n);
      if (n[1]) begin want_n = nl + 1; n3++; end
      else      begin want_n = 3 * nl + 1; n1++; end
      checks += 4;
      if (64'(b_hat) != 64'(b) * 8) begin
        failures++;
        $display("FAIL b_hat b=%h got %h", b, b_hat);
      end
      if (64'(n_hat) != want_n) begin
        failures++;
        $display("FAIL n_hat n=%h got %h", n, n_hat);
      end
      if (n_hat[1:0] != 2'b00) failures++;
      if (nl > 1 && (64'(n_hat) % nl) != 1) failures++;
    end
    checks += 2;
    if (n1 == 0) failures++;
    if (n3 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
