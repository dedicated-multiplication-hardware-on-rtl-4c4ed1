// tb_mm_sm3: the simplified multiplexer must return 0, N^, B^ or D^ for
// (A^, q^) = 00, 01, 10, 11, for random operand values.
module tb_mm_sm3;
  localparam int unsigned W = 38;
  logic         a_hat, q_hat;
  logic [W-1:0] n_hat, b_hat, d_hat, x, want;
  int checks = 0, failures = 0;

  mm_sm3 dut (.a_hat(a_hat), .q_hat(q_hat), .n_hat(n_hat), .b_hat(b_hat),
              .d_hat(d_hat), .x(x));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 500; k++) begin
      n_hat = W'({$urandom, $urandom});
      b_hat = W'({$urandom, $urandom});
      d_hat = W'({$urandom, $urandom});
      for (int sel = 0; sel < 4; sel++) begin
        {a_hat, q_hat} = 2'(sel);
        #1;
        case (sel)
          0: want = '0;
          1: want = n_hat;
          2: want = b_hat;
          default: want = d_hat;
        endcase
        checks++;
        if (x != want) begin
          failures++;
          $display("FAIL sel=%0d x=%h want=%h", sel, x, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
