// tb_mm_zero_d: the zero detector must be high for an all-zero vector only:
// checked for zero, every one-hot vector and random vectors.
module tb_mm_zero_d;
  localparam int unsigned W = 38;
  logic [W-1:0] sc;
  logic         zero;
  int checks = 0, failures = 0;

  mm_zero_d dut (.sc(sc), .zero(zero));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [W-1:0] v);
    sc = v;
    #1;
    checks++;
    if (zero != (v == '0)) begin
      failures++;
      $display("FAIL sc=%h zero=%b", v, zero);
    end
  endtask

  initial begin
    check('0);
    for (int j = 0; j < W; j++) check(W'(1) << j);
    for (int k = 0; k < 200; k++) check(W'({$urandom, $urandom}));
    check('1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
