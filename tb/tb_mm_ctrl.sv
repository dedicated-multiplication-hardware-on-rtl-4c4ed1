// tb_mm_ctrl: drives the controller's status inputs and checks the sequence
// of datapath operations it issues:
//   start -> LOAD, PRE_ADD, CONV while SC != 0, DLATCH, ITER ..., CONV while
//   SC != 0, FINISH, then done for one cycle and busy low.
// The number of ITER cycles plus the number of skips must equal K + 6 (the
// iterations i = -1 .. K+4), skips are driven as the skip detector would
// (only when skip_en is high), skip_en must be low on the last iteration, and
// start must be ignored while busy.
module tb_mm_ctrl;
  import mm_pkg::*;
  localparam int unsigned K = 32;
  logic   clk = 1'b0, rst_n = 1'b0, start = 1'b0, sc_zero = 1'b0, skip_raw = 1'b0;
  logic   skip;
  mm_op_e op;
  logic   skip_en, busy, done;
  int checks = 0, failures = 0;

  assign skip = skip_raw & skip_en;

  mm_ctrl dut (.clk(clk), .rst_n(rst_n), .start(start), .sc_zero(sc_zero), .skip(skip),
               .op(op), .skip_en(skip_en), .busy(busy), .done(done));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_op(mm_op_e want, string what);
    checks++;
    if (op != want) begin
      failures++;
      $display("FAIL %s: op=%s want %s", what, op.name(), want.name());
    end
  endtask

  // One multiplication; skip_mode 0: never, 1: always, 2: random.
  task automatic run(int pre_conv, int post_conv, int skip_mode);
    int iters, skips, guard;
    start = 1'b1;
    #1 expect_op(OP_LOAD, "load");
    @(posedge clk); #1 start = 1'b0;
    expect_op(OP_PRE_ADD, "pre-add");
    checks++; if (!busy) failures++;
    @(posedge clk); #1;
    for (int j = 0; j < pre_conv; j++) begin
      sc_zero = 1'b0; start = 1'b1;  // start while busy must be ignored
      #1 expect_op(OP_CONV, "pre-conversion");
      @(posedge clk); #1 start = 1'b0;
    end
    sc_zero = 1'b1;
    #1 expect_op(OP_DLATCH, "D latch");
    @(posedge clk); #1;
    iters = 0; skips = 0; guard = 0;
    sc_zero = 1'b0;
    while (op == OP_ITER && guard < 100) begin
      skip_raw = (skip_mode == 1) || (skip_mode == 2 && $urandom_range(0, 1) == 1);
      #1;
      iters++;
      if (skip) skips++;
      @(posedge clk); #1;
      guard++;
    end
    checks++;
    if (iters + skips != K + 6) begin
      failures++;
      $display("FAIL loop: %0d iterations + %0d skips != %0d", iters, skips, K + 6);
    end
    skip_raw = 1'b0;
    for (int j = 0; j < post_conv; j++) begin
      sc_zero = 1'b0;
      #1 expect_op(OP_CONV, "post-conversion");
      @(posedge clk); #1;
    end
    sc_zero = 1'b1;
    #1 expect_op(OP_FINISH, "finish");
    checks++; if (done) failures++;
    @(posedge clk); #1;
    checks += 2;
    if (!done) begin failures++; $display("FAIL done missing"); end
    if (busy)  begin failures++; $display("FAIL busy after finish"); end
    @(posedge clk); #1;
    checks++;
    if (done) begin failures++; $display("FAIL done longer than one cycle"); end
  endtask

  // skip_en must drop on the last iteration (idx = K+5)
  always @(posedge clk) begin
    if (rst_n && op == OP_ITER && dut.idx_q == ($bits(dut.idx_q))'(K + 5)) begin
      checks++;
      if (skip_en) begin
        failures++;
        $display("FAIL skip allowed on the last iteration");
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    expect_op(OP_IDLE, "idle");
    run(0, 0, 0);
    run(3, 2, 1);
    for (int k = 0; k < 20; k++) run($urandom_range(0, 20), $urandom_range(0, 20), 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
