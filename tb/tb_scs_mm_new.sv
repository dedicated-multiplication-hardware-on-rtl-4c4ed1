// tb_scs_mm_new: end-to-end self-checking testbench of the Montgomery modular
// multiplier at its default size (K = 32).
//
// For every operation the expected value A*B*2^-(K+2) mod N is worked out
// with plain wide-integer arithmetic (bit-serial Montgomery reduction of the
// full product), independent of the carry-save datapath. The result must be
// congruent to it modulo N and lie below 2N (N mod 4 = 3) or 4N (N mod 4 = 1).
// The number of cycles from start to done is compared with an
// algorithm-level model of the schedule (pre-addition, conversion, the loop
// with skipped iterations, final conversion) that works on whole integers.
// The test also chains results back as operands, and counts how often each
// mechanism occurs: skipped iterations, each of the four SM3 selections, both
// N^ formulas, multi-cycle conversions before and after the loop, and a
// skip on the last iteration being held back by the controller's guard. A mechanism
// that never occurs is a failure.
module tb_scs_mm_new;
  import mm_pkg::*;

  localparam int unsigned K = 32;
  localparam int unsigned W = K + 6;
  localparam int unsigned NRAND = 400;
  localparam int KI = K;  // signed copy for the loop index compares

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  logic [K:0]   a = '0, b = '0;
  logic [K-1:0] n = 1;
  logic         busy, done;
  logic [K+1:0] result;

  int checks = 0, failures = 0;

  // mechanism counters
  int cnt_skip = 0, cnt_x0 = 0, cnt_xn = 0, cnt_xb = 0, cnt_xd = 0;
  int cnt_guard = 0;  // last-iteration skips blocked by the guard
  int cyc_min = 1000000, cyc_max = 0;
  int cnt_n1 = 0, cnt_n3 = 0, cnt_preconv = 0, cnt_postconv = 0, cnt_chain = 0;

  scs_mm_new dut (
    .clk   (clk),
    .rst_n (rst_n),
    .start (start),
    .a     (a),
    .b     (b),
    .n     (n),
    .busy  (busy),
    .done  (done),
    .result(result)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Observe the datapath's choices while it iterates.
  always @(posedge clk) begin
    if (rst_n && dut.op == OP_CONV && dut.u_ctrl.state_q == ST_POST_CONV) cnt_postconv++;
    if (rst_n && dut.op == OP_ITER) begin
      if (dut.skip) cnt_skip++;
      if (!dut.skip_en && !dut.u_skip.a_nxt1 && !dut.u_skip.q1 && !dut.u_skip.ss1_next0)
        cnt_guard++;
      case ({dut.a_hat_q, dut.q_hat_q})
        2'b00: cnt_x0++;
        2'b01: cnt_xn++;
        2'b10: cnt_xb++;
        default: cnt_xd++;
      endcase
    end
  end

  // Expected value: (A*B) * 2^-(K+2) mod N by bit-serial reduction.
  function automatic logic [127:0] ref_mont(logic [K:0] av, logic [K:0] bv, logic [K-1:0] nv);
    logic [127:0] t;
    t = 128'(av) * 128'(bv);
    for (int i = 0; i < K + 2; i++) begin
      if (t[0]) t = t + 128'(nv);
      t = t >> 1;
    end
    return t % 128'(nv);
  endfunction

  // Cycle model of the schedule, on whole integers.
  function automatic int conv_cycles(ref logic [127:0] ss, ref logic [127:0] sc);
    logic [127:0] mask, t, c1;
    int cyc = 0;
    mask = (128'(1) << W) - 1;
    while (sc != 0) begin
      t  = ss ^ sc;
      c1 = (ss & sc) << 1;
      ss = (t ^ c1) & mask;
      sc = ((t & c1) << 1) & mask;
      cyc++;
    end
    return cyc;
  endfunction

  function automatic int model_cycles(logic [K:0] av, logic [K:0] bv, logic [K-1:0] nv);
    logic [127:0] bh, nh, dh, ss, sc, x, s, c;
    logic [127:0] asr;
    logic ah, qh, a1, a2, q1, q2, sk;
    int i, iters, cyc;
    bh = 128'(bv) << 3;
    nh = nv[1] ? 128'(nv) + 1 : 3 * 128'(nv) + 1;
    ss = bh ^ nh;
    sc = (bh & nh) << 1;
    cyc = 1;                       // pre-addition
    cyc += conv_cycles(ss, sc);    // conversion of B^ + N^
    dh = ss;
    cyc += 1;                      // D^ latch
    ss = 0; sc = 0; ah = 0; qh = 0; asr = 128'(av);
    i = -1; iters = 0;
    while (i <= KI + 4) begin
      x = ah ? (qh ? dh : bh) : (qh ? nh : 0);
      s = ss ^ sc ^ x;
      c = (ss & sc) | (ss & x) | (sc & x);   // weight of next bit
      // next pair (after the divide by two)
      ss = s >> 1;
      sc = c;
      q1 = ss[0] ^ sc[0];
      a1 = asr[0];
      a2 = asr[1];
      sk = (i + 1 <= KI + 4) && !a1 && !q1 && !ss[0];
      iters++;
      if (sk) begin
        q2 = ss[1] ^ sc[1];
        ss = ss >> 1;
        sc = sc >> 1;
        ah = a2; qh = q2; asr = asr >> 2; i += 2;
      end else begin
        ah = a1; qh = q1; asr = asr >> 1; i += 1;
      end
    end
    cyc += iters;
    cyc += conv_cycles(ss, sc);    // final conversion
    cyc += 1;                      // finish
    return cyc;
  endfunction

  task automatic run_one(logic [K:0] av, logic [K:0] bv, logic [K-1:0] nv);
    logic [127:0] exp_v, bound;
    int cyc, exp_cyc;
    logic [127:0] ss0, sc0, bh, nh;
    a = av; b = bv; n = nv;
    if (nv[1]) cnt_n3++; else cnt_n1++;
    bh = 128'(bv) << 3;
    nh = nv[1] ? 128'(nv) + 1 : 3 * 128'(nv) + 1;
    ss0 = bh ^ nh; sc0 = (bh & nh) << 1;
    if (conv_cycles(ss0, sc0) > 1) cnt_preconv++;
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    cyc = 0;
    while (!done) begin
      @(posedge clk);
      #1 cyc++;
    end
    if (cyc < cyc_min) cyc_min = cyc;
    if (cyc > cyc_max) cyc_max = cyc;
    exp_v   = ref_mont(av, bv, nv);
    exp_cyc = model_cycles(av, bv, nv);
    bound   = nv[1] ? 2 * 128'(nv) : 4 * 128'(nv);
    checks += 3;
    if ((128'(result) % 128'(nv)) != exp_v) begin
      failures++;
      $display("FAIL value A=%h B=%h N=%h got %h (mod N %h) exp %h", av, bv, nv, result,
               128'(result) % 128'(nv), exp_v);
    end
    if (128'(result) >= bound) begin
      failures++;
      $display("FAIL bound A=%h B=%h N=%h got %h", av, bv, nv, result);
    end
    if (cyc != exp_cyc) begin
      failures++;
      $display("FAIL cycles A=%h B=%h N=%h got %0d exp %0d", av, bv, nv, cyc, exp_cyc);
    end
  endtask

  function automatic logic [K-1:0] rand_n();
    logic [K-1:0] v;
    v = K'({$urandom, $urandom});
    v[0] = 1'b1;
    if (v < 3) v = 3;
    return v;
  endfunction

  function automatic logic [K:0] rand_below(logic [K:0] lim);
    return (K+1)'(({$urandom, $urandom}) % 64'(lim));
  endfunction

  initial begin : main
    logic [K-1:0] nv;
    logic [K:0] av, bv, pv;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    #1;
    // directed corner cases
    run_one('0, '0, 32'hFFFF_FFFF);
    run_one((K+1)'(33'h1_FFFF_FFFD), (K+1)'(33'h1_FFFF_FFFD), 32'hFFFF_FFFF);
    run_one(1, 1, 32'hFFFF_FFFD);
    run_one(5, 7, 32'd13);
    run_one(25, 25, 32'd13);
    run_one((K+1)'(33'h1_0000_0000), 1, 32'h8000_0001);
    // random operands
    for (int t = 0; t < NRAND; t++) begin
      nv = rand_n();
      av = rand_below({nv, 1'b0});
      bv = rand_below({nv, 1'b0});
      run_one(av, bv, nv);
    end
    // chained multiplications: a result below 2N is a valid operand
    for (int t = 0; t < 20; t++) begin
      nv = rand_n();
      nv[1] = 1'b1;
      av = rand_below({nv, 1'b0});
      bv = rand_below({nv, 1'b0});
      run_one(av, bv, nv);
      pv = result[K:0];
      run_one(pv, bv, nv);
      checks++;
      if (result[K+1]) failures++;
      cnt_chain++;
    end
    // mechanism coverage
    $display("latency start->done: min %0d max %0d cycles", cyc_min, cyc_max);
    $display("skips=%0d x0=%0d xN=%0d xB=%0d xD=%0d n1=%0d n3=%0d preconv>1=%0d postconv=%0d chain=%0d guard=%0d",
             cnt_skip, cnt_x0, cnt_xn, cnt_xb, cnt_xd, cnt_n1, cnt_n3, cnt_preconv, cnt_postconv, cnt_chain, cnt_guard);
    checks += 10;
    if (cnt_guard == 0) failures++;
    if (cnt_postconv == 0) failures++;
    if (cnt_skip == 0) failures++;
    if (cnt_x0 == 0) failures++;
    if (cnt_xn == 0) failures++;
    if (cnt_xb == 0) failures++;
    if (cnt_xd == 0) failures++;
    if (cnt_n1 == 0) failures++;
    if (cnt_n3 == 0) failures++;
    if (cnt_preconv == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
