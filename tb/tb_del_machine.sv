// tb_del_machine: end-to-end test of del_machine.
//
// Programs are assembled in the testbench, written into the instruction
// memory and run; the final variables are compared with a serial
// reference interpreter, so the concurrent schedule must give the same
// answer as executing one instruction after another. It runs:
//   - the seven-statement example loop (forward, backward and not-taken
//     branches, several instructions per cycle, virtual execution);
//   - a GO TO over two statements into a counted loop (MPB fields) and a
//     loop with statements before and after it;
//   - a dependency chain ahead of a fast loop on a second instance built
//     with a two-element AE vector, so that the backward branch has to
//     wait for the chain (AE stall); the same program on the default
//     instance must not stall;
//   - two loops that work through the evaluation stack: an expression
//     evaluated on the stack, and a branch that tests two stacked values;
//   - 200 random programs: random assignments, stack operations and
//     forward branches in front of a counted loop whose backward branch has
//     a random destination. A program whose serial run would overflow or
//     underflow the stack must stop the machine with `stuck`;
//   - a pop from an empty stack (`stuck`);
//   - an unknown format (the loader reports `error`).
// Each mechanism is counted; one that never occurs is a failure.
module tb_del_machine;
  import del_pkg::*;
  import del_asm_pkg::*;

  localparam int D = QDEPTH;
  localparam int EP = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // shared host ports
  logic               im_we = 0;
  logic [IM_WA_W-1:0] im_waddr = '0;
  logic [IM_W-1:0]    im_wdata = '0;
  logic               ct_we = 0;
  logic [CADDR_W-1:0] ct_addr = '0;
  logic [DATA_W-1:0]  ct_wdata = '0;
  logic [IM_BA_W-1:0] start_addr = '0;
  logic [QIDX_W-1:0]  n_instr = '0;
  logic [CADDR_W-1:0] env_ptr = EP;
  logic [3:0]         opnd_w = 4'd3;

  // instance 0: default sizes; instance 1: AE vector of 2
  logic               start [2];
  logic [DATA_W-1:0]  ct_rdata [2];
  logic load_busy [2], load_error [2], running [2], done [2], stuck [2];
  logic [QIDX_W-1:0]  q_count [2];
  q_line_t            q_lines0 [D], q_lines1 [D];
  logic [D-1:0]       exec_vec [2], skip_vec [2], stack_lines [2];
  logic [C_W-1:0]     c0 [D], c1 [D];
  logic [AE_LEN-1:0]  ae0 [D];
  logic [1:0]         ae1 [D];
  logic [C_W-1:0]     b_elem [2];
  logic [31:0] n_cycles [2], n_exec [2], n_fwd [2], n_bwd [2], n_nottaken [2];
  logic [31:0] n_ae_stall [2], n_multi [2], n_virtual [2];
  logic [$clog2(STK_DEPTH+1)-1:0] stk_depth [2];

  del_machine dut0 (
    .clk, .rst_n, .im_we, .im_waddr, .im_wdata, .ct_we, .ct_addr, .ct_wdata,
    .ct_rdata(ct_rdata[0]), .start(start[0]), .start_addr, .n_instr, .env_ptr, .opnd_w,
    .load_busy(load_busy[0]), .load_error(load_error[0]), .running(running[0]),
    .done(done[0]), .stuck(stuck[0]), .q_count(q_count[0]), .q_lines(q_lines0),
    .exec_vec(exec_vec[0]), .skip_vec(skip_vec[0]), .stack_lines(stack_lines[0]),
    .c_vec(c0), .ae_mat(ae0), .b_elem(b_elem[0]), .stk_depth(stk_depth[0]), .n_cycles(n_cycles[0]),
    .n_exec(n_exec[0]), .n_fwd(n_fwd[0]), .n_bwd(n_bwd[0]), .n_nottaken(n_nottaken[0]),
    .n_ae_stall(n_ae_stall[0]), .n_multi(n_multi[0]), .n_virtual(n_virtual[0])
  );

  del_machine #(.AE(2)) dut1 (
    .clk, .rst_n, .im_we, .im_waddr, .im_wdata, .ct_we, .ct_addr, .ct_wdata,
    .ct_rdata(ct_rdata[1]), .start(start[1]), .start_addr, .n_instr, .env_ptr, .opnd_w,
    .load_busy(load_busy[1]), .load_error(load_error[1]), .running(running[1]),
    .done(done[1]), .stuck(stuck[1]), .q_count(q_count[1]), .q_lines(q_lines1),
    .exec_vec(exec_vec[1]), .skip_vec(skip_vec[1]), .stack_lines(stack_lines[1]),
    .c_vec(c1), .ae_mat(ae1), .b_elem(b_elem[1]), .stk_depth(stk_depth[1]), .n_cycles(n_cycles[1]),
    .n_exec(n_exec[1]), .n_fwd(n_fwd[1]), .n_bwd(n_bwd[1]), .n_nottaken(n_nottaken[1]),
    .n_ae_stall(n_ae_stall[1]), .n_multi(n_multi[1]), .n_virtual(n_virtual[1])
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int m_multi = 0, m_fwd = 0, m_bwd = 0, m_nottaken = 0, m_virtual = 0;
  int m_stall = 0, m_stuck = 0, m_loaderr = 0, m_match = 0, m_stack = 0;

  logic [IM_W-1:0]   img [IM_DEPTH];
  logic [DATA_W-1:0] vars [64];
  logic [DATA_W-1:0] ref_mem [64];

  task automatic load_program(del_asm a);
    foreach (img[k]) img[k] = '0;
    a.image(img);
    for (int k = 0; k < 16; k++) begin
      @(posedge clk); im_we <= 1; im_waddr <= IM_WA_W'(k); im_wdata <= img[k];
    end
    @(posedge clk); im_we <= 0;
  endtask

  task automatic load_vars();
    for (int k = 0; k < 16; k++) begin
      @(posedge clk); ct_we <= 1; ct_addr <= CADDR_W'(EP + k); ct_wdata <= vars[EP + k];
    end
    @(posedge clk); ct_we <= 0;
  endtask

  // Run the loaded program on instance `u`; returns 1 when it completes.
  task automatic run(int u, int n, output bit ok);
    int guard;
    @(posedge clk); start[u] <= 1; n_instr <= QIDX_W'(n); start_addr <= '0;
    @(posedge clk); start[u] <= 0;
    // the engine's status refers to the previous task until loading ends
    guard = 0;
    while (!load_busy[u] && guard < 4) begin @(posedge clk); guard++; end
    while (load_busy[u]) @(posedge clk);
    @(posedge clk);
    guard = 0;
    while (!(done[u] || stuck[u] || load_error[u]) && guard < 5000) begin
      @(posedge clk); guard++;
    end
    ok = done[u] && !stuck[u] && !load_error[u];
    @(negedge clk);
    m_multi    += n_multi[u];
    m_fwd      += n_fwd[u];
    m_bwd      += n_bwd[u];
    m_nottaken += n_nottaken[u];
    m_virtual  += n_virtual[u];
    m_stall    += n_ae_stall[u];
    for (int k = 0; k < D; k++)
      if (u == 0 && int'(q_count[0]) > k && q_lines0[k].sink.kind == REF_STACK && done[0]) m_stack++;
  endtask

  // Compare variables EP..EP+15 of instance u with the serial reference.
  task automatic compare(int u, del_asm a, string name);
    int steps;
    bit same;
    ref_mem = vars;
    steps = a.run_serial(ref_mem, EP, 100000);
    if (steps < 0) begin
      check(stuck[u] && !done[u], {name, ": stack error stops the machine"});
      if (stuck[u]) m_stuck++;
      return;
    end
    check(done[u] && !stuck[u], {name, ": completes"});
    same = 1;
    for (int k = 0; k < 16; k++) begin
      @(negedge clk); ct_addr <= CADDR_W'(EP + k); #1;
      if (ct_rdata[u] !== ref_mem[EP + k]) begin
        same = 0;
        $display("  %s: var %0d = %0d, serial %0d", name, k, ct_rdata[u], ref_mem[EP + k]);
      end
    end
    check(same, {name, ": results equal serial execution"});
    if (same) m_match++;
  endtask

  initial begin
    del_asm a;
    bit ok;
    start[0] = 0; start[1] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;

    // ---- 1: the example loop (variables: 0 I, 1 J, 2..4 constants 0, 1, 2)
    a = new(3, 0);
    a.asg(5, 2, 0, 0, OP_MOVE);
    a.asg(5, 2, 1, 0, OP_MOVE);
    a.asg(1, 0, 3, 0, OP_ADD);
    a.asg(1, 1, 3, 0, OP_ADD);
    a.br (16, 1, 4, OP_LT, 6);
    a.asg(1, 0, 3, 0, OP_ADD);
    a.br (17, 1, 4, OP_EQ, 3);
    foreach (vars[k]) vars[k] = '0;
    vars[EP + 0] = 5; vars[EP + 1] = 9; vars[EP + 3] = 1; vars[EP + 4] = 2;
    load_program(a); load_vars();
    run(0, 7, ok);
    check(ok, "example completes");
    check(n_cycles[0] == 7, "example: 7 machine cycles");
    compare(0, a, "example");

    // ---- 1b: the procedural-dependency example (0 I, 1 J, 2 K, 4 one, 5 five)
    //   1 I = I + 1   2 GO TO 5   3 J = J + 1   4 K = K + 1   5 IF J < 5 GO TO 3
    a = new(3, 0);
    a.asg(1, 0, 4, 0, OP_ADD);
    a.br (20, 0, 0, OP_TRUE, 4);
    a.asg(1, 1, 4, 0, OP_ADD);
    a.asg(1, 2, 4, 0, OP_ADD);
    a.br (16, 1, 5, OP_LT, 2);
    foreach (vars[k]) vars[k] = '0;
    vars[EP + 4] = 1; vars[EP + 5] = 5;
    load_program(a); load_vars();
    run(0, 5, ok);
    check(ok, "GO TO example completes");
    check(!q_lines0[0].mpb_v && !q_lines0[1].mpb_v && q_lines0[2].mpb == 1 &&
          q_lines0[3].mpb == 1 && q_lines0[4].mpb == 1 && q_lines0[4].mpb_v,
          "GO TO example: MPB fields none, none, 2, 2, 2");
    compare(0, a, "GO TO example");

    // ---- 1c: the backward-branch example (0 I, 1 J, 2 K, 3 L, 4 one, 5 five)
    //   1 I = I + 1   2 J = J + 1   3 K = K + 1   4 IF K < 5 GO TO 2   5 L = L + 1
    a = new(3, 0);
    a.asg(1, 0, 4, 0, OP_ADD);
    a.asg(1, 1, 4, 0, OP_ADD);
    a.asg(1, 2, 4, 0, OP_ADD);
    a.br (16, 2, 5, OP_LT, 1);
    a.asg(1, 3, 4, 0, OP_ADD);
    foreach (vars[k]) vars[k] = '0;
    vars[EP + 4] = 1; vars[EP + 5] = 5;
    load_program(a); load_vars();
    run(0, 5, ok);
    check(ok, "loop example completes");
    check(b_elem[0] == 5 && n_bwd[0] == 4, "loop example: b = 5 after four backward branches");
    compare(0, a, "loop example");

    // ---- 2: chain in front of a fast loop (0 X,1 Y,2 Z,3 W,4 A,5 one,6 five)
    a = new(3, 0);
    a.asg(1, 0, 5, 0, OP_ADD);        // X = X + 1
    a.asg(0, 0, 5, 1, OP_ADD);        // Y = X + 1
    a.asg(0, 1, 5, 2, OP_ADD);        // Z = Y + 1
    a.asg(0, 2, 5, 3, OP_ADD);        // W = Z + 1
    a.asg(1, 4, 5, 0, OP_ADD);        // A = A + 1
    a.br (16, 4, 6, OP_LT, 4);        // IF A < 5 GO TO A = A + 1
    foreach (vars[k]) vars[k] = '0;
    vars[EP + 5] = 1; vars[EP + 6] = 5;
    load_program(a); load_vars();
    run(1, 6, ok);
    check(ok, "chain+loop completes with AE = 2");
    check(n_ae_stall[1] > 0, "chain+loop stalls a branch with AE = 2");
    compare(1, a, "chain+loop AE=2");
    load_vars();
    run(0, 6, ok);
    check(ok, "chain+loop completes at default AE");
    check(n_ae_stall[0] == 0, "no AE stall at default AE length");
    compare(0, a, "chain+loop");

    // ---- 3: random programs
    for (int t = 0; t < 200; t++) begin
      int nl, lim;
      a = new(3, 0);
      nl = 6;
      // vars 0..3 data, 4 counter, 5 const 1, 6 limit
      for (int k = 0; k < nl; k++) begin
        int kind;
        kind = $urandom_range(0, 3);
        if (kind == 1)
          a.asg($urandom_range(0, 2) == 0 ? 7 + $urandom_range(1, 3) : 7,
                $urandom_range(0, 6), $urandom_range(0, 6), 0, op_e'($urandom_range(0, 6)));
        else if (kind == 0 && k < nl - 1)
          a.br($urandom_range(16, 19), $urandom_range(0, 3), $urandom_range(0, 6),
               op_e'($urandom_range(8, 13)), $urandom_range(k + 1, nl));
        else
          a.asg($urandom_range(0, 4), $urandom_range(0, 6), $urandom_range(0, 3),
                $urandom_range(0, 3), op_e'($urandom_range(0, 6)));
      end
      a.asg(1, 4, 5, 0, OP_ADD);                          // counter += 1
      a.br(16, 4, 6, OP_LT, $urandom_range(0, nl));        // loop while counter < limit
      // operand displacements of formats whose result is A or B must not hit
      // the counter or the constants: remap them
      foreach (a.prog[k]) if (k < nl && a.prog[k].dest < 0) begin
        fmt_t f;
        ins_t x;
        int   slot;
        x    = a.prog[k];
        f    = fmt_decode(FMT_W'(x.fmt));
        slot = int'(f.dsel) - 1;
        if (slot >= 0 && slot < 3) x.o[slot] = $urandom_range(0, 3);
        a.prog[k] = x;
      end
      foreach (vars[k]) vars[k] = '0;
      for (int k = 0; k < 4; k++) vars[EP + k] = DATA_W'($urandom_range(0, 20));
      lim = $urandom_range(1, 4);
      vars[EP + 5] = 1; vars[EP + 6] = DATA_W'(lim);
      load_program(a); load_vars();
      run(0, nl + 2, ok);
      compare(0, a, $sformatf("random program %0d", t));
    end

    // ---- 4a: R = (A + B) * C on the stack, repeated, A = R each time
    //   (0 A, 1 B, 2 C, 3 R, 4 counter, 5 one, 6 limit)
    a = new(3, 0);
    a.asg(7, 0, 0, 0, OP_MOVE);        // -AS  push A
    a.asg(7, 1, 0, 0, OP_MOVE);        // -AS  push B
    a.asg(9, 0, 0, 0, OP_ADD);         // UTU  A + B
    a.asg(10, 2, 0, 0, OP_MUL);        // ATT  C * (A + B)
    a.asg(8, 3, 0, 0, OP_MOVE);        // -TA  pop into R
    a.asg(4, 3, 0, 0, OP_MOVE);        // BAA  A = R
    a.asg(1, 4, 5, 0, OP_ADD);         // counter += 1
    a.br (16, 4, 6, OP_LT, 0);
    foreach (vars[k]) vars[k] = '0;
    vars[EP + 0] = 1; vars[EP + 1] = 2; vars[EP + 2] = 3; vars[EP + 5] = 1; vars[EP + 6] = 3;
    load_program(a); load_vars();
    run(0, 8, ok);
    check(ok && stk_depth[0] == 0, "stack expression loop completes with an empty stack");
    compare(0, a, "stack expression loop");

    // ---- 4b: IF X < Y (both stacked) skip; counting loop (0 X, 1 Y, 2 S, 4 counter, 5 one, 6 limit)
    a = new(3, 0);
    a.asg(7, 0, 0, 0, OP_MOVE);        // -AS  push X
    a.asg(7, 1, 0, 0, OP_MOVE);        // -AS  push Y
    a.br (21, 0, 0, OP_LT, 4);         // UT-  IF X < Y GO TO 5
    a.asg(1, 2, 5, 0, OP_ADD);         // S = S + 1
    a.asg(1, 0, 5, 0, OP_ADD);         // X = X + 1
    a.asg(1, 4, 5, 0, OP_ADD);         // counter += 1
    a.br (16, 4, 6, OP_LT, 0);
    foreach (vars[k]) vars[k] = '0;
    vars[EP + 0] = 2; vars[EP + 1] = 4; vars[EP + 5] = 1; vars[EP + 6] = 5;
    load_program(a); load_vars();
    run(0, 7, ok);
    check(ok && stk_depth[0] == 0, "stacked branch loop completes with an empty stack");
    compare(0, a, "stacked branch loop");

    // ---- 4c: pop from an empty stack
    a = new(3, 0);
    a.asg(1, 0, 1, 0, OP_ADD);
    a.asg(8, 2, 0, 0, OP_MOVE);        // -TA with nothing stacked
    load_program(a);
    run(0, 2, ok);
    check(stuck[0] && !done[0] && stk_depth[0] == 0, "stack underflow stops the machine");
    if (stuck[0]) m_stuck++;

    // ---- 5: unknown format
    a = new(3, 0);
    a.asg(31, 0, 0, 0, OP_ADD);
    load_program(a);
    run(0, 1, ok);
    check(load_error[0], "unknown format flagged by the loader");
    if (load_error[0]) m_loaderr++;

    $display("mechanisms: multi-issue=%0d forward=%0d backward=%0d not-taken=%0d virtual=%0d ae-stall=%0d stuck=%0d load-error=%0d serial-match=%0d stack-push-lines=%0d",
             m_multi, m_fwd, m_bwd, m_nottaken, m_virtual, m_stall, m_stuck, m_loaderr, m_match, m_stack);
    check(m_stack > 0, "stack operations occurred");
    check(m_multi > 0, "multi-issue cycles occurred");
    check(m_fwd > 0, "forward branches occurred");
    check(m_bwd > 0, "backward branches occurred");
    check(m_nottaken > 0, "not-taken branches occurred");
    check(m_virtual > 0, "virtual executions occurred");
    check(m_stall > 0, "AE stalls occurred");
    check(m_stuck > 0, "stack stop occurred");
    check(m_loaderr > 0, "load error occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
