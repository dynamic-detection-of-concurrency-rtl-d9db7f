// tb_conc_engine: the execution algorithm on queues built directly by the
// testbench, with the contour attached.
//   - the example loop: per-cycle execution sets 1,2 | 3,4 | 5 | 7 | 4 | 5 |
//     6,7, statement 6 skipped in cycle 3, b = 2 after cycle 4, final
//     I = J = 2, all c = b = 2, completion flagged;
//   - a chain ahead of a counted loop on an engine with a two-element AE
//     vector: the loop branch must wait (AE stall) and the results must
//     still be X..W = 1..4, A = 5;
//   - a stack program (push X, push Y, X-Y on the stack, pop into Z) beside
//     an independent contour line: the stack lines run one per cycle in
//     program order, the other line runs in the first cycle, Z = X - Y and
//     the stack ends empty;
//   - a pop from an empty stack: the engine stops with `stuck`.
module tb_conc_engine;
  import del_pkg::*;
  localparam int D = QDEPTH;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // two engines (default AE and AE = 2) sharing nothing but the clock
  logic go [2];
  q_line_t lines [2][D];
  logic [QIDX_W-1:0] count [2];
  logic [CADDR_W-1:0] rd_addr [2][2*D];
  logic [DATA_W-1:0] rd_data [2][2*D];
  logic wr_en [2][D];
  logic [CADDR_W-1:0] wr_addr [2][D];
  logic [DATA_W-1:0] wr_data [2][D];
  logic running [2], done [2], stuck [2];
  logic [D-1:0] exec_vec [2], skip_vec [2], stack_lines [2];
  logic [C_W-1:0] c0 [D], c1 [D], b [2];
  logic [AE_LEN-1:0] ae0 [D];
  logic [1:0] ae1 [D];
  logic [31:0] n_cycles [2], n_exec [2], n_fwd [2], n_bwd [2], n_nottaken [2];
  logic [31:0] n_ae_stall [2], n_multi [2], n_virtual [2];
  logic h_we [2];
  logic [CADDR_W-1:0] h_addr [2];
  logic [DATA_W-1:0] h_wdata [2], h_rdata [2];
  logic st_en [2], st_push [2], st_err [2];
  logic [1:0] st_npop [2];
  logic [DATA_W-1:0] st_wdata [2], st_top [2], st_under [2];
  logic [$clog2(STK_DEPTH+1)-1:0] st_sp [2];

  conc_engine dut0 (
    .clk, .rst_n, .go(go[0]), .lines(lines[0]), .count(count[0]),
    .rd_addr(rd_addr[0]), .rd_data(rd_data[0]), .wr_en(wr_en[0]), .wr_addr(wr_addr[0]),
    .wr_data(wr_data[0]), .st_top(st_top[0]), .st_under(st_under[0]), .st_err(st_err[0]),
    .st_en(st_en[0]), .st_npop(st_npop[0]), .st_push(st_push[0]), .st_wdata(st_wdata[0]),
    .running(running[0]), .done(done[0]), .stuck(stuck[0]),
    .exec_vec(exec_vec[0]), .skip_vec(skip_vec[0]), .c(c0), .ae(ae0), .b(b[0]),
    .n_cycles(n_cycles[0]), .n_exec(n_exec[0]), .n_fwd(n_fwd[0]), .n_bwd(n_bwd[0]),
    .n_nottaken(n_nottaken[0]), .n_ae_stall(n_ae_stall[0]), .n_multi(n_multi[0]),
    .n_virtual(n_virtual[0]), .stack_lines(stack_lines[0]));
  conc_engine #(.AE(2)) dut1 (
    .clk, .rst_n, .go(go[1]), .lines(lines[1]), .count(count[1]),
    .rd_addr(rd_addr[1]), .rd_data(rd_data[1]), .wr_en(wr_en[1]), .wr_addr(wr_addr[1]),
    .wr_data(wr_data[1]), .st_top(st_top[1]), .st_under(st_under[1]), .st_err(st_err[1]),
    .st_en(st_en[1]), .st_npop(st_npop[1]), .st_push(st_push[1]), .st_wdata(st_wdata[1]),
    .running(running[1]), .done(done[1]), .stuck(stuck[1]),
    .exec_vec(exec_vec[1]), .skip_vec(skip_vec[1]), .c(c1), .ae(ae1), .b(b[1]),
    .n_cycles(n_cycles[1]), .n_exec(n_exec[1]), .n_fwd(n_fwd[1]), .n_bwd(n_bwd[1]),
    .n_nottaken(n_nottaken[1]), .n_ae_stall(n_ae_stall[1]), .n_multi(n_multi[1]),
    .n_virtual(n_virtual[1]), .stack_lines(stack_lines[1]));
  for (genvar u = 0; u < 2; u++) begin : g_ct
    contour u_ct (.clk, .rd_addr(rd_addr[u]), .rd_data(rd_data[u]), .wr_en(wr_en[u]),
                  .wr_addr(wr_addr[u]), .wr_data(wr_data[u]), .h_we(h_we[u]),
                  .h_addr(h_addr[u]), .h_wdata(h_wdata[u]), .h_rdata(h_rdata[u]));
    eval_stack u_st (.clk, .rst_n, .clear(go[u]), .op_en(st_en[u]), .npop(st_npop[u]),
                     .push(st_push[u]), .wdata(st_wdata[u]), .top(st_top[u]),
                     .under(st_under[u]), .sp(st_sp[u]), .err(st_err[u]));
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic opref_t cref(int a);
    opref_t o;
    o = '0; o.kind = REF_CONTOUR; o.caddr = CADDR_W'(a);
    return o;
  endfunction

  function automatic q_line_t asg(int d, int s1, int s2, op_e op, int mpb);
    q_line_t l;
    l = '0;
    l.sink = cref(d); if (s1 >= 0) l.src1 = cref(s1); l.src2 = cref(s2); l.op = op;
    if (mpb >= 0) begin l.mpb_v = 1; l.mpb = QIDX_W'(mpb); end
    return l;
  endfunction

  function automatic q_line_t br(int s1, int s2, op_e op, bit sense, int dest, int mpb);
    q_line_t l;
    l = '0;
    l.is_branch = 1; l.src1 = cref(s1); l.src2 = cref(s2); l.op = op; l.sense = sense;
    l.dest_idx = QIDX_W'(dest);
    if (mpb >= 0) begin l.mpb_v = 1; l.mpb = QIDX_W'(mpb); end
    return l;
  endfunction

  function automatic opref_t stk(int code);
    opref_t o;
    o = '0; o.kind = REF_STACK; o.stk = 2'(code);
    return o;
  endfunction

  task automatic poke(int u, int a, int v);
    @(negedge clk); h_we[u] = 1; h_addr[u] = CADDR_W'(a); h_wdata[u] = DATA_W'(v);
    @(negedge clk); h_we[u] = 0;
  endtask

  task automatic peek(int u, int a, output int v);
    @(negedge clk); h_addr[u] = CADDR_W'(a); #1; v = int'(h_rdata[u]);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [D-1:0] ex [7] = '{8'b0000_0011, 8'b0000_1100, 8'b0001_0000, 8'b0100_0000,
                             8'b0000_1000, 8'b0001_0000, 8'b0110_0000};
    logic [D-1:0] sx [4] = '{8'b0001_0001, 8'b0000_0010, 8'b0000_0100, 8'b0000_1000};
    int cyc, v;
    for (int u = 0; u < 2; u++) begin
      go[u] = 0; h_we[u] = 0; h_addr[u] = '0; h_wdata[u] = '0; count[u] = '0;
      foreach (lines[u][k]) lines[u][k] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---- example loop: I at 1, J at 2, constants 0, 1, 2 at 3, 4, 5
    poke(0, 3, 0); poke(0, 4, 1); poke(0, 5, 2); poke(0, 1, 9); poke(0, 2, 9);
    lines[0][0] = asg(1, -1, 3, OP_MOVE, -1);
    lines[0][1] = asg(2, -1, 3, OP_MOVE, -1);
    lines[0][2] = asg(1, 1, 4, OP_ADD, -1);
    lines[0][3] = asg(2, 2, 4, OP_ADD, -1);
    lines[0][4] = br(2, 5, OP_LT, 1, 6, -1);
    lines[0][5] = asg(1, 1, 4, OP_ADD, 4);
    lines[0][6] = br(2, 5, OP_EQ, 0, 3, 4);
    count[0] = 7;
    @(negedge clk); go[0] = 1; @(negedge clk); go[0] = 0;
    cyc = 0;
    while (running[0] && cyc < 50) begin
      if (cyc < 7) check(exec_vec[0] == ex[cyc], $sformatf("cycle %0d executes %b", cyc + 1, exec_vec[0]));
      if (cyc == 2) check(skip_vec[0] == 8'b0010_0000, "cycle 3 skips statement 6");
      @(negedge clk); cyc++;
      if (cyc == 4) check(b[0] == 2, "b = 2 after the backward branch");
    end
    check(n_cycles[0] == 7, "7 machine cycles");
    check(done[0] && !stuck[0], "done");
    for (int k = 0; k < 7; k++) check(c0[k] == 2, $sformatf("c%0d = 2", k + 1));
    peek(0, 1, v); check(v == 2, "I = 2");
    peek(0, 2, v); check(v == 2, "J = 2");
    check(n_fwd[0] == 1 && n_bwd[0] == 1 && n_nottaken[0] == 2 && n_multi[0] == 3, "event counts");

    // ---- chain + loop on the AE = 2 engine: X..W at 1..4, A at 5, 1 at 6, 5 at 7
    for (int a = 1; a <= 5; a++) poke(1, a, 0);
    poke(1, 6, 1); poke(1, 7, 5);
    lines[1][0] = asg(1, 1, 6, OP_ADD, -1);
    lines[1][1] = asg(2, 1, 6, OP_ADD, -1);
    lines[1][2] = asg(3, 2, 6, OP_ADD, -1);
    lines[1][3] = asg(4, 3, 6, OP_ADD, -1);
    lines[1][4] = asg(5, 5, 6, OP_ADD, -1);
    lines[1][5] = br(5, 7, OP_LT, 1, 4, -1);
    count[1] = 6;
    @(negedge clk); go[1] = 1; @(negedge clk); go[1] = 0;
    cyc = 0;
    while (running[1] && cyc < 100) begin @(negedge clk); cyc++; end
    check(done[1], "chain+loop done");
    check(n_ae_stall[1] > 0, $sformatf("AE stall occurred (%0d)", n_ae_stall[1]));
    check(n_bwd[1] == 4 && b[1] == 5, "four backward branches, b = 5");
    for (int a = 1; a <= 5; a++) begin
      peek(1, a, v); check(v == a, $sformatf("variable %0d = %0d", a, v));
    end

    // ---- stack program: X at 1 = 7, Y at 2 = 5, Z at 8, V at 9; 1 at 4
    poke(0, 1, 7); poke(0, 2, 5); poke(0, 8, 0); poke(0, 9, 0);
    lines[0][0] = asg(0, -1, 1, OP_MOVE, -1);  // -AS  push X
    lines[0][0].sink = stk(0);
    lines[0][1] = asg(0, -1, 2, OP_MOVE, -1);  // -AS  push Y
    lines[0][1].sink = stk(0);
    lines[0][2] = asg(0, 0, 0, OP_SUB, -1);    // UTU  U - T
    lines[0][2].src1 = stk(2); lines[0][2].src2 = stk(1); lines[0][2].sink = stk(2);
    lines[0][3] = asg(8, -1, 0, OP_MOVE, -1);  // -TA  pop into Z
    lines[0][3].src2 = stk(1);
    lines[0][4] = asg(9, 2, 4, OP_ADD, -1);    // V = Y + 1, independent of the stack
    count[0] = 5;
    @(negedge clk); go[0] = 1; @(negedge clk); go[0] = 0;
    cyc = 0;
    while (running[0] && cyc < 50) begin
      if (cyc < 4) check(exec_vec[0] == sx[cyc], $sformatf("stack cycle %0d executes %b", cyc + 1, exec_vec[0]));
      @(negedge clk); cyc++;
    end
    check(done[0] && !stuck[0] && n_cycles[0] == 4, "stack program done in 4 cycles");
    check(st_sp[0] == 0 && !st_err[0], "stack empty again");
    peek(0, 8, v); check(v == 2, $sformatf("Z = X - Y = 2 (%0d)", v));
    peek(0, 9, v); check(v == 6, "V = 6");

    // ---- pop from an empty stack
    lines[0][0] = asg(1, 1, 4, OP_ADD, -1);
    lines[0][1] = asg(8, -1, 0, OP_MOVE, -1);
    lines[0][1].src2 = stk(1);
    count[0] = 2;
    @(negedge clk); go[0] = 1; @(negedge clk); go[0] = 0;
    cyc = 0;
    while (running[0] && cyc < 50) begin @(negedge clk); cyc++; end
    check(stuck[0] && !done[0] && st_err[0], "stack underflow stops the engine");
    check(c0[0] == 1, "the other line still executed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
