// tb_del_machine_full: runs the seven-statement example loop
//     1 I = 0            2 J = 0           3 I = I + 1       4 J = J + 1
//     5 IF J < 2 GO TO 7 6 I = I + 1       7 IF J /= 2 GO TO 4
// through del_machine at its default sizes and checks, cycle by cycle,
// which instructions execute (1,2 | 3,4 | 5 | 7 | 4 | 5 | 6,7), the loaded
// queue fields, the C vector and b after the forward and the backward
// branch, and the final values I = 2, J = 2 with every c = b = 2.
// Branch 7 is encoded as "J = 2, taken when false", so it loops back once.
module tb_del_machine_full;
  import del_pkg::*;
  import del_asm_pkg::*;

  localparam int D = QDEPTH;
  localparam int EP = 8;
  localparam int VI = 0, VJ = 1, K0 = 2, K1 = 3, K2 = 4;  // displacements

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               im_we = 0;
  logic [IM_WA_W-1:0] im_waddr = '0;
  logic [IM_W-1:0]    im_wdata = '0;
  logic               ct_we = 0;
  logic [CADDR_W-1:0] ct_addr = '0;
  logic [DATA_W-1:0]  ct_wdata = '0, ct_rdata;
  logic               start = 0;
  logic [IM_BA_W-1:0] start_addr = '0;
  logic [QIDX_W-1:0]  n_instr = '0;
  logic [CADDR_W-1:0] env_ptr = '0;
  logic [3:0]         opnd_w = '0;
  logic load_busy, load_error, running, done, stuck;
  logic [$clog2(STK_DEPTH+1)-1:0] stk_depth;
  logic [QIDX_W-1:0]  q_count;
  q_line_t            q_lines [D];
  logic [D-1:0]       exec_vec, skip_vec, stack_lines;
  logic [C_W-1:0]     c_vec [D];
  logic [AE_LEN-1:0]  ae_mat [D];
  logic [C_W-1:0]     b_elem;
  logic [31:0] n_cycles, n_exec, n_fwd, n_bwd, n_nottaken, n_ae_stall, n_multi, n_virtual;

  del_machine dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [IM_W-1:0] img [IM_DEPTH];
  del_asm a;
  // expected lines executed in each machine cycle (bit k = statement k+1)
  logic [D-1:0] expect_exec [7] = '{8'b0000_0011, 8'b0000_1100, 8'b0001_0000,
                                    8'b0100_0000, 8'b0000_1000, 8'b0001_0000, 8'b0110_0000};

  function automatic int caddr(int disp); return EP + disp; endfunction

  initial begin
    int cyc;
    a = new(3, 0);
    a.asg(5,  K0, VI, 0, OP_MOVE);   // 1  <-AB> 0 I  MOVE
    a.asg(5,  K0, VJ, 0, OP_MOVE);   // 2  <-AB> 0 J  MOVE
    a.asg(1,  VI, K1, 0, OP_ADD);    // 3  <ABA> I 1  +
    a.asg(1,  VJ, K1, 0, OP_ADD);    // 4  <ABA> J 1  +
    a.br (16, VJ, K2, OP_LT, 6);     // 5  <AB-TRUE>  J 2 < -> 7
    a.asg(1,  VI, K1, 0, OP_ADD);    // 6  <ABA> I 1  +
    a.br (17, VJ, K2, OP_EQ, 3);     // 7  <AB-FALSE> J 2 = -> 4
    foreach (img[k]) img[k] = '0;
    a.image(img);

    repeat (3) @(posedge clk);
    rst_n <= 1;
    foreach (img[k]) begin
      @(posedge clk); im_we <= 1; im_waddr <= IM_WA_W'(k); im_wdata <= img[k];
    end
    @(posedge clk); im_we <= 0;
    for (int v = 0; v < 5; v++) begin
      @(posedge clk); ct_we <= 1; ct_addr <= CADDR_W'(caddr(v));
      ct_wdata <= (v == K1) ? 16'd1 : (v == K2) ? 16'd2 : (v == VI || v == VJ) ? 16'd77 : 16'd0;
    end
    @(posedge clk); ct_we <= 0;

    @(posedge clk);
    start <= 1; start_addr <= '0; n_instr <= 7; env_ptr <= EP; opnd_w <= 3;
    @(posedge clk); start <= 0;
    wait (running);
    @(negedge clk);
    // queue contents against the loading rules
    check(q_count == 7, "queue holds 7 lines");
    check(q_lines[0].sink.caddr == 6'(caddr(VI)) && q_lines[0].src2.caddr == 6'(caddr(K0)) &&
          q_lines[0].src1.kind == REF_NONE && q_lines[0].op == OP_MOVE, "line 1 fields");
    check(q_lines[2].sink.caddr == 6'(caddr(VI)) && q_lines[2].src1.caddr == 6'(caddr(VI)) &&
          q_lines[2].src2.caddr == 6'(caddr(K1)) && q_lines[2].op == OP_ADD, "line 3 fields");
    check(q_lines[4].is_branch && q_lines[4].sink.kind == REF_NONE && q_lines[4].dest_idx == 6 &&
          q_lines[4].branch == IM_BA_W'(a.start_of(6)), "line 5 branch fields");
    check(q_lines[6].is_branch && q_lines[6].dest_idx == 3 && !q_lines[6].sense, "line 7 branch fields");
    for (int k = 0; k < 5; k++) check(!q_lines[k].mpb_v, $sformatf("line %0d has no MPB", k + 1));
    check(q_lines[5].mpb_v && q_lines[5].mpb == 4, "line 6 MPB = 5");
    check(q_lines[6].mpb_v && q_lines[6].mpb == 4, "line 7 MPB = 5");
    check(q_lines[0].addr == 0 && q_lines[1].addr == 0, "unaligned lines have address 0");
    check(b_elem == 1, "b = 1 after loading");

    cyc = 0;
    while (running) begin
      if (cyc < 7)
        check(exec_vec == expect_exec[cyc],
              $sformatf("cycle %0d executes %b, expected %b", cyc + 1, exec_vec, expect_exec[cyc]));
      if (cyc == 2) check(skip_vec == 8'b0010_0000, "cycle 3 skips statement 6");
      if (cyc == 3) check(skip_vec == 8'b0000_0111, "cycle 4 marks statements 1-3 for iteration 2");
      @(negedge clk);
      cyc++;
      if (cyc == 3) begin
        for (int k = 0; k < 6; k++) check(c_vec[k] == 1, $sformatf("after cycle 3: c%0d = 1", k + 1));
        check(c_vec[6] == 0 && b_elem == 1, "after cycle 3: c7 = 0, b = 1");
      end
      if (cyc == 4) begin
        check(b_elem == 2, "after cycle 4: b = 2");
        for (int k = 0; k < 3; k++) check(c_vec[k] == 2, $sformatf("after cycle 4: c%0d = 2", k + 1));
        for (int k = 3; k < 7; k++) check(c_vec[k] == 1, $sformatf("after cycle 4: c%0d = 1", k + 1));
      end
    end
    check(n_cycles == 7, $sformatf("task takes 7 machine cycles (took %0d)", n_cycles));
    check(cyc == 8, "completion seen one clock after the last execution");
    check(done && !stuck, "done without getting stuck");
    check(stk_depth == 0, "evaluation stack unused");
    check(b_elem == 2, "final b = 2");
    for (int k = 0; k < 7; k++) check(c_vec[k] == 2, $sformatf("final c%0d = 2", k + 1));
    check(n_exec == 10, $sformatf("10 real executions (got %0d)", n_exec));
    check(n_fwd == 1 && n_bwd == 1 && n_nottaken == 2, "branch outcome counts");
    @(negedge clk); ct_addr <= CADDR_W'(caddr(VI)); #1;
    check(ct_rdata == 2, $sformatf("I = 2 (got %0d)", ct_rdata));
    ct_addr <= CADDR_W'(caddr(VJ)); #1;
    check(ct_rdata == 2, $sformatf("J = 2 (got %0d)", ct_rdata));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
