// tb_branch_update: virtual execution marks of taken branches.
// Directed: the forward-branch example (branch on statement 2 to 5 with
// c = 3,2,0,1,0 marks <0,0,1,0> on statement 3 and <0,1,0,0> on 4) and the
// backward-branch example (branch on statement 4 to 2 with b = 5,
// c = 3,3,5,4,4 marks iteration 6 of statement 1, iteration 5 of statement
// 5 and raises b_inc); a branch that is not taken marks nothing; a lag of
// AE iterations clears `fits`. Random: against a model of the rules.
module tb_branch_update;
  import del_pkg::*;
  localparam int D = QDEPTH, A = AE_LEN;
  q_line_t lines [D];
  logic [QIDX_W-1:0] count, sel_idx, nskip;
  logic [C_W-1:0] c [D], b;
  logic sel_v, taken, b_inc, fits, backward;
  logic [A-1:0] mark [D];
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  branch_update dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (lines[k]) lines[k] = '0;
    foreach (c[k]) c[k] = '0;
    // forward example: statements 1..5 on lines 0..4, branch on line 1 to line 4
    count = 5; lines[1].is_branch = 1; lines[1].dest_idx = 4;
    c[0] = 3; c[1] = 2; c[2] = 0; c[3] = 1; c[4] = 0; b = 3;
    sel_v = 1; sel_idx = 1; taken = 1; #1;
    check(mark[2] == 4'b0100 && mark[3] == 4'b0010, "forward: <0,0,1,0> and <0,1,0,0>");
    check(mark[0] == 0 && mark[1] == 0 && mark[4] == 0, "forward: other lines untouched");
    check(!b_inc && !backward && fits && nskip == 2, "forward: no b change, fits, 2 skipped");
    taken = 0; #1;
    check(mark[2] == 0 && mark[3] == 0 && !b_inc && fits && nskip == 0, "not taken: no marks");
    // backward example: branch on line 3 to line 1
    foreach (lines[k]) lines[k] = '0;
    lines[3].is_branch = 1; lines[3].dest_idx = 1;
    c[0] = 3; c[1] = 3; c[2] = 5; c[3] = 4; c[4] = 4; b = 5;
    sel_idx = 3; taken = 1; #1;
    check(mark[0] == 4'b0100, "backward: iteration 6 of statement 1");
    check(mark[4] == 4'b0001, "backward: iteration 5 of statement 5");
    check(mark[1] == 0 && mark[2] == 0 && mark[3] == 0, "backward: loop body untouched");
    check(b_inc && backward && fits, "backward: b grows");
    // lagging line beyond the AE vector
    c[0] = 1; #1;
    check(!fits, "a mark four iterations ahead does not fit");
    sel_v = 0; #1;
    check(!b_inc && fits && mark[0] == 0, "no branch: nothing");
    // random against the rules
    for (int t = 0; t < 5000; t++) begin
      int i, d, n;
      bit mfits;
      logic [A-1:0] m [D];
      count = QIDX_W'($urandom_range(1, D));
      i = $urandom_range(0, int'(count) - 1);
      d = $urandom_range(0, int'(count));
      foreach (lines[k]) lines[k] = '0;
      lines[i].is_branch = 1; lines[i].dest_idx = QIDX_W'(d);
      b = C_W'($urandom_range(1, 8));
      c[i] = b - 1;
      for (int k = 0; k < D; k++) if (k != i) c[k] = C_W'($urandom_range(0, int'(c[i])));
      for (int k = 0; k < d && d <= i; k++) c[k] = C_W'($urandom_range(0, int'(b)));
      sel_v = 1; sel_idx = QIDX_W'(i); taken = $urandom_range(0, 1);
      n = int'(c[i]) + 1;
      mfits = 1;
      for (int k = 0; k < D; k++) begin
        int it;
        m[k] = '0; it = 0;
        if (taken && k < int'(count)) begin
          if (d > i && k > i && k < d) it = n;            // skipped in iteration n
          if (d <= i && k < d)         it = int'(b) + 1;  // done in the new iteration
          if (d <= i && k > i)         it = n;            // runs only after the loop
        end
        if (it != 0) begin
          if (it - int'(c[k]) <= A) m[k][it - int'(c[k]) - 1] = 1'b1;
          else mfits = 0;
        end
      end
      #1;
      check(fits == mfits, $sformatf("random %0d fits", t));
      check(b_inc == (taken && d <= i), $sformatf("random %0d b_inc", t));
      if (mfits) for (int k = 0; k < D; k++) check(mark[k] == m[k], $sformatf("random %0d line %0d", t, k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
