// tb_eval_stack: the evaluation stack against a queue model.
// Directed: push three values, read T and U, replace the top two by one
// value (pop 2, push), pop into nothing, and check the depth after each.
// Random: 5000 operations with random pop counts and pushes, comparing top,
// under, depth and the error flag with the model every clock. Overflow and
// underflow must leave the stack unchanged and set the sticky error flag;
// clear must empty the stack and reset the flag.
module tb_eval_stack;
  import del_pkg::*;
  localparam int N   = STK_DEPTH;
  localparam int SPW = $clog2(N + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              clear = 0, op_en = 0, push = 0;
  logic [1:0]        npop = '0;
  logic [DATA_W-1:0] wdata = '0, top, under;
  logic [SPW-1:0]    sp;
  logic              err;

  eval_stack dut (.*);

  int checks = 0, failures = 0;
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

  logic [DATA_W-1:0] m [$];
  bit                m_err;

  task automatic op(int np, bit ps, logic [DATA_W-1:0] v);
    @(negedge clk);
    op_en = 1; npop = 2'(np); push = ps; wdata = v;
    @(negedge clk);
    op_en = 0;
    if (np > m.size() || (ps && m.size() - np >= N)) m_err = 1;
    else begin
      repeat (np) void'(m.pop_back());
      if (ps) m.push_back(v);
    end
  endtask

  task automatic compare(string what);
    #1;
    check(int'(sp) == m.size(), $sformatf("%s: depth %0d expected %0d", what, sp, m.size()));
    check(top   == (m.size() >= 1 ? m[m.size() - 1] : '0), {what, ": top"});
    check(under == (m.size() >= 2 ? m[m.size() - 2] : '0), {what, ": under"});
    check(err == m_err, {what, ": error flag"});
  endtask

  initial begin
    m_err = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    compare("after reset");
    op(0, 1, 16'd7);  compare("push 7");
    op(0, 1, 16'd5);  compare("push 5");
    op(0, 1, 16'd3);  compare("push 3");
    check(top == 3 && under == 5, "T = 3, U = 5");
    op(2, 1, 16'd8);  compare("UTU: replace 5, 3 by 8");
    check(top == 8 && under == 7 && sp == 2, "T = 8, U = 7, depth 2");
    op(1, 1, 16'd9);  compare("ATT: replace the top");
    op(1, 0, 16'd0);  compare("pop");
    op(1, 0, 16'd0);  compare("pop to empty");
    op(1, 0, 16'd0);  compare("underflow");
    check(err && sp == 0, "underflow flagged");
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    m_err = 0; m.delete();
    compare("clear");
    for (int k = 0; k < N; k++) op(0, 1, DATA_W'(k + 100));
    compare("full");
    op(0, 1, 16'd1); compare("overflow");
    check(err && int'(sp) == N, "overflow flagged, stack unchanged");
    op(1, 1, 16'd2); compare("replace the top of a full stack");
    for (int t = 0; t < 5000; t++) begin
      if ($urandom_range(0, 199) == 0) begin
        @(negedge clk); clear = 1; @(negedge clk); clear = 0;
        m_err = 0; m.delete();
        compare("random clear");
      end
      op($urandom_range(0, 2), $urandom_range(0, 3) != 0, DATA_W'($urandom));
      compare($sformatf("random %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
