// tb_exec_state: the update rule of the execution vector and AE matrix.
// Directed cases: c = 5, ae = <0,1,0,0> plus an execution gives c = 7,
// ae = 0; with a six-element AE vector, c = n, ae = <0,1,1,1,0,1> plus an
// execution gives c = n + 4, ae = <0,1,0,0,0,0>; b grows on b_inc and init
// restores b = 1, c = 0, ae = 0. Then random marks against a model that
// sets bits and shifts out leading ones one at a time.
module tb_exec_state;
  import del_pkg::*;
  localparam int D = QDEPTH;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init = 0, b_inc = 0, b_inc6 = 0;
  logic [3:0] mark [D];
  logic [5:0] mark6 [D];
  logic [15:0] c [D], c6 [D], b, b6;
  logic [3:0] ae [D];
  logic [5:0] ae6 [D];
  int checks = 0, failures = 0;
  int mc [D];
  logic [3:0] mae [D];
  int mb;

  exec_state dut (.clk, .rst_n, .init, .mark, .b_inc, .c, .ae, .b);
  exec_state #(.AE(6)) dut6 (.clk, .rst_n, .init, .mark(mark6), .b_inc(b_inc6), .c(c6), .ae(ae6), .b(b6));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic clear_marks();
    for (int i = 0; i < D; i++) begin mark[i] = '0; mark6[i] = '0; end
    b_inc = 0; b_inc6 = 0;
  endtask

  task automatic step();
    @(posedge clk); #1; clear_marks();
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear_marks();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(b == 1 && c[0] == 0 && ae[0] == 0, "reset state b = 1, c = 0, ae = 0");
    // line 2: reach c = 5 by five executions
    repeat (5) begin mark[2] = 4'b0001; step(); end
    check(c[2] == 5 && ae[2] == 0, "five executions give c = 5");
    mark[2] = 4'b0010; step();                     // iteration 7 done in advance
    check(c[2] == 5 && ae[2] == 4'b0010, "ae = <0,1,0,0>");
    mark[2] = 4'b0001; step();                     // execution of iteration 6
    check(c[2] == 7 && ae[2] == 0, "figure-9 update: c = 7, ae = 0");
    // six-element example on line 1 of dut6
    repeat (3) begin mark6[1] = 6'b000001; step(); end
    mark6[1] = 6'b101110; step();
    check(c6[1] == 3 && ae6[1] == 6'b101110, "ae = <0,1,1,1,0,1>");
    mark6[1] = 6'b000001; step();
    check(c6[1] == 7 && ae6[1] == 6'b000010, "c = n + 4, ae = <0,1,0,0,0,0>");
    // b element
    b_inc = 1; b_inc6 = 1; step();
    b_inc = 1; step();
    check(b == 3 && b6 == 2, "b grows by one per b_inc");
    init = 1; @(posedge clk); #1 init = 0;
    check(b == 1 && c[2] == 0 && ae[2] == 0 && c6[1] == 0, "init restores b = 1, c = 0, ae = 0");
    // random marks against a model
    mb = 1;
    for (int i = 0; i < D; i++) begin mc[i] = 0; mae[i] = '0; end
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < D; i++) mark[i] = ($urandom_range(0, 2) == 0) ? 4'($urandom) : 4'b0;
      b_inc = $urandom_range(0, 1);
      for (int i = 0; i < D; i++) begin
        mae[i] |= mark[i];
        while (mae[i][0]) begin mae[i] = mae[i] >> 1; mc[i]++; end
      end
      if (b_inc) mb++;
      step();
      for (int i = 0; i < D; i++)
        check(c[i] == 16'(mc[i]) && ae[i] == mae[i], $sformatf("random step %0d line %0d", t, i));
      check(b == 16'(mb), "random b");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
