// tb_del_alu: every operator with corner and random operands, against the
// reference operator function of the testbench assembler package.
module tb_del_alu;
  import del_pkg::*;
  import del_asm_pkg::*;
  op_e op;
  logic [15:0] d1, d2, e;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  del_alu dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] corner [6] = '{16'h0000, 16'h0001, 16'h7fff, 16'h8000, 16'hffff, 16'h0002};
    for (int o = 0; o < 16; o++) begin
      for (int i = 0; i < 6; i++)
        for (int j = 0; j < 6; j++) begin
          op = op_e'(o); d1 = corner[i]; d2 = corner[j]; #1;
          checks++;
          if (e !== ref_op(o, d1, d2)) begin
            failures++;
            $display("FAIL: op %0d %h %h -> %h expected %h", o, d1, d2, e, ref_op(o, d1, d2));
          end
        end
      for (int t = 0; t < 200; t++) begin
        op = op_e'(o); d1 = 16'($urandom); d2 = 16'($urandom); #1;
        checks++;
        if (e !== ref_op(o, d1, d2)) begin
          failures++;
          $display("FAIL: op %0d %h %h -> %h expected %h", o, d1, d2, e, ref_op(o, d1, d2));
        end
      end
    end
    // the example's relational tests
    op = OP_LT; d1 = 1; d2 = 2; #1; checks++; if (e !== 1) failures++;
    op = OP_EQ; d1 = 2; d2 = 2; #1; checks++; if (e !== 1) failures++;
    op = OP_LT; d1 = 16'hffff; d2 = 0; #1; checks++; if (e !== 1) failures++;  // signed
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
