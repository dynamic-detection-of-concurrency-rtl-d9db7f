// tb_instr_queue: fills the queue with random lines, checks every line and
// the count and the full flag, patches destination indexes and checks
// that clear empties it.
module tb_instr_queue;
  import del_pkg::*;
  localparam int D = QDEPTH;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, we = 0, pe = 0;
  q_line_t wline;
  logic [QIDX_W-1:0] pidx = '0, pdest = '0, count;
  q_line_t lines [D];
  logic full;
  q_line_t model [D];
  int checks = 0, failures = 0;

  instr_queue dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic q_line_t rnd_line();
    logic [$bits(q_line_t)-1:0] v;
    for (int k = 0; k < $bits(q_line_t); k += 32) v[k +: 32] = $urandom;
    return q_line_t'(v);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wline = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      int n;
      n = (round % 4 == 0) ? D : $urandom_range(1, D);
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      check(count == 0 && !full, "queue empty after clear");
      for (int k = 0; k < n; k++) begin
        model[k] = rnd_line();
        @(negedge clk); we = 1; wline = model[k];
      end
      @(negedge clk); we = 0;
      check(count == QIDX_W'(n), $sformatf("count = %0d", n));
      check(full == (n == D), "full flag");
      for (int k = 0; k < n; k++) begin
        pidx = QIDX_W'(k); pdest = QIDX_W'($urandom_range(0, D));
        model[k].dest_idx = pdest;
        pe = 1; @(negedge clk); pe = 0;
      end
      for (int k = 0; k < n; k++) check(lines[k] == model[k], $sformatf("line %0d contents", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
