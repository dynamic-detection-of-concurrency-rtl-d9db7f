// tb_indep_detector: the executable independence test.
// Directed: the example loop's queue with the C vector and b of each of its
// machine cycles must report exactly the instructions that execute in that
// cycle (1,2 | 3,4 | 5 | 7 | 4 | 5 | 6,7). Random: queues over a four-word
// contour (so dependencies are common), random c, b and MPB fields, against
// a model that builds the source and sink sets and applies the rule
// "earlier dependents have c >= n, later ones c >= n-1, MPB c >= n", where
// any two lines that use the evaluation stack count as dependent.
module tb_indep_detector;
  import del_pkg::*;
  localparam int D = QDEPTH;
  q_line_t lines [D];
  logic [QIDX_W-1:0] count;
  logic [C_W-1:0] c [D], b;
  logic [D-1:0] ready, pending, stack_ref;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  indep_detector dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic opref_t cref(int a);
    opref_t o;
    o = '0; o.kind = REF_CONTOUR; o.caddr = CADDR_W'(a);
    return o;
  endfunction

  function automatic bit in_set(opref_t r, opref_t s0, opref_t s1);
    return r.kind == REF_CONTOUR &&
           ((s0.kind == REF_CONTOUR && s0.caddr == r.caddr) ||
            (s1.kind == REF_CONTOUR && s1.caddr == r.caddr));
  endfunction

  function automatic bit uses_stack(q_line_t l);
    return l.sink.kind == REF_STACK || l.src1.kind == REF_STACK || l.src2.kind == REF_STACK;
  endfunction

  function automatic logic [D-1:0] model();
    logic [D-1:0] r;
    for (int i = 0; i < D; i++) begin
      int n;
      bit ok;
      n  = int'(c[i]) + 1;
      ok = i < int'(count) && n <= int'(b);
      for (int j = 0; j < int'(count); j++) begin
        bit dep;
        if (j == i) continue;
        dep = in_set(lines[j].sink, lines[i].src1, lines[i].src2) ||     // D_i & E_j
              in_set(lines[i].sink, lines[j].src1, lines[j].src2) ||     // E_i & D_j
              in_set(lines[i].sink, lines[j].sink, '0) ||                // E_i & E_j
              (uses_stack(lines[i]) && uses_stack(lines[j]));            // shared stack
        if (dep && j < i && int'(c[j]) < n)     ok = 0;
        if (dep && j > i && int'(c[j]) < n - 1) ok = 0;
      end
      if (lines[i].mpb_v && int'(c[lines[i].mpb]) < n) ok = 0;
      r[i] = ok;
    end
    return r;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // example loop: I = 1, J = 2, constants 0/1/2 at 3/4/5
    int cs [7][7] = '{'{0,0,0,0,0,0,0}, '{1,1,0,0,0,0,0}, '{1,1,1,1,0,0,0},
                      '{1,1,1,1,1,1,0}, '{2,2,2,1,1,1,1}, '{2,2,2,2,1,1,1},
                      '{2,2,2,2,2,1,1}};
    int bs [7] = '{1, 1, 1, 1, 2, 2, 2};
    logic [6:0] ex [7] = '{7'b0000011, 7'b0001100, 7'b0010000, 7'b1000000,
                           7'b0001000, 7'b0010000, 7'b1100000};
    foreach (lines[k]) lines[k] = '0;
    lines[0].sink = cref(1); lines[0].src2 = cref(3);
    lines[1].sink = cref(2); lines[1].src2 = cref(3);
    lines[2].sink = cref(1); lines[2].src1 = cref(1); lines[2].src2 = cref(4);
    lines[3].sink = cref(2); lines[3].src1 = cref(2); lines[3].src2 = cref(4);
    lines[4].is_branch = 1;  lines[4].src1 = cref(2); lines[4].src2 = cref(5);
    lines[5].sink = cref(1); lines[5].src1 = cref(1); lines[5].src2 = cref(4);
    lines[5].mpb_v = 1; lines[5].mpb = 4;
    lines[6].is_branch = 1;  lines[6].src1 = cref(2); lines[6].src2 = cref(5);
    lines[6].mpb_v = 1; lines[6].mpb = 4;
    count = 7;
    for (int cy = 0; cy < 7; cy++) begin
      for (int k = 0; k < D; k++) c[k] = (k < 7) ? C_W'(cs[cy][k]) : '0;
      b = C_W'(bs[cy]);
      #1;
      check(ready[6:0] == ex[cy], $sformatf("example cycle %0d: ready %b expected %b", cy + 1, ready[6:0], ex[cy]));
    end
    // random queues
    for (int t = 0; t < 5000; t++) begin
      count = QIDX_W'($urandom_range(1, D));
      foreach (lines[k]) begin
        lines[k] = '0;
        lines[k].src1 = cref($urandom_range(0, 3));
        lines[k].src2 = cref($urandom_range(0, 3));
        if ($urandom_range(0, 3) == 0) lines[k].src2.kind = REF_NONE;
        if ($urandom_range(0, 4) == 0) begin
          lines[k].is_branch = 1;
        end else begin
          lines[k].sink = cref($urandom_range(0, 3));
        end
        if ($urandom_range(0, 7) == 0) lines[k].src1.kind = REF_STACK;
        if ($urandom_range(0, 7) == 0 && !lines[k].is_branch) lines[k].sink.kind = REF_STACK;
        if (k > 0 && $urandom_range(0, 1)) begin
          lines[k].mpb_v = 1; lines[k].mpb = QIDX_W'($urandom_range(0, k - 1));
        end
        c[k] = C_W'($urandom_range(0, 4));
      end
      b = C_W'($urandom_range(1, 5));
      #1;
      check(ready == model(), $sformatf("random %0d: ready %b expected %b", t, ready, model()));
      for (int k = 0; k < D; k++)
        check(pending[k] == (k < int'(count) && c[k] < b), "pending flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
