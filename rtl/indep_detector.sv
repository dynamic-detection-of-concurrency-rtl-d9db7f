// indep_detector: data dependency and executable independence test for every
// line of the instruction queue, evaluated in parallel each machine cycle.
//
// Two lines i and j are data dependent when one's sink is a source of the
// other or both have the same sink (Bernstein's three conditions, applied
// to explicit contour addresses). Line i may execute its next iteration
// n = c[i]+1 when n <= b and
//   - every dependent line j before it has c[j] >= n     (c[j] >  c[i]),
//   - every dependent line j after it has c[j] >= n-1    (c[j] >= c[i]),
//   - its most previous branch has c[mpb] >= n           (c[mpb] > c[i]).
// The model states these rules for contour operands only. This design adds
// one choice of its own: every reference to the evaluation stack counts as
// a reference to one shared variable. So all lines that use the stack
// depend on each other and run in program order, which is the order the
// stack contents need. Two dependent lines can never both be ready in one
// cycle, so at most one stack operation happens per cycle. `stack_ref` flags
// the lines that use the stack. Purely combinational.
module indep_detector
  import del_pkg::*;
#(
  parameter int DEPTH = QDEPTH
) (
  input  q_line_t           lines [DEPTH],
  input  logic [QIDX_W-1:0] count,
  input  logic [C_W-1:0]    c     [DEPTH],
  input  logic [C_W-1:0]    b,
  output logic [DEPTH-1:0]  ready,
  output logic [DEPTH-1:0]  pending,   // active and c[i] < b
  output logic [DEPTH-1:0]  stack_ref
);
  function automatic logic same_ref(input opref_t x, input opref_t y);
    return x.kind == REF_CONTOUR && y.kind == REF_CONTOUR && x.caddr == y.caddr;
  endfunction

  function automatic logic uses_stack(input q_line_t l);
    return l.sink.kind == REF_STACK || l.src1.kind == REF_STACK || l.src2.kind == REF_STACK;
  endfunction

  // Reading the stack pops it, so two stack users always conflict.
  function automatic logic data_dep(input q_line_t li, input q_line_t lj);
    return (uses_stack(li) && uses_stack(lj)) ||
           same_ref(li.src1, lj.sink) || same_ref(li.src2, lj.sink) ||
           same_ref(li.sink, lj.src1) || same_ref(li.sink, lj.src2) ||
           same_ref(li.sink, lj.sink);
  endfunction

  logic dep [DEPTH][DEPTH];

  always_comb begin
    for (int i = 0; i < DEPTH; i++)
      for (int j = 0; j < DEPTH; j++)
        dep[i][j] = (i != j) && data_dep(lines[i], lines[j]);
  end

  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      logic ok;
      logic active;
      active       = i < int'(count);
      stack_ref[i] = active && uses_stack(lines[i]);
      pending[i]   = active && (c[i] < b);
      ok           = pending[i];
      for (int j = 0; j < DEPTH; j++) begin
        if (j < int'(count) && dep[i][j]) begin
          if (j < i && !(c[j] >  c[i])) ok = 1'b0;
          if (j > i && !(c[j] >= c[i])) ok = 1'b0;
        end
      end
      if (lines[i].mpb_v && int'(lines[i].mpb) < DEPTH)
        if (!(c[lines[i].mpb] > c[i])) ok = 1'b0;
      ready[i] = ok;
    end
  end
endmodule
