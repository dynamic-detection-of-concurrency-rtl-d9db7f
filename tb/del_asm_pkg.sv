// del_asm_pkg: a small DEL assembler for the testbenches.
//
// Instructions are collected with asg() and br(); branch destinations are
// given as instruction numbers (0-based; n = past the last instruction) and
// turned into IM bit addresses once all lengths are known. image() packs
// the program LSB first from bit address `base`, in the layout the queue
// loader expects: format, operand displacements (opnd_w bits each),
// operator, and for branches the destination address.
package del_asm_pkg;
  import del_pkg::*;

  typedef struct {
    int fmt;
    int o [3];
    int op;
    int dest;
  } ins_t;

  class del_asm;
    ins_t prog[$];
    int   ow;
    int   base;

    function new(int opnd_width, int base_bit);
      ow   = opnd_width;
      base = base_bit;
    endfunction

    function void asg(int fmt, int o0, int o1, int o2, op_e op);
      ins_t i;
      i.fmt = fmt; i.o[0] = o0; i.o[1] = o1; i.o[2] = o2; i.op = int'(op); i.dest = -1;
      prog.push_back(i);
    endfunction

    function void br(int fmt, int o0, int o1, op_e op, int dest);
      ins_t i;
      i.fmt = fmt; i.o[0] = o0; i.o[1] = o1; i.o[2] = 0; i.op = int'(op); i.dest = dest;
      prog.push_back(i);
    endfunction

    function int len(int k);
      fmt_t f;
      f = fmt_decode(FMT_W'(prog[k].fmt));
      return FMT_W + int'(f.nopnd) * ow + OP_W + (f.is_branch ? IM_BA_W : 0);
    endfunction

    // Bit address of instruction k (k = size() gives the end address).
    function int start_of(int k);
      int a;
      a = base;
      for (int j = 0; j < k; j++) a += len(j);
      return a;
    endfunction

    function void put(ref logic [IM_W-1:0] mem [IM_DEPTH], ref int p, input int v, input int w);
      for (int b = 0; b < w; b++) begin
        mem[p / IM_W][p % IM_W] = v[b];
        p++;
      end
    endfunction

    function void image(ref logic [IM_W-1:0] mem [IM_DEPTH]);
      int p;
      fmt_t f;
      p = base;
      foreach (prog[k]) begin
        f = fmt_decode(FMT_W'(prog[k].fmt));
        put(mem, p, prog[k].fmt, FMT_W);
        for (int n = 0; n < int'(f.nopnd); n++) put(mem, p, prog[k].o[n], ow);
        put(mem, p, prog[k].op, OP_W);
        if (f.is_branch) put(mem, p, start_of(prog[k].dest), IM_BA_W);
      end
    endfunction

    // Serial reference: runs the program one instruction at a time, the
    // way a conventional machine would, on a copy of the contour and an
    // evaluation stack of STK_DEPTH elements. Stack operands are read as
    // the stack is before the instruction (T top, U under it), the deepest
    // one read is the number of elements popped, and a result with sink
    // S, T or U is pushed. Returns the number of instructions executed, or
    // -1 when the stack would underflow or overflow.
    function automatic int run_serial(ref logic [DATA_W-1:0] mem [64], input int ep,
                                      input int max_steps);
      int pc, steps, sp, npop;
      fmt_t f;
      logic [DATA_W-1:0] d1, d2, e;
      logic [DATA_W-1:0] stk [STK_DEPTH];
      pc = 0; steps = 0; sp = 0;
      while (pc < prog.size() && steps < max_steps) begin
        f  = fmt_decode(FMT_W'(prog[pc].fmt));
        d1 = fetch(mem, ep, stk, sp, pc, f.lsel);
        d2 = fetch(mem, ep, stk, sp, pc, f.rsel);
        npop = 0;
        if (f.lsel == SEL_T || f.rsel == SEL_T) npop = 1;
        if (f.lsel == SEL_U || f.rsel == SEL_U) npop = 2;
        if (npop > sp) return -1;
        sp -= npop;
        e  = ref_op(prog[pc].op, d1, d2);
        steps++;
        if (f.is_branch) begin
          if (e[0] == f.sense) pc = prog[pc].dest;
          else pc++;
        end else begin
          if (f.dsel inside {SEL_S, SEL_T, SEL_U}) begin
            if (sp >= STK_DEPTH) return -1;
            stk[sp] = e;
            sp++;
          end else begin
            mem[ep + prog[pc].o[int'(f.dsel) - 1]] = e;
          end
          pc++;
        end
      end
      return steps;
    endfunction

    function automatic logic [DATA_W-1:0] fetch(ref logic [DATA_W-1:0] mem [64], input int ep,
        ref logic [DATA_W-1:0] stk [STK_DEPTH], input int sp, input int pc, input sel_e sel);
      if (sel inside {SEL_A, SEL_B, SEL_C}) return mem[ep + prog[pc].o[int'(sel) - 1]];
      if (sel == SEL_T && sp >= 1) return stk[sp - 1];
      if (sel == SEL_U && sp >= 2) return stk[sp - 2];
      return '0;
    endfunction
  endclass

  function automatic logic [DATA_W-1:0] ref_op(int op, logic [DATA_W-1:0] x, logic [DATA_W-1:0] y);
    case (op)
      0:  return y;
      1:  return x + y;
      2:  return x - y;
      3:  return x * y;
      4:  return x & y;
      5:  return x | y;
      6:  return x ^ y;
      7:  return -y;
      8:  return {15'd0, $signed(x) <  $signed(y)};
      9:  return {15'd0, $signed(x) <= $signed(y)};
      10: return {15'd0, x == y};
      11: return {15'd0, x != y};
      12: return {15'd0, $signed(x) >  $signed(y)};
      13: return {15'd0, $signed(x) >= $signed(y)};
      14: return 16'd1;
      default: return 16'd0;
    endcase
  endfunction
endpackage
