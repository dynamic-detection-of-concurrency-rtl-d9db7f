// tb_queue_loader: loads programs from the instruction memory and checks
// every queue line the loader writes.
// Directed: the seven-statement example loop (MPB fields none,none,none,
// none,none,5,5; destinations statement 7 and 4). Random: 300 programs of
// random valid formats (contour, stack and unconditional forms), random
// displacements, operand widths 1..6, start addresses and environment
// pointers; the expected line is built from the assembler's own record of
// each instruction. Errors: an unknown format and too many instructions.
module tb_queue_loader;
  import del_pkg::*;
  import del_asm_pkg::*;
  localparam int D = QDEPTH;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0;
  logic [IM_BA_W-1:0] start_addr = '0;
  logic [QIDX_W-1:0] n_instr = '0;
  logic [CADDR_W-1:0] env_ptr = '0;
  logic [3:0] opnd_w = '0;
  logic [IM_WA_W-1:0] im_raddr0, im_raddr1;
  logic [IM_W-1:0] im_rdata0, im_rdata1;
  logic q_clear, q_we, q_pe, busy, done, error;
  q_line_t q_wline;
  logic [QIDX_W-1:0] q_pidx, q_pdest;
  logic im_we = 0;
  logic [IM_WA_W-1:0] im_waddr = '0;
  logic [IM_W-1:0] im_wdata = '0;

  instr_mem u_im (.clk, .we(im_we), .waddr(im_waddr), .wdata(im_wdata),
                  .raddr0(im_raddr0), .rdata0(im_rdata0), .raddr1(im_raddr1), .rdata1(im_rdata1));
  queue_loader dut (.*);

  // capture of what the loader writes
  q_line_t got [D];
  int nwr;
  always @(posedge clk) begin
    if (q_clear) nwr <= 0;
    if (q_we) begin got[nwr] <= q_wline; nwr <= nwr + 1; end
    if (q_pe) got[q_pidx].dest_idx <= q_pdest;
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [IM_W-1:0] img [IM_DEPTH];

  task automatic load(del_asm a, int n, int ep, output bit err);
    foreach (img[k]) img[k] = '0;
    a.image(img);
    for (int k = 0; k < 32; k++) begin
      @(negedge clk); im_we = 1; im_waddr = IM_WA_W'(k); im_wdata = img[k];
    end
    @(negedge clk); im_we = 0;
    start = 1; start_addr = IM_BA_W'(a.base); n_instr = QIDX_W'(n);
    env_ptr = CADDR_W'(ep); opnd_w = 4'(a.ow);
    @(negedge clk); start = 0;
    while (busy) @(negedge clk);
    err = error;
  endtask

  function automatic opref_t exp_ref(sel_e s, ins_t x, int ep);
    opref_t o;
    o = '0;
    case (s)
      SEL_A, SEL_B, SEL_C: begin
        o.kind = REF_CONTOUR; o.caddr = CADDR_W'(ep + x.o[int'(s) - 1]);
      end
      SEL_S: begin o.kind = REF_STACK; o.stk = 0; end
      SEL_T: begin o.kind = REF_STACK; o.stk = 1; end
      SEL_U: begin o.kind = REF_STACK; o.stk = 2; end
      default: ;
    endcase
    return o;
  endfunction

  task automatic verify(del_asm a, int ep, string name);
    int last_br;
    last_br = -1;
    check(nwr == a.prog.size(), {name, ": line count"});
    foreach (a.prog[k]) begin
      fmt_t f;
      q_line_t e;
      int st;
      f  = fmt_decode(FMT_W'(a.prog[k].fmt));
      st = a.start_of(k);
      e  = '0;
      e.start = IM_BA_W'(st);
      e.addr  = (st % IM_W == 0) ? IM_WA_W'(st / IM_W) : '0;
      e.src1  = exp_ref(f.lsel, a.prog[k], ep);
      e.src2  = exp_ref(f.rsel, a.prog[k], ep);
      e.sink  = f.is_branch ? '0 : exp_ref(f.dsel, a.prog[k], ep);
      e.is_branch = f.is_branch;
      e.sense = f.sense;
      e.op    = op_e'(a.prog[k].op);
      e.branch = f.is_branch ? IM_BA_W'(a.start_of(a.prog[k].dest)) : '0;
      e.dest_idx = f.is_branch ? QIDX_W'(a.prog[k].dest) : '0;
      e.mpb_v = last_br >= 0;
      e.mpb   = last_br >= 0 ? QIDX_W'(last_br) : '0;
      if (f.is_branch) last_br = k;
      check(got[k] == e, $sformatf("%s: line %0d", name, k));
      if (got[k] != e) $display("  got %p\n  exp %p", got[k], e);
    end
  endtask

  initial begin
    del_asm a;
    bit err;
    int fmts [17] = '{0,1,2,3,4,5,6,7,8,9,10,16,17,18,19,20,21};
    repeat (2) @(posedge clk);
    rst_n = 1;
    // example loop
    a = new(3, 0);
    a.asg(5, 2, 0, 0, OP_MOVE);
    a.asg(5, 2, 1, 0, OP_MOVE);
    a.asg(1, 0, 3, 0, OP_ADD);
    a.asg(1, 1, 3, 0, OP_ADD);
    a.br (16, 1, 4, OP_LT, 6);
    a.asg(1, 0, 3, 0, OP_ADD);
    a.br (17, 1, 4, OP_EQ, 3);
    load(a, 7, 8, err);
    check(!err, "example: no error");
    verify(a, 8, "example");
    check(got[5].mpb_v && got[5].mpb == 4 && got[6].mpb == 4 && !got[4].mpb_v, "example: MPB 5 for 6 and 7");
    check(got[4].dest_idx == 6 && got[6].dest_idx == 3, "example: destinations 7 and 4");
    check(got[0].sink.caddr == 8 && got[0].src2.caddr == 10, "example: I := 0 addresses EP+0, EP+2");
    // random programs
    for (int t = 0; t < 300; t++) begin
      int n, ow, ep, base;
      n    = $urandom_range(1, D);
      ow   = $urandom_range(1, DISP_MAX);
      ep   = $urandom_range(0, 63);
      base = (t % 3 == 0) ? IM_W * $urandom_range(0, 3) : $urandom_range(0, 200);
      a = new(ow, base);
      for (int k = 0; k < n; k++) begin
        int f;
        f = fmts[$urandom_range(0, 16)];
        if (fmt_decode(FMT_W'(f)).is_branch)
          a.br(f, $urandom_range(0, (1 << ow) - 1), $urandom_range(0, (1 << ow) - 1),
               op_e'($urandom_range(8, 13)), $urandom_range(0, n));
        else
          a.asg(f, $urandom_range(0, (1 << ow) - 1), $urandom_range(0, (1 << ow) - 1),
                $urandom_range(0, (1 << ow) - 1), op_e'($urandom_range(0, 14)));
      end
      // operand fields a format does not use are not stored: clear them
      foreach (a.prog[k]) begin
        ins_t x;
        x = a.prog[k];
        for (int m = int'(fmt_decode(FMT_W'(x.fmt)).nopnd); m < 3; m++) x.o[m] = 0;
        a.prog[k] = x;
      end
      load(a, n, ep, err);
      check(!err, $sformatf("random %0d: no error", t));
      verify(a, ep, $sformatf("random %0d", t));
    end
    // unknown format
    a = new(3, 0);
    a.asg(0, 1, 2, 3, OP_ADD);
    a.asg(25, 1, 2, 3, OP_ADD);
    load(a, 2, 0, err);
    check(err, "unknown format reported");
    // more instructions than lines
    a = new(3, 0);
    for (int k = 0; k <= D; k++) a.asg(0, 1, 2, 3, OP_ADD);
    @(negedge clk);
    start = 1; n_instr = QIDX_W'(D + 1); opnd_w = 3;
    @(negedge clk); start = 0;
    check(error && !busy, "too many instructions reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
