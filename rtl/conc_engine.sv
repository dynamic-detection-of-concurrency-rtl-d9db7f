// conc_engine: the execution algorithm of the concurrent DEL machine.
//
// Once the queue is loaded (`go`), b is set to 1 and every c and AE row to
// zero. Then, once per clock (one machine cycle):
//   1. indep_detector marks every line that is executably independent for
//      its next iteration;
//   2. every such assignment executes: both sources are read from the
//      contour or the evaluation stack, its operator unit forms the result
//      and the sink is written at the clock edge, and its AE bit 0 is set.
//      Lines that use the stack depend on each other, so at most one of
//      them executes per cycle; it alone drives the stack's pop/push port;
//   3. of the independent branches, the one on the lowest line executes:
//      its test is evaluated, and if taken, branch_update's virtual
//      execution marks are merged in (and b may grow). A taken branch whose
//      marks do not fit the AE vector waits (an AE stall);
//   4. exec_state folds the marks into C.
// The task is complete when no active line has c < b (`done`). The engine
// stops early with `stuck` set if the stack reports an overflow or an
// underflow, or if lines are pending but none can execute (the rules
// should make this impossible, so it serves as a safety stop).
// Only one branch can be independent in any cycle: a later branch depends,
// through its MPB chain, on every earlier one finishing the same iteration,
// and b only grows once the last branch of an iteration has run. So one
// branch_update unit suffices; the lowest independent branch is selected
// and an assertion checks that there is never a second one. Per-cycle activity is visible on
// exec_vec (real executions) and skip_vec (lines given a virtual mark);
// the event counters restart at `go`.
module conc_engine
  import del_pkg::*;
#(
  parameter int DEPTH = QDEPTH,
  parameter int AE    = AE_LEN,
  localparam int CAW  = CADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              go,
  input  q_line_t           lines [DEPTH],
  input  logic [QIDX_W-1:0] count,
  // contour ports
  output logic [CAW-1:0]    rd_addr [2*DEPTH],
  input  logic [DATA_W-1:0] rd_data [2*DEPTH],
  output logic              wr_en   [DEPTH],
  output logic [CAW-1:0]    wr_addr [DEPTH],
  output logic [DATA_W-1:0] wr_data [DEPTH],
  // evaluation stack port
  input  logic [DATA_W-1:0] st_top,
  input  logic [DATA_W-1:0] st_under,
  input  logic              st_err,
  output logic              st_en,
  output logic [1:0]        st_npop,
  output logic              st_push,
  output logic [DATA_W-1:0] st_wdata,
  // status
  output logic              running,
  output logic              done,
  output logic              stuck,
  output logic [DEPTH-1:0]  exec_vec,
  output logic [DEPTH-1:0]  skip_vec,
  output logic [C_W-1:0]    c [DEPTH],
  output logic [AE-1:0]     ae [DEPTH],
  output logic [C_W-1:0]    b,
  // event counters
  output logic [31:0]       n_cycles,
  output logic [31:0]       n_exec,
  output logic [31:0]       n_fwd,       // taken forward branches
  output logic [31:0]       n_bwd,       // taken backward branches
  output logic [31:0]       n_nottaken,  // branches not taken
  output logic [31:0]       n_ae_stall,  // taken branches held back by AE length
  output logic [31:0]       n_multi,     // cycles executing more than one line
  output logic [31:0]       n_virtual,   // virtual executions marked by taken branches
  output logic [DEPTH-1:0]  stack_lines  // pending lines that use the evaluation stack
);
  typedef enum logic [1:0] {E_IDLE, E_RUN, E_DONE} estate_e;
  estate_e state;

  logic [DEPTH-1:0]  ready, pending, stack_ref, brdy;
  logic [DATA_W-1:0] d1 [DEPTH], d2 [DEPTH], e [DEPTH];
  logic              sel_v, taken, fits, bu_binc, backward, br_exec;
  logic [QIDX_W-1:0] sel_idx, nskip;
  logic [AE-1:0]     bu_mark [DEPTH];
  logic [AE-1:0]     mark    [DEPTH];
  logic              b_inc;

  assign running     = state == E_RUN;
  assign stack_lines = stack_ref & pending;

  exec_state #(.DEPTH(DEPTH), .AE(AE)) u_state (
    .clk, .rst_n, .init(go && state != E_RUN), .mark, .b_inc, .c, .ae, .b
  );

  indep_detector #(.DEPTH(DEPTH)) u_detect (
    .lines, .count, .c, .b, .ready, .pending, .stack_ref
  );

  // Stack code 1 is T (top), 2 is U (under the top); S is never a source.
  function automatic logic [DATA_W-1:0] operand(input opref_t r, input logic [DATA_W-1:0] cv);
    unique case (r.kind)
      REF_CONTOUR: return cv;
      REF_STACK:   return (r.stk == 2'd2) ? st_under : (r.stk == 2'd1) ? st_top : '0;
      default:     return '0;
    endcase
  endfunction

  // Elements a line pops: the deepest stack source it reads.
  function automatic logic [1:0] pops(input q_line_t l);
    logic [1:0] n;
    n = '0;
    if (l.src1.kind == REF_STACK && l.src1.stk > n) n = l.src1.stk;
    if (l.src2.kind == REF_STACK && l.src2.stk > n) n = l.src2.stk;
    return n;
  endfunction

  for (genvar k = 0; k < DEPTH; k++) begin : g_line
    assign rd_addr[2*k]   = lines[k].src1.caddr;
    assign rd_addr[2*k+1] = lines[k].src2.caddr;
    assign d1[k] = operand(lines[k].src1, rd_data[2*k]);
    assign d2[k] = operand(lines[k].src2, rd_data[2*k+1]);
    del_alu #(.WIDTH(DATA_W)) u_alu (.op(lines[k].op), .d1(d1[k]), .d2(d2[k]), .e(e[k]));
    assign brdy[k] = ready[k] && lines[k].is_branch;
  end

  // Lowest-line independent branch.
  always_comb begin
    sel_v   = 1'b0;
    sel_idx = '0;
    for (int k = DEPTH - 1; k >= 0; k--)
      if (brdy[k]) begin sel_v = 1'b1; sel_idx = QIDX_W'(k); end
  end

  assign taken = sel_v && (e[sel_idx[$clog2(DEPTH)-1:0]][0] == lines[sel_idx[$clog2(DEPTH)-1:0]].sense);

  branch_update #(.DEPTH(DEPTH), .AE(AE)) u_branch (
    .lines, .count, .c, .b, .sel_v(sel_v && running), .sel_idx, .taken,
    .mark(bu_mark), .b_inc(bu_binc), .fits, .backward, .nskip
  );

  always_ff @(posedge clk)
    assert (!(rst_n && running && $countones(brdy) > 1))
      else $error("conc_engine: two branches independent in one cycle");

  // A branch always runs the last activated iteration: c = b - 1 before it.
  always_ff @(posedge clk)
    assert (!(rst_n && br_exec && c[sel_idx[$clog2(DEPTH)-1:0]] != b - 1'b1))
      else $error("conc_engine: branch executes an iteration other than b");

  assign br_exec = running && sel_v && (!taken || fits);
  assign b_inc   = br_exec && bu_binc;

  always_comb begin
    for (int k = 0; k < DEPTH; k++) begin
      exec_vec[k] = running && ready[k] &&
                    (!lines[k].is_branch || (br_exec && int'(sel_idx) == k));
      skip_vec[k] = br_exec && taken && (bu_mark[k] != '0);
      mark[k]     = (exec_vec[k] ? AE'(1) : '0) | ((br_exec && taken) ? bu_mark[k] : '0);
      wr_en[k]    = exec_vec[k] && !lines[k].is_branch && lines[k].sink.kind == REF_CONTOUR;
      wr_addr[k]  = lines[k].sink.caddr;
      wr_data[k]  = e[k];
    end
  end

  // The stack operation of the (single) executing line that uses the stack.
  always_comb begin
    st_en = 1'b0; st_npop = '0; st_push = 1'b0; st_wdata = '0;
    for (int k = 0; k < DEPTH; k++)
      if (exec_vec[k] && stack_ref[k]) begin
        st_en    = 1'b1;
        st_npop  = pops(lines[k]);
        st_push  = !lines[k].is_branch && lines[k].sink.kind == REF_STACK;
        st_wdata = e[k];
      end
  end

  always_ff @(posedge clk)
    assert (!(rst_n && $countones(exec_vec & stack_ref) > 1))
      else $error("conc_engine: two stack operations in one cycle");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= E_IDLE;
      done <= 1'b0; stuck <= 1'b0;
      n_cycles <= '0; n_exec <= '0; n_fwd <= '0; n_bwd <= '0; n_nottaken <= '0;
      n_ae_stall <= '0; n_multi <= '0; n_virtual <= '0;
    end else begin
      unique case (state)
        E_IDLE, E_DONE: if (go) begin
          state <= E_RUN;
          done <= 1'b0; stuck <= 1'b0;
          n_cycles <= '0; n_exec <= '0; n_fwd <= '0; n_bwd <= '0; n_nottaken <= '0;
          n_ae_stall <= '0; n_multi <= '0; n_virtual <= '0;
        end
        E_RUN: begin
          if (st_err) begin
            state <= E_DONE;
            stuck <= 1'b1;
          end else if (pending == '0) begin
            state <= E_DONE;
            done  <= 1'b1;
          end else if (exec_vec == '0) begin
            state <= E_DONE;
            stuck <= 1'b1;
          end else begin
            n_cycles <= n_cycles + 1;
            n_exec   <= n_exec + 32'($countones(exec_vec));
            if ($countones(exec_vec) > 1) n_multi <= n_multi + 1;
            if (br_exec && taken && !backward) n_fwd <= n_fwd + 1;
            if (br_exec && taken &&  backward) n_bwd <= n_bwd + 1;
            if (br_exec && taken) n_virtual <= n_virtual + 32'(nskip);
            if (br_exec && !taken) n_nottaken <= n_nottaken + 1;
            if (sel_v && taken && !fits) n_ae_stall <= n_ae_stall + 1;
          end
        end
        default: state <= E_IDLE;
      endcase
    end
  end
endmodule
