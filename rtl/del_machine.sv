// del_machine: a machine that executes a serial DEL program concurrently.
//
// The program is a bit-packed stream of DEL instructions in the instruction
// memory; its variables live in the contour. A `start` pulse makes the
// queue loader explode one procedure (n_instr instructions from bit
// address start_addr, operands relative to env_ptr, opnd_w bits per
// displacement) into the instruction queue, one field per clock. When the
// queue is complete the concurrency engine runs: each clock it executes
// every instruction that is executably independent, applies the virtual
// executions of the branch it takes, and stops when every instruction has
// completed b iterations (`done`), or stops early (`stuck`) on an
// evaluation stack overflow or underflow. The evaluation stack is emptied
// at each `start`.
// The host writes the program through the im_* port and presets and reads
// variables through the ct_* port while the machine is idle.
// Structure (instruction queue with Sink/Src/Branch/MPB/opcode fields,
// execution vector C, AE matrix, b element, independence test, branch
// rules, contour addressing by environment pointer, S/T/U stack references)
// follows the model; memory sizes, widths, encodings, the one-branch-per-
// cycle rule and the program-order rule for stack operations are this
// design's own.
module del_machine
  import del_pkg::*;
#(
  parameter int DEPTH = QDEPTH,  // instruction queue lines
  parameter int AE    = AE_LEN   // advanced execution vector length
) (
  input  logic               clk,
  input  logic               rst_n,
  // program load
  input  logic               im_we,
  input  logic [IM_WA_W-1:0] im_waddr,
  input  logic [IM_W-1:0]    im_wdata,
  // variable access
  input  logic               ct_we,
  input  logic [CADDR_W-1:0] ct_addr,
  input  logic [DATA_W-1:0]  ct_wdata,
  output logic [DATA_W-1:0]  ct_rdata,
  // task control
  input  logic               start,
  input  logic [IM_BA_W-1:0] start_addr,
  input  logic [QIDX_W-1:0]  n_instr,
  input  logic [CADDR_W-1:0] env_ptr,
  input  logic [3:0]         opnd_w,
  output logic               load_busy,
  output logic               load_error,
  output logic               running,
  output logic               done,
  output logic               stuck,
  // observation
  output logic [QIDX_W-1:0]  q_count,
  output q_line_t            q_lines  [DEPTH],
  output logic [DEPTH-1:0]   exec_vec,
  output logic [DEPTH-1:0]   skip_vec,
  output logic [DEPTH-1:0]   stack_lines,
  output logic [C_W-1:0]     c_vec    [DEPTH],
  output logic [AE-1:0]      ae_mat   [DEPTH],
  output logic [C_W-1:0]     b_elem,
  output logic [$clog2(STK_DEPTH+1)-1:0] stk_depth,  // elements on the evaluation stack
  output logic [31:0]        n_cycles,
  output logic [31:0]        n_exec,
  output logic [31:0]        n_fwd,
  output logic [31:0]        n_bwd,
  output logic [31:0]        n_nottaken,
  output logic [31:0]        n_ae_stall,
  output logic [31:0]        n_multi,
  output logic [31:0]        n_virtual
);
  // instruction memory
  logic [IM_WA_W-1:0] im_raddr0, im_raddr1;
  logic [IM_W-1:0]    im_rdata0, im_rdata1;

  instr_mem u_im (
    .clk, .we(im_we), .waddr(im_waddr), .wdata(im_wdata),
    .raddr0(im_raddr0), .rdata0(im_rdata0), .raddr1(im_raddr1), .rdata1(im_rdata1)
  );

  // loader -> queue
  logic              q_clear, q_we, q_pe, load_done;
  q_line_t           q_wline;
  logic [QIDX_W-1:0] q_pidx, q_pdest;
  logic              q_full;

  queue_loader #(.DEPTH(DEPTH)) u_loader (
    .clk, .rst_n, .start, .start_addr, .n_instr, .env_ptr, .opnd_w,
    .im_raddr0, .im_raddr1, .im_rdata0, .im_rdata1,
    .q_clear, .q_we, .q_wline, .q_pe, .q_pidx, .q_pdest,
    .busy(load_busy), .done(load_done), .error(load_error)
  );

  instr_queue #(.DEPTH(DEPTH)) u_queue (
    .clk, .rst_n, .clear(q_clear), .we(q_we), .wline(q_wline),
    .pe(q_pe), .pidx(q_pidx), .pdest(q_pdest),
    .lines(q_lines), .count(q_count), .full(q_full)
  );

  // engine <-> contour
  logic [CADDR_W-1:0] rd_addr [2*DEPTH];
  logic [DATA_W-1:0]  rd_data [2*DEPTH];
  logic               wr_en   [DEPTH];
  logic [CADDR_W-1:0] wr_addr [DEPTH];
  logic [DATA_W-1:0]  wr_data [DEPTH];

  contour #(.NRD(2*DEPTH), .NWR(DEPTH)) u_contour (
    .clk, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data,
    .h_we(ct_we), .h_addr(ct_addr), .h_wdata(ct_wdata), .h_rdata(ct_rdata)
  );

  // engine <-> evaluation stack
  logic              st_en, st_push, st_err;
  logic [1:0]        st_npop;
  logic [DATA_W-1:0] st_wdata, st_top, st_under;
  eval_stack u_stack (
    .clk, .rst_n, .clear(start), .op_en(st_en), .npop(st_npop), .push(st_push),
    .wdata(st_wdata), .top(st_top), .under(st_under), .sp(stk_depth), .err(st_err)
  );

  conc_engine #(.DEPTH(DEPTH), .AE(AE)) u_engine (
    .clk, .rst_n, .go(load_done), .lines(q_lines), .count(q_count),
    .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data,
    .st_top, .st_under, .st_err, .st_en, .st_npop, .st_push, .st_wdata,
    .running, .done, .stuck, .exec_vec, .skip_vec,
    .c(c_vec), .ae(ae_mat), .b(b_elem),
    .n_cycles, .n_exec, .n_fwd, .n_bwd, .n_nottaken, .n_ae_stall,
    .n_multi, .n_virtual, .stack_lines
  );

  // The loader never writes more lines than the queue holds.
  always_ff @(posedge clk)
    assert (!(rst_n && q_we && q_full)) else $error("del_machine: queue overflow");
endmodule
