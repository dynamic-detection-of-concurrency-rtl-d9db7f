// queue_loader: reads one procedure of bit-packed DEL instructions from the
// instruction memory and writes it, exploded, into the instruction queue.
//
// Instruction layout (fields packed LSB first from the instruction's bit
// address, with no alignment):
//   assignment: format(5) opnd1 [opnd2 [opnd3]] operator(4)
//   branch:     format(5) [opnd1 [opnd2]] operator(4) destination(IM bit address)
// The format says how many operand specifications follow (the highest of
// the letters A, B, C it uses); each is `opnd_w` bits, the procedure's
// ceil(log2 V). For each instruction the loader
//   1. reads and decodes the format,
//   2-4. turns the left source, right source and result into queue fields:
//      an explicit operand becomes environment pointer + displacement (a
//      contour address), a stack character becomes the stack code,
//   5. stores the operator,
//   6. stores the destination of a branch,
// and sets the MPB field to the most recent branch before the instruction.
// It reads one field per clock. After the last instruction it resolves, one
// line per clock, each branch destination address to the queue line that
// starts there (or to `count`, one past the end, when none does).
// Interface: pulse `start` with the first instruction's bit address, the
// number of instructions, the environment pointer and the operand width;
// `done` pulses when the queue is complete, `error` stays high after an
// unknown format, an operand width above DISP_MAX or more instructions
// than queue lines.
module queue_loader
  import del_pkg::*;
#(
  parameter int DEPTH = QDEPTH
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [IM_BA_W-1:0] start_addr,
  input  logic [QIDX_W-1:0]  n_instr,
  input  logic [CADDR_W-1:0] env_ptr,
  input  logic [3:0]         opnd_w,
  // instruction memory read ports (word w and w+1)
  output logic [IM_WA_W-1:0] im_raddr0,
  output logic [IM_WA_W-1:0] im_raddr1,
  input  logic [IM_W-1:0]    im_rdata0,
  input  logic [IM_W-1:0]    im_rdata1,
  // instruction queue write ports
  output logic               q_clear,
  output logic               q_we,
  output q_line_t            q_wline,
  output logic               q_pe,
  output logic [QIDX_W-1:0]  q_pidx,
  output logic [QIDX_W-1:0]  q_pdest,
  output logic               busy,
  output logic               done,
  output logic               error
);
  localparam int OFF_W = $clog2(IM_W);

  typedef enum logic [2:0] {S_IDLE, S_FMT, S_OPND, S_OPR, S_DEST, S_WRITE, S_RESOLVE}
    state_e;

  state_e                 state;
  logic [IM_BA_W-1:0]     ptr, istart;
  logic [QIDX_W-1:0]      n_r, idx, r;
  logic [CADDR_W-1:0]     ep_r;
  logic [3:0]             ow_r;
  fmt_t                   fmt;
  logic [DISP_MAX-1:0]    disp [3];
  logic [1:0]             nread;
  op_e                    op_r;
  logic [IM_BA_W-1:0]     dest_r;
  logic                   lb_v;
  logic [QIDX_W-1:0]      lb;
  logic [IM_BA_W-1:0]     starts [DEPTH];
  logic [IM_BA_W-1:0]     bdest  [DEPTH];
  logic [DEPTH-1:0]       isbr;

  // ------------------------------------------------ bit-field extraction
  logic [2*IM_W-1:0] window;
  logic [IM_W-1:0]   field;
  assign im_raddr0 = ptr[IM_BA_W-1:OFF_W];
  assign im_raddr1 = ptr[IM_BA_W-1:OFF_W] + 1'b1;
  assign window    = {im_rdata1, im_rdata0} >> ptr[OFF_W-1:0];
  assign field     = window[IM_W-1:0];

  function automatic logic [IM_W-1:0] low_bits(input logic [IM_W-1:0] v, input int w);
    logic [IM_W-1:0] m;
    m = (w >= IM_W) ? '1 : ((IM_W'(1) << w) - 1'b1);
    return v & m;
  endfunction

  fmt_t fmt_now;
  assign fmt_now = fmt_decode(field[FMT_W-1:0]);

  // ------------------------------------------------ queue line assembly
  function automatic opref_t make_ref(input sel_e s, input logic [CADDR_W-1:0] ep,
                                      input logic [DISP_MAX-1:0] d0,
                                      input logic [DISP_MAX-1:0] d1,
                                      input logic [DISP_MAX-1:0] d2);
    opref_t o;
    o = '0;
    case (s)
      SEL_A: begin o.kind = REF_CONTOUR; o.caddr = ep + CADDR_W'(d0); end
      SEL_B: begin o.kind = REF_CONTOUR; o.caddr = ep + CADDR_W'(d1); end
      SEL_C: begin o.kind = REF_CONTOUR; o.caddr = ep + CADDR_W'(d2); end
      SEL_S: begin o.kind = REF_STACK;   o.stk = 2'd0; end
      SEL_T: begin o.kind = REF_STACK;   o.stk = 2'd1; end
      SEL_U: begin o.kind = REF_STACK;   o.stk = 2'd2; end
      default: o.kind = REF_NONE;
    endcase
    return o;
  endfunction

  always_comb begin
    q_wline           = '0;
    q_wline.start     = istart;
    q_wline.addr      = (istart[OFF_W-1:0] == '0) ? istart[IM_BA_W-1:OFF_W] : '0;
    q_wline.src1      = make_ref(fmt.lsel, ep_r, disp[0], disp[1], disp[2]);
    q_wline.src2      = make_ref(fmt.rsel, ep_r, disp[0], disp[1], disp[2]);
    q_wline.sink      = fmt.is_branch ? '0 : make_ref(fmt.dsel, ep_r, disp[0], disp[1], disp[2]);
    q_wline.is_branch = fmt.is_branch;
    q_wline.sense     = fmt.sense;
    q_wline.op        = op_r;
    q_wline.branch    = fmt.is_branch ? dest_r : '0;
    q_wline.dest_idx  = '0;
    q_wline.mpb_v     = lb_v;
    q_wline.mpb       = lb_v ? lb : '0;
  end

  // Destination resolution for line r.
  logic [QIDX_W-1:0] found;
  always_comb begin
    found = n_r;
    for (int j = DEPTH - 1; j >= 0; j--)
      if (j < int'(n_r) && starts[j] == bdest[r[$clog2(DEPTH)-1:0]]) found = QIDX_W'(j);
  end

  assign busy    = state != S_IDLE;
  assign q_we    = state == S_WRITE;
  assign q_pe    = state == S_RESOLVE && isbr[r[$clog2(DEPTH)-1:0]];
  assign q_pidx  = r;
  assign q_pdest = found;
  assign q_clear = start && state == S_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      ptr <= '0; istart <= '0; n_r <= '0; idx <= '0; r <= '0;
      ep_r <= '0; ow_r <= '0; fmt <= '0; nread <= '0;
      op_r <= OP_MOVE; dest_r <= '0; lb_v <= 1'b0; lb <= '0;
      disp[0] <= '0; disp[1] <= '0; disp[2] <= '0;
      isbr <= '0; done <= 1'b0; error <= 1'b0;
      for (int k = 0; k < DEPTH; k++) begin starts[k] <= '0; bdest[k] <= '0; end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          ptr <= start_addr; n_r <= n_instr; ep_r <= env_ptr; ow_r <= opnd_w;
          idx <= '0; r <= '0; lb_v <= 1'b0; lb <= '0; isbr <= '0; error <= 1'b0;
          if (int'(n_instr) > DEPTH || opnd_w == 0 || int'(opnd_w) > DISP_MAX) error <= 1'b1;
          else if (n_instr == 0) done <= 1'b1;
          else state <= S_FMT;
        end
        S_FMT: begin
          istart <= ptr;
          fmt    <= fmt_now;
          disp[0] <= '0; disp[1] <= '0; disp[2] <= '0;
          nread  <= '0;
          ptr    <= ptr + IM_BA_W'(FMT_W);
          if (!fmt_now.valid) begin
            error <= 1'b1;
            state <= S_IDLE;
          end else state <= (fmt_now.nopnd != 0) ? S_OPND : S_OPR;
        end
        S_OPND: begin
          disp[nread] <= DISP_MAX'(low_bits(field, int'(ow_r)));
          ptr   <= ptr + IM_BA_W'(ow_r);
          nread <= nread + 1'b1;
          if (nread + 1'b1 == fmt.nopnd) state <= S_OPR;
        end
        S_OPR: begin
          op_r  <= op_e'(field[OP_W-1:0]);
          ptr   <= ptr + IM_BA_W'(OP_W);
          state <= fmt.is_branch ? S_DEST : S_WRITE;
        end
        S_DEST: begin
          dest_r <= field[IM_BA_W-1:0];
          ptr    <= ptr + IM_BA_W'(IM_BA_W);
          state  <= S_WRITE;
        end
        S_WRITE: begin
          starts[idx[$clog2(DEPTH)-1:0]] <= istart;
          bdest[idx[$clog2(DEPTH)-1:0]]  <= dest_r;
          isbr[idx[$clog2(DEPTH)-1:0]]   <= fmt.is_branch;
          if (fmt.is_branch) begin lb_v <= 1'b1; lb <= idx; end
          idx <= idx + 1'b1;
          state <= (idx + 1'b1 == n_r) ? S_RESOLVE : S_FMT;
        end
        S_RESOLVE: begin
          r <= r + 1'b1;
          if (r + 1'b1 == n_r) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
