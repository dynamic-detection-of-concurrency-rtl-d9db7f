// del_pkg: shared types and constants of the concurrent DEL machine.
//
// A DEL (directly executed language) instruction is a bit-packed record of
// a 5-bit format, one displacement per explicit operand, an operator and,
// for branches, a destination address. The loader explodes each instruction
// into one line of the instruction queue (q_line_t); the concurrency engine
// works only on those lines, the execution vector C, the advanced execution
// matrix AE and the to-be-executed element b.
//
// Widths that the model leaves to the implementation (data word, contour
// size, instruction memory size, counter width, evaluation stack depth,
// operator set, format numbering) are this design's own choices and are
// collected here.
package del_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int DATA_W    = 16;  // contour word
  localparam int C_W       = 16;  // c elements and b
  localparam int CADDR_W   = 6;   // contour address (64 words)
  localparam int DISP_MAX  = 6;   // widest operand displacement field
  localparam int FMT_W     = 5;   // format field: ceil(log2(#formats)) = 5
  localparam int OP_W      = 4;   // operator field: ceil(log2(F)), F <= 16
  localparam int IM_W      = 32;  // instruction memory word
  localparam int IM_DEPTH  = 256; // instruction memory words
  localparam int IM_WA_W   = $clog2(IM_DEPTH);
  localparam int IM_BA_W   = IM_WA_W + $clog2(IM_W); // bit address = full IM address
  localparam int QIDX_W    = 5;   // queue index / count fields (queues up to 31 lines)
  localparam int QDEPTH    = 8;   // default instruction queue lines
  localparam int AE_LEN    = 4;   // default advanced execution vector length
  localparam int STK_DEPTH = 16;  // evaluation stack entries

  // --------------------------------------------------------- format field
  // One selector per format character: where the left source, the right
  // source and the result live.
  typedef enum logic [2:0] {
    SEL_NONE = 3'd0,  // '-' : field not used
    SEL_A    = 3'd1,  // first operand specification
    SEL_B    = 3'd2,  // second operand specification
    SEL_C    = 3'd3,  // third operand specification
    SEL_S    = 3'd4,  // element above the top of the evaluation stack
    SEL_T    = 3'd5,  // top of the evaluation stack
    SEL_U    = 3'd6   // element under the top of the evaluation stack
  } sel_e;

  typedef struct packed {
    logic       valid;
    sel_e       lsel;
    sel_e       rsel;
    sel_e       dsel;
    logic       is_branch;
    logic       sense;    // branch taken when the test evaluates to this value
    logic [1:0] nopnd;    // operand specifications that follow the format
  } fmt_t;

  // Kind of reference held in a Sink/Src field of a queue line.
  typedef enum logic [1:0] {
    REF_NONE    = 2'd0,
    REF_CONTOUR = 2'd1,  // explicit contour address (EP + displacement)
    REF_STACK   = 2'd2   // the special code for an evaluation stack reference
  } ref_kind_e;

  typedef struct packed {
    ref_kind_e          kind;
    logic [1:0]         stk;    // 0: S, 1: T, 2: U (REF_STACK only)
    logic [CADDR_W-1:0] caddr;  // REF_CONTOUR only
  } opref_t;

  // ------------------------------------------------------------ operators
  typedef enum logic [OP_W-1:0] {
    OP_MOVE = 4'd0,   // result := right source
    OP_ADD  = 4'd1,
    OP_SUB  = 4'd2,
    OP_MUL  = 4'd3,
    OP_AND  = 4'd4,
    OP_OR   = 4'd5,
    OP_XOR  = 4'd6,
    OP_NEG  = 4'd7,   // result := -right source
    OP_LT   = 4'd8,   // relational operators give 1 or 0
    OP_LE   = 4'd9,
    OP_EQ   = 4'd10,
    OP_NE   = 4'd11,
    OP_GT   = 4'd12,
    OP_GE   = 4'd13,
    OP_TRUE = 4'd14   // constant 1: unconditional branch test
  } op_e;

  // ---------------------------------------------------- instruction queue
  typedef struct packed {
    logic [IM_WA_W-1:0] addr;      // IM word address, zero when not word aligned
    logic [IM_BA_W-1:0] start;     // full IM bit address of the instruction
    opref_t             sink;
    opref_t             src1;
    opref_t             src2;
    logic [IM_BA_W-1:0] branch;    // destination IM address (branches only)
    logic [QIDX_W-1:0]  dest_idx;  // queue line of the destination (count = past the end)
    logic               mpb_v;     // a most previous branch exists
    logic [QIDX_W-1:0]  mpb;       // queue line of the most previous branch
    logic               is_branch;
    logic               sense;
    op_e                op;
  } q_line_t;

  // Number of operand specifications implied by a selector (A=1, B=2, C=3).
  function automatic logic [1:0] sel_rank(input sel_e s);
    case (s)
      SEL_A:   return 2'd1;
      SEL_B:   return 2'd2;
      SEL_C:   return 2'd3;
      default: return 2'd0;
    endcase
  endfunction

  // ------------------------------------------------------- format numbers
  // Format numbering is this design's own. Codes 0-15 are assignments,
  // 16-23 branches; the rest are invalid.
  function automatic fmt_t fmt_decode(input logic [FMT_W-1:0] code);
    fmt_t f;
    f = '{valid: 1'b1, lsel: SEL_NONE, rsel: SEL_NONE, dsel: SEL_NONE,
          is_branch: 1'b0, sense: 1'b1, nopnd: 2'd0};
    unique case (code)
      5'd0:  begin f.lsel = SEL_A;    f.rsel = SEL_B; f.dsel = SEL_C; end // ABC
      5'd1:  begin f.lsel = SEL_A;    f.rsel = SEL_B; f.dsel = SEL_A; end // ABA
      5'd2:  begin f.lsel = SEL_A;    f.rsel = SEL_B; f.dsel = SEL_B; end // ABB
      5'd3:  begin f.lsel = SEL_A;    f.rsel = SEL_A; f.dsel = SEL_B; end // AAB
      5'd4:  begin f.lsel = SEL_B;    f.rsel = SEL_A; f.dsel = SEL_A; end // BAA
      5'd5:  begin f.lsel = SEL_NONE; f.rsel = SEL_A; f.dsel = SEL_B; end // -AB
      5'd6:  begin f.lsel = SEL_NONE; f.rsel = SEL_A; f.dsel = SEL_A; end // -AA
      5'd7:  begin f.lsel = SEL_NONE; f.rsel = SEL_A; f.dsel = SEL_S; end // -AS (push)
      5'd8:  begin f.lsel = SEL_NONE; f.rsel = SEL_T; f.dsel = SEL_A; end // -TA (pop)
      5'd9:  begin f.lsel = SEL_U;    f.rsel = SEL_T; f.dsel = SEL_U; end // UTU
      5'd10: begin f.lsel = SEL_A;    f.rsel = SEL_T; f.dsel = SEL_T; end // ATT
      5'd16: begin f.lsel = SEL_A; f.rsel = SEL_B; f.is_branch = 1'b1; f.sense = 1'b1; end // AB- TRUE
      5'd17: begin f.lsel = SEL_A; f.rsel = SEL_B; f.is_branch = 1'b1; f.sense = 1'b0; end // AB- FALSE
      5'd18: begin f.lsel = SEL_B; f.rsel = SEL_A; f.is_branch = 1'b1; f.sense = 1'b1; end // BA- TRUE
      5'd19: begin f.lsel = SEL_B; f.rsel = SEL_A; f.is_branch = 1'b1; f.sense = 1'b0; end // BA- FALSE
      5'd20: begin f.is_branch = 1'b1; f.sense = 1'b1; end                                 // --- GO TO
      5'd21: begin f.lsel = SEL_U; f.rsel = SEL_T; f.is_branch = 1'b1; f.sense = 1'b1; end // UT- TRUE
      default: f.valid = 1'b0;
    endcase
    f.nopnd = sel_rank(f.lsel);
    if (sel_rank(f.rsel) > f.nopnd) f.nopnd = sel_rank(f.rsel);
    if (sel_rank(f.dsel) > f.nopnd) f.nopnd = sel_rank(f.dsel);
    return f;
  endfunction


endpackage
