// eval_stack: the evaluation stack that the S, T and U format characters
// refer to.
//
// T is the element on top of the stack, U the one under it, and S the free
// place above the top. A format names its stack operands by the stack as
// it is before the instruction runs. The stack operands it reads are then
// consumed, and a result that goes to the stack becomes the new top. So an
// operation pops `npop` elements (0, 1 or 2: the deepest stack source it
// reads) and then pushes its result if `push` is set. `-AS` pushes a
// variable, `-TA` pops the top into a variable, and `UTU` replaces the top
// two elements by their combination.
//
// Interface and timing: `top` and `under` are read asynchronously. With
// `op_en` high, the pop and push take effect at the clock edge. At most one
// operation is applied per clock. An operation that would pop more elements
// than the stack holds, or push past DEPTH, is not applied. It sets the
// sticky `err` flag instead, and `clear` resets both the flag and the stack.
// Reset is asynchronous and active low.
//
// The meaning of S, T and U follows the model. The depth, the error rule,
// and the rule that source operands are consumed are this design's own
// choices.
module eval_stack
  import del_pkg::*;
#(
  parameter int DEPTH = STK_DEPTH,
  parameter int WIDTH = DATA_W,
  localparam int SPW  = $clog2(DEPTH + 1),
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             op_en,
  input  logic [1:0]       npop,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] top,
  output logic [WIDTH-1:0] under,
  output logic [SPW-1:0]   sp,      // number of elements on the stack
  output logic             err
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic             bad;
  logic [SPW:0]     base;            // depth after the pops
  logic [SPW-1:0]   t_pos, u_pos;

  assign base  = (SPW+1)'(sp) - (SPW+1)'(npop);
  assign bad   = op_en && ((SPW+1)'(npop) > (SPW+1)'(sp) ||
                           (push && base >= (SPW+1)'(DEPTH)));
  assign t_pos = sp - SPW'(1);
  assign u_pos = sp - SPW'(2);
  assign top   = (sp >= SPW'(1)) ? mem[t_pos[AW-1:0]] : '0;
  assign under = (sp >= SPW'(2)) ? mem[u_pos[AW-1:0]] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp  <= '0;
      err <= 1'b0;
    end else if (clear) begin
      sp  <= '0;
      err <= 1'b0;
    end else if (bad) begin
      err <= 1'b1;
    end else if (op_en) begin
      sp <= SPW'(base) + SPW'(push);
    end
  end

  always_ff @(posedge clk)
    if (!clear && op_en && !bad && push) mem[base[AW-1:0]] <= wdata;
endmodule
