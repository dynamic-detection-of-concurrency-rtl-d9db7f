// instr_queue: the instruction queue, one exploded DEL instruction per line.
//
// Each line holds the fields of the model's queue line: IM address, Sink,
// Src1, Src2, Branch destination, MPB (most previous branch) and opcode,
// plus the queue index of the branch destination, which the loader fills
// in once the whole procedure is loaded. The execution element c and the
// AE row of each line are kept in exec_state. Every line is visible at
// once to the concurrency engine. Writes are synchronous: `clear` empties
// the queue, `we` writes a whole line at the next free position, `pe`
// patches the destination index of line `pidx`. Clear wins over writes.
module instr_queue
  import del_pkg::*;
#(
  parameter int DEPTH = QDEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              we,
  input  q_line_t           wline,
  input  logic              pe,
  input  logic [QIDX_W-1:0] pidx,
  input  logic [QIDX_W-1:0] pdest,
  output q_line_t           lines [DEPTH],
  output logic [QIDX_W-1:0] count,
  output logic              full
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      for (int k = 0; k < DEPTH; k++) lines[k] <= '0;
    end else if (clear) begin
      count <= '0;
      for (int k = 0; k < DEPTH; k++) lines[k] <= '0;
    end else begin
      if (we && !full) begin
        lines[count] <= wline;
        count        <= count + 1'b1;
      end
      if (pe && int'(pidx) < DEPTH) lines[pidx].dest_idx <= pdest;
    end
  end

  assign full = (int'(count) >= DEPTH);

  always_ff @(posedge clk)
    assert (!(rst_n && !clear && we && full)) else $error("instr_queue: write to a full queue");
endmodule
