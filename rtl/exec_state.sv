// exec_state: the execution vector C, the advanced execution matrix AE and
// the to-be-executed element b.
//
// c[i] counts the iterations instruction i has completed (really or
// virtually); ae[i] records iterations beyond c[i] that are already done:
// bit k-1 stands for iteration c[i]+k. b is the number of iterations the
// whole task is to run. Each cycle the engine hands in, per line, the AE
// bits to set (its own execution sets bit 0; a branch's virtual execution
// may set any bit) and whether b is to grow by one. The block ORs the
// marks into AE, counts the leading ones k, adds k to c[i] and shifts the
// row k places toward bit 0, filling with zeros, so that bit 0 of every
// stored row is always zero. `init` starts a task: b = 1, all c and AE
// zero. All updates take effect at the next clock edge.
module exec_state
  import del_pkg::*;
#(
  parameter int DEPTH = QDEPTH,
  parameter int AE    = AE_LEN
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           init,
  input  logic [AE-1:0]  mark [DEPTH],
  input  logic           b_inc,
  output logic [C_W-1:0] c    [DEPTH],
  output logic [AE-1:0]  ae   [DEPTH],
  output logic [C_W-1:0] b
);
  logic [AE-1:0]  ae_or   [DEPTH];
  logic [C_W-1:0] lead    [DEPTH];
  logic [AE-1:0]  ae_next [DEPTH];

  // Leading-ones count and normalising shift, one row at a time.
  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      ae_or[i] = ae[i] | mark[i];
      lead[i]  = '0;
      for (int k = 0; k < AE; k++)
        if (ae_or[i][k] && lead[i] == C_W'(k)) lead[i] = C_W'(k + 1);
      ae_next[i] = ae_or[i] >> lead[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b <= C_W'(1);
      for (int i = 0; i < DEPTH; i++) begin
        c[i]  <= '0;
        ae[i] <= '0;
      end
    end else if (init) begin
      b <= C_W'(1);
      for (int i = 0; i < DEPTH; i++) begin
        c[i]  <= '0;
        ae[i] <= '0;
      end
    end else begin
      if (b_inc) b <= b + 1'b1;
      for (int i = 0; i < DEPTH; i++) begin
        c[i]  <= c[i] + lead[i];
        ae[i] <= ae_next[i];
      end
    end
  end
endmodule
