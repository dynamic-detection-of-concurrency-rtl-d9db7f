// branch_update: virtual execution marks produced by a taken branch.
//
// A branch on line i that executes its iteration n = c[i]+1 and is taken
//   - forward (destination line d > i): every line j with i < j < d is
//     skipped in iteration n, by setting AE bit n - c[j] - 1 = c[i] - c[j];
//   - backward (d <= i): b grows by one; every line j < d is marked done in
//     the new iteration b+1 (AE bit b - c[j]); every line j > i is marked
//     done in iteration n (AE bit c[i] - c[j]), so it runs only the last
//     iteration, after the loop. Lines d..i run the new iteration for real.
// A destination past the last line (d = count) is a forward branch out of
// the procedure. A branch that is not taken sets no marks here; its own
// execution mark (AE bit 0) is set by the engine like any assignment's.
// `fits` is low when a mark would fall beyond the AE vector: the engine
// then holds the branch back until the lagging lines have caught up, which
// is how a short AE vector trades concurrency for hardware.
// Purely combinational.
module branch_update
  import del_pkg::*;
#(
  parameter int DEPTH = QDEPTH,
  parameter int AE    = AE_LEN
) (
  input  q_line_t           lines [DEPTH],
  input  logic [QIDX_W-1:0] count,
  input  logic [C_W-1:0]    c     [DEPTH],
  input  logic [C_W-1:0]    b,
  input  logic              sel_v,    // a branch executes this cycle
  input  logic [QIDX_W-1:0] sel_idx,  // its line
  input  logic              taken,
  output logic [AE-1:0]     mark  [DEPTH],
  output logic              b_inc,
  output logic              fits,
  output logic              backward,
  output logic [QIDX_W-1:0] nskip     // lines that receive a mark
);
  always_comb begin
    int i, d;
    logic [C_W-1:0] ci, diff;
    logic hit;
    i        = int'(sel_idx);
    d        = int'(lines[sel_idx[$clog2(DEPTH)-1:0]].dest_idx);
    ci       = c[sel_idx[$clog2(DEPTH)-1:0]];
    backward = sel_v && taken && d <= i;
    b_inc    = backward;
    fits     = 1'b1;
    nskip    = '0;
    for (int j = 0; j < DEPTH; j++) begin
      mark[j] = '0;
      hit     = 1'b0;
      diff    = '0;
      if (sel_v && taken && j < int'(count)) begin
        if (d > i && j > i && j < d) begin
          hit = 1'b1; diff = ci - c[j];
        end else if (d <= i && j < d) begin
          hit = 1'b1; diff = b - c[j];
        end else if (d <= i && j > i) begin
          hit = 1'b1; diff = ci - c[j];
        end
      end
      if (hit) begin
        nskip = nskip + 1'b1;
        if (diff < C_W'(AE)) mark[j][diff[$clog2(AE)-1:0]] = 1'b1;
        else fits = 1'b0;
      end
    end
  end
endmodule
