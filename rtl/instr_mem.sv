// instr_mem: instruction memory (IM) holding the bit-packed DEL program.
//
// DEL instructions are packed back to back with no regard to word
// boundaries, so a field may straddle two words. The memory therefore has
// two asynchronous read ports; the loader reads word w on one and word w+1
// on the other and extracts any field of up to IM_W bits from the pair.
// One synchronous write port loads the program from outside.
// The memory itself is only named by the model; word width, depth and
// port arrangement are this design's own choices.
module instr_mem
  import del_pkg::*;
#(
  parameter int WORD_W = IM_W,
  parameter int DEPTH  = IM_DEPTH,
  localparam int AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [WORD_W-1:0] wdata,
  input  logic [AW-1:0]     raddr0,
  output logic [WORD_W-1:0] rdata0,
  input  logic [AW-1:0]     raddr1,
  output logic [WORD_W-1:0] rdata1
);
  logic [WORD_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata0 = mem[raddr0];
  assign rdata1 = mem[raddr1];
endmodule
