// contour: the memory that holds every scalar variable of the task.
//
// An operand is found by adding its displacement to the environment pointer
// (done once, when the instruction queue is loaded); the resulting contour
// address selects a word here. Because every executably independent
// instruction executes in the same machine cycle, the contour offers two
// asynchronous read ports and one synchronous write port per instruction
// queue line, plus a host port to preset constants and variables and read
// results. The dependency rules guarantee that no two lines write the same
// word, or read a word another line writes, in one cycle; an assertion
// checks the first. Write port k has priority over lower ports; the host
// port is lowest. Port counts, depth and width are this design's choices.
module contour
  import del_pkg::*;
#(
  parameter int DEPTH = 2**CADDR_W,
  parameter int WIDTH = DATA_W,
  parameter int NRD   = 2*QDEPTH,
  parameter int NWR   = QDEPTH,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  // engine ports
  input  logic [AW-1:0]    rd_addr [NRD],
  output logic [WIDTH-1:0] rd_data [NRD],
  input  logic             wr_en   [NWR],
  input  logic [AW-1:0]    wr_addr [NWR],
  input  logic [WIDTH-1:0] wr_data [NWR],
  // host port
  input  logic             h_we,
  input  logic [AW-1:0]    h_addr,
  input  logic [WIDTH-1:0] h_wdata,
  output logic [WIDTH-1:0] h_rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (h_we) mem[h_addr] <= h_wdata;
    for (int k = 0; k < NWR; k++)
      if (wr_en[k]) mem[wr_addr[k]] <= wr_data[k];
  end

  always_comb
    for (int k = 0; k < NRD; k++) rd_data[k] = mem[rd_addr[k]];

  assign h_rdata = mem[h_addr];

  // Output dependencies forbid two writes to one word in the same cycle.
  always_ff @(posedge clk) begin
    for (int a = 0; a < NWR; a++)
      for (int b = a + 1; b < NWR; b++)
        assert (!(wr_en[a] && wr_en[b] && wr_addr[a] == wr_addr[b]))
          else $error("contour: two writes to address %0d in one cycle", wr_addr[a]);
  end
endmodule
