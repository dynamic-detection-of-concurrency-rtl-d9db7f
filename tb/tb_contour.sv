// tb_contour: drives the host port and every engine write port with random
// writes to distinct addresses, then reads every read port and the host
// port and compares with a model array; also checks that a word written in
// a cycle reads its old value until the clock edge.
module tb_contour;
  import del_pkg::*;
  localparam int DEPTH = 64, NRD = 2 * QDEPTH, NWR = QDEPTH;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [5:0]  rd_addr [NRD];
  logic [15:0] rd_data [NRD];
  logic        wr_en   [NWR];
  logic [5:0]  wr_addr [NWR];
  logic [15:0] wr_data [NWR];
  logic h_we = 0;
  logic [5:0]  h_addr = '0;
  logic [15:0] h_wdata = '0, h_rdata;
  logic [15:0] model [DEPTH];
  int checks = 0, failures = 0;

  contour dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NWR; k++) begin wr_en[k] = 0; wr_addr[k] = '0; wr_data[k] = '0; end
    for (int k = 0; k < NRD; k++) rd_addr[k] = '0;
    for (int a = 0; a < DEPTH; a++) begin
      model[a] = 16'($urandom);
      @(negedge clk); h_we = 1; h_addr = 6'(a); h_wdata = model[a];
    end
    @(negedge clk); h_we = 0;
    for (int t = 0; t < 300; t++) begin
      bit used [DEPTH];
      int a;
      foreach (used[i]) used[i] = 0;
      @(negedge clk);
      for (int k = 0; k < NWR; k++) begin
        do a = $urandom_range(0, DEPTH - 1); while (used[a]);
        used[a]    = 1;
        wr_en[k]   = $urandom_range(0, 1);
        wr_addr[k] = 6'(a);
        wr_data[k] = 16'($urandom);
      end
      for (int k = 0; k < NRD; k++) rd_addr[k] = 6'($urandom_range(0, DEPTH - 1));
      #1;
      // reads before the edge see the old contents
      for (int k = 0; k < NRD; k++) begin
        checks++;
        if (rd_data[k] !== model[rd_addr[k]]) begin
          failures++;
          $display("FAIL: port %0d addr %0d read %h expected %h", k, rd_addr[k], rd_data[k], model[rd_addr[k]]);
        end
      end
      @(posedge clk);
      for (int k = 0; k < NWR; k++) if (wr_en[k]) model[wr_addr[k]] = wr_data[k];
      @(negedge clk);
      for (int k = 0; k < NWR; k++) wr_en[k] = 0;
      h_addr = 6'($urandom_range(0, DEPTH - 1));
      #1;
      checks++;
      if (h_rdata !== model[h_addr]) begin
        failures++;
        $display("FAIL: host read %0d = %h expected %h", h_addr, h_rdata, model[h_addr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
