// tb_instr_mem: writes random words to random addresses of the instruction
// memory and reads them back on both read ports against a copy kept in the
// testbench, including word w and w+1 pairs as the loader reads them.
module tb_instr_mem;
  import del_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [IM_WA_W-1:0] waddr = '0, raddr0 = '0, raddr1 = '0;
  logic [IM_W-1:0] wdata = '0, rdata0, rdata1;
  logic [IM_W-1:0] model [IM_DEPTH];
  int checks = 0, failures = 0;

  instr_mem dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < IM_DEPTH; k++) begin
      model[k] = $urandom;
      @(negedge clk); we = 1; waddr = IM_WA_W'(k); wdata = model[k];
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 500; t++) begin
      int a;
      if (t % 3 == 0) begin
        a = $urandom_range(0, IM_DEPTH - 1);
        model[a] = $urandom;
        @(negedge clk); we = 1; waddr = IM_WA_W'(a); wdata = model[a];
        @(negedge clk); we = 0;
      end
      a = $urandom_range(0, IM_DEPTH - 1);
      raddr0 = IM_WA_W'(a); raddr1 = IM_WA_W'(a + 1);
      #1;
      checks++;
      if (rdata0 !== model[a] || rdata1 !== model[(a + 1) % IM_DEPTH]) begin
        failures++;
        $display("FAIL: word %0d read %h/%h expected %h/%h", a, rdata0, rdata1,
                 model[a], model[(a + 1) % IM_DEPTH]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
