// data_mem_tb: self-checking testbench for data_mem.
//
// Writes random operand words to every address, reads them back at random
// addresses and checks every field, then overwrites some and checks again.
module data_mem_tb;
  import pc_pkg::*;

  localparam int unsigned AW = 8;
  logic clk = 1'b0;
  logic [AW-1:0] addr, prog_addr;
  logic prog_we;
  reg_addr_t prog_source1, prog_source2, prog_destination, source1, source2, destination;
  logic [15:0] prog_data, data;
  int checks = 0, failures = 0;

  data_mem dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t addr=%0d", what, $time, addr);
    end
  endtask

  logic [24:0] model [2**AW];

  task automatic write_word(input int a);
    @(negedge clk);
    prog_we = 1; prog_addr = AW'(a);
    prog_source1 = 3'($urandom); prog_source2 = 3'($urandom);
    prog_destination = 3'($urandom); prog_data = 16'($urandom);
    model[a] = {prog_source1, prog_source2, prog_destination, prog_data};
  endtask

  initial begin
    prog_we = 0; addr = 0;
    for (int a = 0; a < 2**AW; a++) write_word(a);
    @(negedge clk) prog_we = 0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < 600; i++) begin
        @(negedge clk);
        addr = AW'($urandom);
        #1 check({source1, source2, destination, data} == model[addr], "operand word");
      end
      for (int i = 0; i < 100; i++) write_word($urandom_range(2**AW - 1));
      @(negedge clk) prog_we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
