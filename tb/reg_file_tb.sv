// reg_file_tb: self-checking testbench for reg_file.
//
// Keeps its own copy of the eight registers, applies random writes, reads and
// immediate passes, and checks the registered read data one clock later,
// including hold when nothing is requested and old-value return when a
// register is read and written at the same edge.
module reg_file_tb;
  import pc_pkg::*;

  logic clk = 1'b0, reset_n = 1'b0;
  logic rd_en, sel_imm, e_store;
  reg_addr_t f_source1, f_source2, e_destination;
  logic [15:0] f_data, e_data, r_source1_data, r_source2_data;
  int checks = 0, failures = 0;

  reg_file dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [15:0] model [8];
  logic [15:0] exp1, exp2;

  initial begin
    rd_en = 0; sel_imm = 0; e_store = 0; f_source1 = 0; f_source2 = 0; e_destination = 0;
    f_data = 0; e_data = 0;
    foreach (model[i]) model[i] = '0;
    exp1 = 0; exp2 = 0;
    repeat (2) @(posedge clk);
    reset_n = 1'b1;
    // read every register after reset: all zero
    for (int r = 0; r < 8; r++) begin
      @(negedge clk); rd_en = 1; f_source1 = 3'(r); f_source2 = 3'(7 - r);
      @(negedge clk); rd_en = 0;
      check(r_source1_data == 0 && r_source2_data == 0, "reset value");
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      rd_en = 1'($urandom); sel_imm = ($urandom_range(3) == 0);
      f_source1 = 3'($urandom); f_source2 = 3'($urandom); f_data = 16'($urandom);
      e_store = 1'($urandom); e_destination = 3'($urandom); e_data = 16'($urandom);
      // expected read data uses the registers before this edge's write
      if (sel_imm) exp1 = f_data;
      else if (rd_en) begin exp1 = model[f_source1]; exp2 = model[f_source2]; end
      if (e_store) model[e_destination] = e_data;
      @(negedge clk);
      rd_en = 0; sel_imm = 0; e_store = 0;
      check(r_source1_data == exp1, "r_source1_data");
      check(r_source2_data == exp2, "r_source2_data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
