// fetch_unit_tb: self-checking testbench for fetch_unit.
//
// Drives random instruction fields every clock and checks that each appears on
// the f_* outputs one clock later, with the destination field on f_source1 for
// readi. Also checks that reset clears the stage to a nop.
module fetch_unit_tb;
  import pc_pkg::*;

  logic clk = 1'b0, reset_n = 1'b0;
  opcode_e instr, f_instr;
  reg_addr_t source1, source2, destination, f_source1, f_source2, f_destination;
  logic [15:0] data, f_data;
  int checks = 0, failures = 0;

  fetch_unit dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
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

  opcode_e   e_instr;
  reg_addr_t e_s1, e_s2, e_d;
  logic [15:0] e_data;

  initial begin
    instr = OP_READI; source1 = 3'd5; source2 = 3'd6; destination = 3'd7; data = 16'hFFFF;
    repeat (2) @(posedge clk);
    #1;
    check(f_instr == OP_NOP && f_source1 == 0 && f_source2 == 0 && f_destination == 0 && f_data == 0,
          "reset clears stage");
    reset_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      instr = opcode_e'($urandom_range(7)); source1 = 3'($urandom); source2 = 3'($urandom);
      destination = 3'($urandom); data = 16'($urandom);
      e_instr = instr; e_s1 = (instr == OP_READI) ? destination : source1;
      e_s2 = source2; e_d = destination; e_data = data;
      @(negedge clk);  // one clock later
      check(f_instr == e_instr, "f_instr");
      check(f_source1 == e_s1, "f_source1");
      check(f_source2 == e_s2, "f_source2");
      check(f_destination == e_d, "f_destination");
      check(f_data == e_data, "f_data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
