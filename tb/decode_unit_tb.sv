// decode_unit_tb: self-checking testbench for decode_unit.
//
// Drives random fetched fields. Checks the same-clock control lines to the
// register unit against the instruction set (registers are read by move, add,
// sub, mult, readi and cjeq; loadi passes its data word) and checks that the
// fields reach the d_* outputs one clock later.
module decode_unit_tb;
  import pc_pkg::*;

  logic clk = 1'b0, reset_n = 1'b0;
  opcode_e f_instr, d_instr;
  reg_addr_t f_destination, d_destination;
  logic [15:0] f_data, d_data;
  logic rd_en, sel_imm;
  int checks = 0, failures = 0;

  decode_unit dut (.*);

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

  // expected read enable per opcode 000..111: nop move add sub mult loadi readi cjeq
  localparam logic [7:0] RD_TABLE = 8'b1101_1110;

  opcode_e e_instr;
  reg_addr_t e_d;
  logic [15:0] e_data;

  initial begin
    f_instr = OP_ADD; f_destination = 3'd3; f_data = 16'h1234;
    repeat (2) @(posedge clk);
    #1 check(d_instr == OP_NOP && d_destination == 0 && d_data == 0, "reset clears stage");
    reset_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      f_instr = opcode_e'($urandom_range(7)); f_destination = 3'($urandom); f_data = 16'($urandom);
      #1;
      check(rd_en == RD_TABLE[f_instr], "rd_en");
      check(sel_imm == (f_instr == 3'b101), "sel_imm");
      e_instr = f_instr; e_d = f_destination; e_data = f_data;
      @(negedge clk);
      check(d_instr == e_instr && d_destination == e_d && d_data == e_data, "d_* one clock later");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
