// execute_unit_tb: self-checking testbench for execute_unit.
//
// Applies random opcodes and operands (with many equal pairs so cjeq is taken
// often) and checks, one clock later, the write-back triple, the jump pulse and
// the 32-bit result against values computed here from the instruction set.
module execute_unit_tb;
  import pc_pkg::*;

  logic clk = 1'b0, reset_n = 1'b0;
  opcode_e d_instr;
  reg_addr_t d_destination, e_destination;
  logic [15:0] d_data, r_source1_data, r_source2_data, e_data;
  logic jump, e_store;
  logic [31:0] result;
  int checks = 0, failures = 0;
  int n_op [8];
  int n_taken = 0;

  execute_unit dut (.*);

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
      $display("FAIL %s at %0t op=%0d", what, $time, d_instr);
    end
  endtask

  logic [31:0] exp_result;
  logic [15:0] exp_data;
  logic        exp_store, exp_jump;
  reg_addr_t   exp_dest;
  logic [31:0] a32, b32;

  initial begin
    d_instr = OP_MULT; d_destination = 3'd2; d_data = 16'h1; r_source1_data = 16'h3; r_source2_data = 16'h4;
    foreach (n_op[i]) n_op[i] = 0;
    repeat (2) @(posedge clk);
    #1 check(result == 0 && !jump && !e_store, "reset clears outputs");
    reset_n = 1'b1;
    exp_result = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      d_instr = opcode_e'($urandom_range(7)); d_destination = 3'($urandom); d_data = 16'($urandom);
      r_source1_data = 16'($urandom);
      r_source2_data = ($urandom_range(2) == 0) ? r_source1_data : 16'($urandom);
      a32 = {16'd0, r_source1_data}; b32 = {16'd0, r_source2_data};
      exp_jump = 0; exp_store = 1; exp_dest = d_destination;
      case (d_instr)
        OP_NOP:   begin exp_store = 0; end
        OP_MOVE:  begin exp_data = r_source1_data; exp_result = a32; end
        OP_ADD:   begin exp_data = 16'(a32 + b32); exp_result = {16'd0, exp_data}; end
        OP_SUB:   begin exp_data = 16'(a32 - b32); exp_result = {16'd0, exp_data}; end
        OP_MULT:  begin exp_result = a32 * b32; exp_data = exp_result[15:0]; end
        OP_LOADI: begin exp_data = r_source1_data; exp_result = a32; end
        OP_READI: begin exp_store = 0; exp_result = a32; end
        OP_CJEQ:  begin
          exp_store = 0;
          exp_jump = (r_source1_data == r_source2_data);
          if (exp_jump) begin exp_result = {16'd0, d_data}; n_taken++; end
        end
      endcase
      n_op[d_instr]++;
      @(negedge clk);
      check(e_store == exp_store, "e_store");
      if (exp_store) check(e_data == exp_data && e_destination == exp_dest, "e_data/e_destination");
      check(jump == exp_jump, "jump");
      check(result == exp_result, "result");
    end
    foreach (n_op[i]) check(n_op[i] > 0, "every opcode exercised");
    check(n_taken > 0, "cjeq taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
