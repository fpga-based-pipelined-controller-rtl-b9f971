// table4_pipeline_tb: the four-instruction example run clock by clock.
//
// After a setup of B, C, D and E with loadi, the controller is given
//   add B,C,A   add D,E,W   loadi FFh H   readi A
// in clocks I..IV. In every clock I..VII the testbench checks which instruction
// each unit holds, against the expected occupancy grid:
//   clock  fetch        decode       execute      register unit
//   I      add B,C,A    -            -            -
//   II     add D,E,W    add B,C,A    -            -
//   III    loadi FFh H  add D,E,W    add B,C,A    -
//   IV     readi A      loadi FFh H  add D,E,W    add B,C,A
//   V      -            readi A      loadi FFh H  add D,E,W
//   VI     -            -            readi A      loadi FFh H
//   VII    -            -            -            readi A
// "fetch" is the instruction on the controller pins (captured at the end of the
// clock), "decode" the opcode held by the fetch unit, "execute" the opcode held
// by the decode unit, and "register unit" the write-back (or, for readi, the
// result) produced by the execute unit. Finally the register contents written
// by the example are read back and the 32-bit result is checked.
module table4_pipeline_tb;
  import pc_pkg::*;

  logic clk = 1'b0, reset_n = 1'b0;
  opcode_e instr;
  reg_addr_t source1, source2, destination;
  logic [15:0] data;
  logic jump;
  logic [31:0] result;
  int checks = 0, failures = 0;

  pipelined_controller dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200) @(posedge clk);
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

  task automatic present(opcode_e op, reg_name_e s1, reg_name_e s2, reg_name_e d, logic [15:0] v);
    instr = op; source1 = s1; source2 = s2; destination = d; data = v;
  endtask

  // the example, index 0..3; index 4 = empty slot
  opcode_e ex_op [5] = '{OP_ADD, OP_ADD, OP_LOADI, OP_READI, OP_NOP};
  reg_name_e ex_d [5] = '{REG_A, REG_W, REG_H, REG_A, REG_A};
  // grid[clock][unit] = example index held (4 = none); units: fetch, decode, execute, regs
  int grid [7][4] = '{'{0,4,4,4}, '{1,0,4,4}, '{2,1,0,4}, '{3,2,1,0},
                      '{4,3,2,1}, '{4,4,3,2}, '{4,4,4,3}};

  logic [15:0] b_v = 16'h1357, c_v = 16'h2468, d_v = 16'h0BAD, e_v = 16'hF00D;

  initial begin
    present(OP_NOP, REG_A, REG_A, REG_A, 0);
    repeat (2) @(posedge clk);
    @(negedge clk) reset_n = 1'b1;
    present(OP_LOADI, REG_A, REG_A, REG_B, b_v);
    @(negedge clk) present(OP_LOADI, REG_A, REG_A, REG_C, c_v);
    @(negedge clk) present(OP_LOADI, REG_A, REG_A, REG_D, d_v);
    @(negedge clk) present(OP_LOADI, REG_A, REG_A, REG_E, e_v);
    @(negedge clk) present(OP_NOP, REG_A, REG_A, REG_A, 0);
    @(negedge clk) present(OP_NOP, REG_A, REG_A, REG_A, 0);
    @(negedge clk) present(OP_NOP, REG_A, REG_A, REG_A, 0);
    for (int clock = 0; clock < 7; clock++) begin
      @(negedge clk);
      case (clock)
        0: present(OP_ADD,   REG_B, REG_C, REG_A, 0);
        1: present(OP_ADD,   REG_D, REG_E, REG_W, 0);
        2: present(OP_LOADI, REG_A, REG_A, REG_H, 16'h00FF);
        3: present(OP_READI, REG_A, REG_A, REG_A, 0);
        default: present(OP_NOP, REG_A, REG_A, REG_A, 0);
      endcase
      #1;
      check(instr == ex_op[grid[clock][0]], "fetch column");
      check(dut.f_instr == ex_op[grid[clock][1]], "decode column");
      check(dut.d_instr == ex_op[grid[clock][2]], "execute column");
      if (grid[clock][3] == 4) check(!dut.e_store, "register unit column: empty");
      else if (ex_op[grid[clock][3]] == OP_READI)
        check(!dut.e_store && result == {16'd0, b_v + c_v}, "register unit column: readi A");
      else
        check(dut.e_store && dut.e_destination == ex_d[grid[clock][3]], "register unit column: write");
    end
    // read back what the example wrote: A = B + C, W = D + E, H = FF
    @(negedge clk) present(OP_READI, REG_A, REG_A, REG_W, 0);
    @(negedge clk) present(OP_READI, REG_A, REG_A, REG_H, 0);
    @(negedge clk) present(OP_NOP, REG_A, REG_A, REG_A, 0);
    @(negedge clk) check(result == {16'd0, 16'(d_v + e_v)}, "W = D + E");
    @(negedge clk) check(result == 32'h0000_00FF, "H = FFh");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
