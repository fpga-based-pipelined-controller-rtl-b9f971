// instr_mem_tb: self-checking testbench for instr_mem.
//
// Loads a random program through the load port while reset is held, then lets
// the address run: checks that the address steps by one and wraps, that the
// opcode shown is the one stored there, and that a jump loads the target.
module instr_mem_tb;
  import pc_pkg::*;

  localparam int unsigned AW = 8;
  logic clk = 1'b0, reset_n = 1'b0;
  logic jump, prog_we;
  logic [AW-1:0] jump_target, prog_addr, addr;
  opcode_e prog_instr, instr;
  int checks = 0, failures = 0;
  int n_jumps = 0, n_wraps = 0;

  instr_mem dut (.*);

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
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  opcode_e model [2**AW];
  logic [AW-1:0] exp_addr;

  initial begin
    jump = 0; jump_target = 0; prog_we = 0; prog_addr = 0; prog_instr = OP_NOP;
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = AW'(a); prog_instr = opcode_e'($urandom_range(7));
      model[a] = prog_instr;
    end
    @(negedge clk);
    prog_we = 0;
    check(addr == 0, "address held at 0 in reset");
    reset_n = 1'b1;
    exp_addr = 0;
    for (int i = 0; i < 1500; i++) begin
      check(addr == exp_addr, "fetch address");
      check(instr == model[addr], "opcode at address");
      jump = ($urandom_range(15) == 0) && (i < 1000);
      jump_target = AW'($urandom);
      @(negedge clk);
      if (jump) begin exp_addr = jump_target; n_jumps++; end
      else begin
        if (exp_addr == '1) n_wraps++;
        exp_addr = exp_addr + 1'b1;
      end
    end
    check(n_jumps > 0 && n_wraps > 0, "jump and wrap exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
