// pipelined_controller_tb: self-checking testbench for pipelined_controller.
//
// Feeds a random instruction stream straight into the controller pins, one
// instruction per clock. The stream keeps every register reader at least three
// instructions behind the writer of that register (the rule the pipeline relies
// on), so a plain one-instruction-at-a-time interpreter here gives the expected
// values. Checks, three clocks after each instruction is presented, the 32-bit
// result and the jump pulse; at the end every register is read back with readi.
// Counts each opcode, taken and not-taken cjeq, and products wider than 16 bits.
module pipelined_controller_tb;
  import pc_pkg::*;

  localparam int N = 3000;
  localparam int LAT = 3;  // clocks from presenting an instruction to its result

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
    repeat (N + 200) @(posedge clk);
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

  // reference state
  logic [15:0] regs [8];
  logic [31:0] res_model;
  logic [31:0] exp_result [N + 16];
  logic        exp_jump   [N + 16];
  int last_write [8];  // index of the last instruction writing each register
  int n_op [8];
  int n_taken = 0, n_not_taken = 0, n_wide = 0;

  function automatic logic free(int k, reg_addr_t r);
    return (k - last_write[r]) >= 3;
  endfunction

  function automatic reg_addr_t pick_src(int k);
    reg_addr_t r;
    for (int t = 0; t < 50; t++) begin
      r = 3'($urandom);
      if (free(k, r)) return r;
    end
    for (int i = 0; i < 8; i++) if (free(k, 3'(i))) return 3'(i);  // at most two are busy
    return '0;
  endfunction

  // Interpret one instruction; record what the controller must show.
  task automatic step(int k, opcode_e op, reg_addr_t s1, reg_addr_t s2, reg_addr_t d, logic [15:0] v);
    logic [15:0] a, b;
    logic j;
    a = regs[s1]; b = regs[s2]; j = 0;
    case (op)
      OP_MOVE:  begin regs[d] = a; res_model = {16'd0, a}; end
      OP_ADD:   begin regs[d] = a + b; res_model = {16'd0, regs[d]}; end
      OP_SUB:   begin regs[d] = a - b; res_model = {16'd0, regs[d]}; end
      OP_MULT:  begin res_model = {16'd0, a} * {16'd0, b}; regs[d] = res_model[15:0];
                      if (res_model[31:16] != 0) n_wide++; end
      OP_LOADI: begin regs[d] = v; res_model = {16'd0, v}; end
      OP_READI: res_model = {16'd0, regs[d]};
      OP_CJEQ:  begin j = (a == b); if (j) begin res_model = {16'd0, v}; n_taken++; end
                      else n_not_taken++; end
      default: ;
    endcase
    if (writes_reg(op)) last_write[d] = k;
    n_op[op]++;
    exp_result[k] = res_model;
    exp_jump[k] = j;
  endtask

  initial begin
    foreach (regs[i]) begin regs[i] = '0; last_write[i] = -10; end
    foreach (n_op[i]) n_op[i] = 0;
    res_model = '0;
    instr = OP_NOP; source1 = 0; source2 = 0; destination = 0; data = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) reset_n = 1'b1;
    for (int c = 0; c < N + LAT; c++) begin
      if (c > 0) @(negedge clk);
      if (c >= LAT) begin
        check(result == exp_result[c - LAT], "result");
        check(jump == exp_jump[c - LAT], "jump");
      end
      if (c < N) begin
        opcode_e op;
        reg_addr_t s1, s2, d;
        logic [15:0] v;
        if (c >= N - 16) begin
          // drain: read back every register, spaced past the last writes
          op = (c >= N - 8) ? OP_READI : OP_NOP;
          d = 3'(c - (N - 8)); s1 = 0; s2 = 0; v = 0;
        end else begin
          op = opcode_e'($urandom_range(7));
          s1 = pick_src(c);
          s2 = ($urandom_range(3) == 0) ? s1 : pick_src(c);
          d  = (op == OP_READI) ? pick_src(c) : 3'($urandom);
          v  = ($urandom_range(1) == 0) ? 16'($urandom) : 16'($urandom_range(255));
        end
        step(c, op, s1, s2, d, v);
        instr = op; source1 = s1; source2 = s2; destination = d; data = v;
      end
    end
    foreach (n_op[i]) check(n_op[i] > 0, "every opcode executed");
    check(n_taken > 0, "cjeq taken");
    check(n_not_taken > 0, "cjeq not taken");
    check(n_wide > 0, "32-bit product");
    $display("executed nop=%0d move=%0d add=%0d sub=%0d mult=%0d loadi=%0d readi=%0d cjeq=%0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_op[5], n_op[6], n_op[7]);
    $display("cjeq taken=%0d not taken=%0d, 32-bit products=%0d", n_taken, n_not_taken, n_wide);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
