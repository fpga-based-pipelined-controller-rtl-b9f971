// pipelined_system_tb: end-to-end testbench of pipelined_system at its default
// size.
//
// Loads a program through the load port while reset is held, releases reset and
// compares, every clock, the fetch address, jump and result with a reference
// interpreter that runs the same program one instruction at a time, with the
// three delay-slot instructions that follow a taken cjeq.
//
// The program:
//   0..4   loadi setup of B, C, D, E, one nop
//   5..8   the four-instruction example the design is usually shown with
//          (add B,C,A / add D,E,W / loadi FFh H / readi A); readi A, presented
//          in the fourth clock of the example, must show A = B + C on result
//          exactly three clocks later, i.e. in the seventh clock
//   9..29  a counted loop: mult, sub, cjeq exit test (not taken, then taken),
//          an unconditional cjeq back to the loop head, delay slots that carry
//          a 32-bit product and a readi
//   30     cjeq to itself: the program parks there
// Counted: every opcode, taken and not-taken cjeq, delay-slot instructions,
// clocks with four different instructions in the pipeline, 32-bit products.
module pipelined_system_tb;
  import pc_pkg::*;

  localparam int AW = 8;
  localparam int RUN = 200;  // clocks after reset
  localparam int LAT = 3;

  logic clk = 1'b0, reset_n = 1'b0;
  logic prog_we;
  logic [AW-1:0] prog_addr, pc;
  opcode_e prog_instr;
  reg_addr_t prog_source1, prog_source2, prog_destination;
  logic [15:0] prog_data;
  logic jump;
  logic [31:0] result;
  int checks = 0, failures = 0;

  pipelined_system dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2**AW + RUN + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t pc=%0d result=%h", what, $time, pc, result);
    end
  endtask

  typedef struct packed {
    opcode_e   op;
    reg_addr_t s1, s2, d;
    logic [15:0] v;
  } word_t;

  word_t prog [2**AW];

  function automatic word_t w(opcode_e op, reg_name_e s1, reg_name_e s2, reg_name_e d, logic [15:0] v);
    return '{op, s1, s2, d, v};
  endfunction

  // reference interpreter state
  logic [15:0] regs [8];
  logic [31:0] res_model;
  logic [AW-1:0] mpc;
  int jcount;
  logic [AW-1:0] jtgt;
  logic [31:0] exp_result [RUN + 8];
  logic        exp_jump   [RUN + 8];
  logic [AW-1:0] exp_pc   [RUN + 8];
  opcode_e     issued     [RUN + 8];
  int n_op [8];
  int n_taken = 0, n_not_taken = 0, n_slot = 0, n_full = 0, n_wide = 0;
  int table4_seen = 0;

  task automatic issue(int c);
    word_t iw;
    logic [15:0] a, b;
    logic j;
    iw = prog[mpc];
    a = regs[iw.s1]; b = regs[iw.s2]; j = 0;
    exp_pc[c] = mpc;
    issued[c] = iw.op;
    case (iw.op)
      OP_MOVE:  begin regs[iw.d] = a; res_model = {16'd0, a}; end
      OP_ADD:   begin regs[iw.d] = a + b; res_model = {16'd0, regs[iw.d]}; end
      OP_SUB:   begin regs[iw.d] = a - b; res_model = {16'd0, regs[iw.d]}; end
      OP_MULT:  begin res_model = {16'd0, a} * {16'd0, b}; regs[iw.d] = res_model[15:0];
                      if (res_model[31:16] != 0) n_wide++; end
      OP_LOADI: begin regs[iw.d] = iw.v; res_model = {16'd0, iw.v}; end
      OP_READI: res_model = {16'd0, regs[iw.d]};
      OP_CJEQ:  begin j = (a == b); if (j) res_model = {16'd0, iw.v}; end
      default: ;
    endcase
    if (iw.op == OP_CJEQ) begin if (j) n_taken++; else n_not_taken++; end
    if (jcount > 0) n_slot++;
    n_op[iw.op]++;
    exp_result[c] = res_model;
    exp_jump[c] = j;
    // next fetch address: three delay slots, then the target
    if (jcount == 1) begin mpc = jtgt; jcount = 0; end
    else begin
      if (jcount > 1) jcount--;
      mpc = mpc + 1'b1;
    end
    if (j) begin jcount = 3; jtgt = AW'(iw.v); end
  endtask

  initial begin
    foreach (prog[i]) prog[i] = '0;  // nop
    prog[0]  = w(OP_LOADI, REG_A, REG_A, REG_B, 16'h0012);
    prog[1]  = w(OP_LOADI, REG_A, REG_A, REG_C, 16'h0034);
    prog[2]  = w(OP_LOADI, REG_A, REG_A, REG_D, 16'h1234);
    prog[3]  = w(OP_LOADI, REG_A, REG_A, REG_E, 16'h0F0F);
    prog[4]  = w(OP_NOP,   REG_A, REG_A, REG_A, 16'h0000);
    prog[5]  = w(OP_ADD,   REG_B, REG_C, REG_A, 16'h0000);   // add B,C,A
    prog[6]  = w(OP_ADD,   REG_D, REG_E, REG_W, 16'h0000);   // add D,E,W
    prog[7]  = w(OP_LOADI, REG_A, REG_A, REG_H, 16'h00FF);   // loadi FFh H
    prog[8]  = w(OP_READI, REG_A, REG_A, REG_A, 16'h0000);   // readi A
    prog[9]  = w(OP_LOADI, REG_A, REG_A, REG_L, 16'h0003);   // loop count
    prog[10] = w(OP_LOADI, REG_A, REG_A, REG_E, 16'h0001);   // one
    prog[11] = w(OP_LOADI, REG_A, REG_A, REG_D, 16'h0000);   // zero
    prog[12] = w(OP_MOVE,  REG_W, REG_A, REG_B, 16'h0000);   // B = W
    prog[13] = w(OP_MULT,  REG_H, REG_H, REG_C, 16'h0000);   // loop head: C = FF*FF
    prog[14] = w(OP_SUB,   REG_L, REG_E, REG_L, 16'h0000);   // L = L - 1
    prog[15] = w(OP_ADD,   REG_B, REG_H, REG_B, 16'h0000);   // B = B + FF
    prog[16] = w(OP_NOP,   REG_A, REG_A, REG_A, 16'h0000);
    prog[17] = w(OP_CJEQ,  REG_L, REG_D, REG_A, 16'd25);     // exit when L == 0
    prog[18] = w(OP_MULT,  REG_C, REG_B, REG_W, 16'h0000);   // delay slot: 32-bit product
    prog[19] = w(OP_NOP,   REG_A, REG_A, REG_A, 16'h0000);   // delay slot
    prog[20] = w(OP_READI, REG_A, REG_A, REG_L, 16'h0000);   // delay slot
    prog[21] = w(OP_CJEQ,  REG_D, REG_D, REG_A, 16'd13);     // back to the loop head
    prog[22] = w(OP_READI, REG_A, REG_A, REG_B, 16'h0000);   // delay slot
    prog[23] = w(OP_NOP,   REG_A, REG_A, REG_A, 16'h0000);
    prog[24] = w(OP_NOP,   REG_A, REG_A, REG_A, 16'h0000);
    prog[25] = w(OP_READI, REG_A, REG_A, REG_W, 16'h0000);   // exit
    prog[26] = w(OP_MOVE,  REG_C, REG_A, REG_A, 16'h0000);
    prog[27] = w(OP_NOP,   REG_A, REG_A, REG_A, 16'h0000);
    prog[28] = w(OP_NOP,   REG_A, REG_A, REG_A, 16'h0000);
    prog[29] = w(OP_READI, REG_A, REG_A, REG_A, 16'h0000);
    prog[30] = w(OP_CJEQ,  REG_A, REG_A, REG_A, 16'd30);     // park

    foreach (regs[i]) regs[i] = '0;
    foreach (n_op[i]) n_op[i] = 0;
    res_model = '0; mpc = '0; jcount = 0; jtgt = '0;

    // load the program while reset is held
    prog_we = 0; prog_addr = 0; prog_instr = OP_NOP;
    prog_source1 = 0; prog_source2 = 0; prog_destination = 0; prog_data = 0;
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = AW'(a);
      {prog_instr, prog_source1, prog_source2, prog_destination, prog_data} = prog[a];
    end
    @(negedge clk) prog_we = 0;
    check(pc == 0 && result == 0 && !jump, "reset state");

    @(negedge clk) reset_n = 1'b1;
    for (int c = 0; c < RUN; c++) begin
      if (c > 0) @(negedge clk);
      issue(c);
      check(pc == exp_pc[c], "fetch address");
      if (c >= LAT) begin
        check(result == exp_result[c - LAT], "result");
        check(jump == exp_jump[c - LAT], "jump");
        if (issued[c] != OP_NOP && issued[c-1] != OP_NOP && issued[c-2] != OP_NOP
            && issued[c-3] != OP_NOP) n_full++;
      end
      // the published example: readi A presented in clock IV (c = 8) shows
      // B + C = 0x46 in clock VII (c = 11)
      if (c == 11) begin
        check(result == 32'h0000_0046, "example: readi A in clock VII");
        table4_seen++;
      end
    end

    foreach (n_op[i]) check(n_op[i] > 0, "every opcode executed");
    check(n_taken > 0, "cjeq taken");
    check(n_not_taken > 0, "cjeq not taken");
    check(n_slot > 0, "delay-slot instructions");
    check(n_full > 0, "four instructions in flight");
    check(n_wide > 0, "32-bit product");
    check(table4_seen == 1, "example checked");
    $display("executed nop=%0d move=%0d add=%0d sub=%0d mult=%0d loadi=%0d readi=%0d cjeq=%0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_op[5], n_op[6], n_op[7]);
    $display("cjeq taken=%0d not taken=%0d, delay-slot instructions=%0d, clocks with 4 in flight=%0d, 32-bit products=%0d",
             n_taken, n_not_taken, n_slot, n_full, n_wide);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
