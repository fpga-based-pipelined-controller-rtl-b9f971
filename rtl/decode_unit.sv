// decode_unit: second stage of the four-stage pipelined controller.
//
// It looks at the opcode held by the fetch unit and, in the same clock, tells
// the internal register unit what to supply to the execute unit: rd_en reads
// the two source registers (move, add, sub, mult, readi, cjeq) and sel_imm
// passes the fetched data word instead (loadi). At the end of the clock the
// opcode, destination and data word move on to the execute unit as d_*. The
// source addresses are not passed on: by then the register unit has already
// turned them into register values.
//
// There is no stall: one instruction enters per clock, as in the design's
// pipeline diagram. Data hazards are left to the program (an instruction must
// come at least three places after the one that writes its source register).
//
// Timing: f_* in clock n -> rd_en/sel_imm in clock n (combinational), d_* in
// clock n+1. Reset (asynchronous, active low) clears d_* to a nop.
module decode_unit
  import pc_pkg::*;
#(
  parameter int unsigned DATA_W = pc_pkg::PC_DATA_W
) (
  input  logic              clk,
  input  logic              reset_n,
  input  opcode_e           f_instr,
  input  reg_addr_t         f_destination,
  input  logic [DATA_W-1:0] f_data,
  output logic              rd_en,
  output logic              sel_imm,
  output opcode_e           d_instr,
  output reg_addr_t         d_destination,
  output logic [DATA_W-1:0] d_data
);

  always_comb begin
    rd_en   = reads_regs(f_instr);
    sel_imm = (f_instr == OP_LOADI);
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      d_instr       <= OP_NOP;
      d_destination <= '0;
      d_data        <= '0;
    end else begin
      d_instr       <= f_instr;
      d_destination <= f_destination;
      d_data        <= f_data;
    end
  end

endmodule
