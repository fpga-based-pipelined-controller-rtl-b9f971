// execute_unit: third stage of the four-stage pipelined controller.
//
// It carries out the instruction held by the decode unit on the register values
// supplied by the internal register unit, and registers everything it produces:
//   move   e_data = src1           result = src1 (zero-extended)
//   add    e_data = src1 + src2    result = 16-bit sum (zero-extended)
//   sub    e_data = src1 - src2    result = 16-bit difference (zero-extended)
//   mult   e_data = low half       result = full 32-bit product
//   loadi  e_data = data word      result = data word (zero-extended)
//   readi  no write                result = register (zero-extended)
//   cjeq   no write                if src1 == src2: jump = 1, result = code
//   nop    no write                result holds
// A not-taken cjeq also leaves result as it was. jump is high for exactly one
// clock per taken cjeq. The code (the jump target) travels in the data word.
// The operations follow the instruction set; the 16/32-bit result split, the
// stored low half of a product and the handling of the code are own choices.
//
// Timing: inputs valid in clock n, outputs (jump, result, e_*) in clock n+1,
// when the internal register unit performs the write at the end of that clock.
// Reset (asynchronous, active low) clears all outputs.
module execute_unit
  import pc_pkg::*;
#(
  parameter int unsigned DATA_W = pc_pkg::PC_DATA_W,
  parameter int unsigned RES_W  = pc_pkg::PC_RES_W
) (
  input  logic              clk,
  input  logic              reset_n,
  input  opcode_e           d_instr,
  input  reg_addr_t         d_destination,
  input  logic [DATA_W-1:0] d_data,
  input  logic [DATA_W-1:0] r_source1_data,
  input  logic [DATA_W-1:0] r_source2_data,
  output logic              jump,
  output logic [RES_W-1:0]  result,
  output logic [DATA_W-1:0] e_data,
  output reg_addr_t         e_destination,
  output logic              e_store
);

  logic [DATA_W-1:0]   alu_data;   // value written back
  logic [RES_W-1:0]    alu_result; // value shown on result
  logic                res_load;   // result is updated this clock
  logic                take_jump;
  logic [2*DATA_W-1:0] product;

  assign product = r_source1_data * r_source2_data;

  always_comb begin
    alu_data   = '0;
    res_load   = 1'b1;
    take_jump  = 1'b0;
    unique case (d_instr)
      OP_MOVE:  alu_data = r_source1_data;
      OP_ADD:   alu_data = r_source1_data + r_source2_data;
      OP_SUB:   alu_data = r_source1_data - r_source2_data;
      OP_MULT:  alu_data = product[DATA_W-1:0];
      OP_LOADI: alu_data = r_source1_data;  // register unit passes the data word
      OP_READI: alu_data = r_source1_data;
      OP_CJEQ: begin
        take_jump = (r_source1_data == r_source2_data);
        res_load  = take_jump;
        alu_data  = d_data;
      end
      OP_NOP:   res_load = 1'b0;
    endcase
    alu_result = (d_instr == OP_MULT) ? RES_W'(product) : RES_W'(alu_data);
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      jump          <= 1'b0;
      result        <= '0;
      e_data        <= '0;
      e_destination <= '0;
      e_store       <= 1'b0;
    end else begin
      jump          <= take_jump;
      if (res_load) result <= alu_result;
      e_data        <= alu_data;
      e_destination <= d_destination;
      e_store       <= writes_reg(d_instr);
    end
  end

endmodule
