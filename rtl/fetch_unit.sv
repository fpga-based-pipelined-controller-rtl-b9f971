// fetch_unit: first stage of the four-stage pipelined controller.
//
// Every clock it captures the opcode from the instruction memory and the
// register addresses and data word from the data memory into flip-flops, so the
// controller has registered inputs and the next stage sees a clean
// register-to-register path. The captured fields go on to the decode unit; the
// two source addresses also go straight to the internal register unit, which
// reads them during the decode cycle.
//
// readi names the register it reads in its destination field. Because the
// register unit is addressed only through the two source addresses, this unit
// places the destination field on f_source1 for readi (own choice).
//
// Timing: fields presented in clock n appear on the f_* outputs in clock n+1.
// Reset (asynchronous, active low) clears every output, which reads as a nop.
module fetch_unit
  import pc_pkg::*;
#(
  parameter int unsigned DATA_W = pc_pkg::PC_DATA_W
) (
  input  logic              clk,
  input  logic              reset_n,
  input  opcode_e           instr,
  input  reg_addr_t         source1,
  input  reg_addr_t         source2,
  input  reg_addr_t         destination,
  input  logic [DATA_W-1:0] data,
  output opcode_e           f_instr,
  output reg_addr_t         f_source1,
  output reg_addr_t         f_source2,
  output reg_addr_t         f_destination,
  output logic [DATA_W-1:0] f_data
);

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      f_instr       <= OP_NOP;
      f_source1     <= '0;
      f_source2     <= '0;
      f_destination <= '0;
      f_data        <= '0;
    end else begin
      f_instr       <= instr;
      f_source1     <= (instr == OP_READI) ? destination : source1;
      f_source2     <= source2;
      f_destination <= destination;
      f_data        <= data;
    end
  end

endmodule
