// reg_file: internal register unit of the four-stage pipelined controller.
//
// Eight 16-bit registers, A B C D E H L W at addresses 0..7. During an
// instruction's decode clock the unit reads the registers named by f_source1 and
// f_source2 (when rd_en) or takes the fetched data word onto the first port
// (when sel_imm, for loadi), and registers them as r_source1_data and
// r_source2_data for the execute unit. When neither is set the read registers
// hold. During an instruction's last clock the execute unit's e_store,
// e_destination and e_data write one register at the closing clock edge.
//
// A read and a write of the same register at the same edge return the old
// value; there is no write-through (own choice; nothing else is specified).
// Reset (asynchronous, active low) clears all registers and read outputs.
module reg_file
  import pc_pkg::*;
#(
  parameter int unsigned DATA_W = pc_pkg::PC_DATA_W,
  parameter int unsigned NREGS  = pc_pkg::PC_NREGS
) (
  input  logic              clk,
  input  logic              reset_n,
  // read side, from decode and fetch
  input  logic              rd_en,
  input  logic              sel_imm,
  input  reg_addr_t         f_source1,
  input  reg_addr_t         f_source2,
  input  logic [DATA_W-1:0] f_data,
  // write side, from execute
  input  logic              e_store,
  input  reg_addr_t         e_destination,
  input  logic [DATA_W-1:0] e_data,
  // to execute
  output logic [DATA_W-1:0] r_source1_data,
  output logic [DATA_W-1:0] r_source2_data
);

  logic [DATA_W-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (e_store) begin
      regs[e_destination] <= e_data;
    end
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      r_source1_data <= '0;
      r_source2_data <= '0;
    end else if (sel_imm) begin
      r_source1_data <= f_data;
    end else if (rd_en) begin
      r_source1_data <= regs[f_source1];
      r_source2_data <= regs[f_source2];
    end
  end

endmodule
