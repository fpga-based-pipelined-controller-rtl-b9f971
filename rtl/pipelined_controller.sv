// pipelined_controller: 16-bit four-stage pipelined controller (a small RISC
// core without program counter).
//
// Each clock the memories present one instruction: a 3-bit opcode (instr),
// three 3-bit register addresses and a 16-bit data word. It passes through four
// stages, one per clock, so up to four instructions are in flight:
//   clock n    fetch unit captures the fields
//   clock n+1  decode unit decodes; internal register unit reads the sources
//   clock n+2  execute unit computes
//   clock n+3  result/jump are visible; the internal register unit writes the
//              destination at the end of this clock
// jump and result are the controller's outputs to the instruction memory and
// the outside. There is no stall and no forwarding: an instruction that reads a
// register must come at least three instructions after the one writing it, and
// the three instructions after a taken cjeq are executed before the target
// (the jump is a registered output).
//
// The four units and their connections follow the published micro-architecture;
// the readi addressing, the control lines from decode to the register unit and
// the way the jump code leaves the controller (on result) are own choices. An
// assertion flags programs that read a register too soon after writing it.
module pipelined_controller
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
  output logic              jump,
  output logic [PC_RES_W-1:0] result
);

  opcode_e           f_instr, d_instr;
  reg_addr_t         f_source1, f_source2, f_destination;
  reg_addr_t         d_destination, e_destination;
  logic [DATA_W-1:0] f_data, d_data, e_data;
  logic [DATA_W-1:0] r_source1_data, r_source2_data;
  logic              rd_en, sel_imm, e_store;

  fetch_unit #(.DATA_W(DATA_W)) u_fetch (
    .clk, .reset_n,
    .instr, .source1, .source2, .destination, .data,
    .f_instr, .f_source1, .f_source2, .f_destination, .f_data
  );

  decode_unit #(.DATA_W(DATA_W)) u_decode (
    .clk, .reset_n,
    .f_instr, .f_destination, .f_data,
    .rd_en, .sel_imm,
    .d_instr, .d_destination, .d_data
  );

  reg_file #(.DATA_W(DATA_W)) u_regs (
    .clk, .reset_n,
    .rd_en, .sel_imm, .f_source1, .f_source2, .f_data,
    .e_store, .e_destination, .e_data,
    .r_source1_data, .r_source2_data
  );

  execute_unit #(.DATA_W(DATA_W), .RES_W(PC_RES_W)) u_execute (
    .clk, .reset_n,
    .d_instr, .d_destination, .d_data,
    .r_source1_data, .r_source2_data,
    .jump, .result,
    .e_data, .e_destination, .e_store
  );

  // Program rule: the register read in the decode clock must not be one that an
  // instruction in the execute stage, or one being written back in this clock,
  // still has to write. The hardware does not check it; this assertion reports
  // programs that break it in simulation.
  logic hazard;
  always_comb begin
    hazard = 1'b0;
    if (reads_regs(f_instr)) begin
      if (writes_reg(d_instr) && (f_source1 == d_destination ||
          (uses_source2(f_instr) && f_source2 == d_destination)))
        hazard = 1'b1;
      if (e_store && (f_source1 == e_destination ||
          (uses_source2(f_instr) && f_source2 == e_destination)))
        hazard = 1'b1;
    end
  end

  a_no_read_after_write_hazard: assert property (@(posedge clk) disable iff (!reset_n) !hazard)
    else $error("register read within three instructions of its write (opcode %0d)", f_instr);

endmodule
