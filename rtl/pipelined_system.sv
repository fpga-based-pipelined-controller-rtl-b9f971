// pipelined_system: the complete pipelined controller system.
//
// Three units: the instruction memory (opcodes and fetch address), the data
// memory (register addresses and data word of each instruction) and the
// four-stage pipelined controller. The controller's jump output returns to the
// instruction memory, which then takes its next address from the low bits of
// the controller's result (where a taken cjeq puts its code). One instruction
// is issued per clock; see pipelined_controller for the stage timing.
//
// Interface: clk, reset_n (asynchronous, active low); a program load port
// prog_* writing both memories at prog_addr (use it while reset_n is low);
// outputs pc (current fetch address), jump and the 32-bit result.
// The unit split follows the published top-level architecture; the load port,
// the memory depth and the pc output are own choices.
module pipelined_system
  import pc_pkg::*;
#(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = pc_pkg::PC_DATA_W
) (
  input  logic              clk,
  input  logic              reset_n,
  input  logic              prog_we,
  input  logic [ADDR_W-1:0] prog_addr,
  input  opcode_e           prog_instr,
  input  reg_addr_t         prog_source1,
  input  reg_addr_t         prog_source2,
  input  reg_addr_t         prog_destination,
  input  logic [DATA_W-1:0] prog_data,
  output logic [ADDR_W-1:0] pc,
  output logic              jump,
  output logic [PC_RES_W-1:0] result
);

  opcode_e           instr;
  reg_addr_t         source1, source2, destination;
  logic [DATA_W-1:0] data;

  instr_mem #(.ADDR_W(ADDR_W)) u_imem (
    .clk, .reset_n,
    .jump, .jump_target(result[ADDR_W-1:0]),
    .prog_we, .prog_addr, .prog_instr,
    .addr(pc), .instr
  );

  data_mem #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_dmem (
    .clk, .addr(pc),
    .prog_we, .prog_addr, .prog_source1, .prog_source2, .prog_destination, .prog_data,
    .source1, .source2, .destination, .data
  );

  pipelined_controller #(.DATA_W(DATA_W)) u_ctrl (
    .clk, .reset_n,
    .instr, .source1, .source2, .destination, .data,
    .jump, .result
  );

endmodule
