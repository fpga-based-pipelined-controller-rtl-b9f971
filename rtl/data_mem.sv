// data_mem: data memory holding the operand fields of every program word.
//
// For each address it stores the source1, source2 and destination register
// addresses and the 16-bit data word (the loadi value or the cjeq code), and
// presents them combinationally at the fetch address supplied by the
// instruction memory, so opcode and operands of one instruction arrive at the
// controller in the same clock.
//
// A write port (prog_we/prog_addr/prog_*) loads the program. The memory has no
// reset. The word layout, the depth (256 words, same as the instruction
// memory) and the load port are own choices.
module data_mem
  import pc_pkg::*;
#(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = pc_pkg::PC_DATA_W
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              prog_we,
  input  logic [ADDR_W-1:0] prog_addr,
  input  reg_addr_t         prog_source1,
  input  reg_addr_t         prog_source2,
  input  reg_addr_t         prog_destination,
  input  logic [DATA_W-1:0] prog_data,
  output reg_addr_t         source1,
  output reg_addr_t         source2,
  output reg_addr_t         destination,
  output logic [DATA_W-1:0] data
);

  typedef struct packed {
    reg_addr_t         source1;
    reg_addr_t         source2;
    reg_addr_t         destination;
    logic [DATA_W-1:0] data;
  } operand_word_t;

  operand_word_t mem [2**ADDR_W];
  operand_word_t rd;

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr] <= '{prog_source1, prog_source2, prog_destination, prog_data};
  end

  assign rd          = mem[addr];
  assign source1     = rd.source1;
  assign source2     = rd.source2;
  assign destination = rd.destination;
  assign data        = rd.data;

endmodule
