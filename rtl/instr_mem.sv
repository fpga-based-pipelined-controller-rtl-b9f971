// instr_mem: instruction memory with its fetch address counter.
//
// Holds one 3-bit opcode per program word and presents the opcode at the
// current fetch address (addr) combinationally. The address steps by one every
// clock and wraps at the end of the memory; when the controller raises jump it
// loads jump_target instead (the cjeq code, which the controller places on its
// result output in the same clock). The address is also sent to the data
// memory, which holds the other fields of the same program word.
//
// A write port (prog_we/prog_addr/prog_instr) loads the program, normally while
// reset_n is low. The memory has no reset; the address resets to 0.
// The depth (256 words), the address counter and the load port are own
// choices: the published design shows the memory and the jump feedback only.
module instr_mem
  import pc_pkg::*;
#(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              reset_n,
  input  logic              jump,
  input  logic [ADDR_W-1:0] jump_target,
  input  logic              prog_we,
  input  logic [ADDR_W-1:0] prog_addr,
  input  opcode_e           prog_instr,
  output logic [ADDR_W-1:0] addr,
  output opcode_e           instr
);

  opcode_e mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr] <= prog_instr;
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n)  addr <= '0;
    else if (jump) addr <= jump_target;
    else           addr <= addr + 1'b1;
  end

  assign instr = mem[addr];

endmodule
