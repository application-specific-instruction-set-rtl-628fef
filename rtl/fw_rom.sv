// fw_rom: firmware program memory of the ASIP (1024 words of 16 bits).
//
// The processor reads it asynchronously at the address given by the program
// counter; the instruction register in the control unit captures the word.
// The contents are the motion-estimation program. So that one netlist can run
// any of the search algorithms, this design models the firmware memory as a
// RAM with a load port that is written before the processor is released from
// reset; in a mask-ROM implementation the load port is simply left unused.
// The 10-bit address and 16-bit word follow the published block diagram; the
// load port is this design's choice.
module fw_rom #(
  parameter int unsigned PC_W = 10
) (
  input  logic            clk,
  input  logic            load_we,
  input  logic [PC_W-1:0] load_addr,
  input  logic [15:0]     load_data,
  input  logic [PC_W-1:0] addr,
  output logic [15:0]     data
);

  logic [15:0] mem [2**PC_W];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
  end

  assign data = mem[addr];

endmodule
