// pc_unit: program counter of the ASIP.
//
// A multiplexer picks the fetch address: the jump target when a jump is
// taken, otherwise the PC. That address goes to the firmware memory and,
// through an incrementer, back into the PC, so the PC always holds the address
// following the instruction being fetched. A taken jump therefore fetches its
// target in the same cycle and costs no bubble. While the processor stalls
// the incrementer adds 0 instead of 1 and the fetch is repeated.
// The PC, incrementer and multiplexer and their 10-bit width follow the
// published block diagram; the zero/one increment used for stalling is this
// design's choice.
//
// Timing: fetch_addr is combinational from pc, jump and target; pc updates on
// the rising clock edge. Reset (active low, synchronous) clears the PC.
module pc_unit #(
  parameter int unsigned PC_W = 10
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            stall,       // hold: refetch the same address
  input  logic            jump,        // take the jump target
  input  logic [PC_W-1:0] target,
  output logic [PC_W-1:0] fetch_addr,  // address presented to the firmware memory
  output logic [PC_W-1:0] pc
);

  logic [PC_W-1:0] inc;

  always_comb begin
    fetch_addr = jump ? target : pc;
    inc        = stall ? '0 : PC_W'(1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) pc <= '0;
    else        pc <= fetch_addr + inc;
  end

endmodule
