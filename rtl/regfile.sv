// regfile: register file of the ASIP, 24 general-purpose registers (R0..R23)
// and 8 special-purpose registers (R24..R31), all 16 bits wide.
//
// Read port A is addressed with 4 bits and so reaches R0..R15: it serves the
// first source field of ADD, SUB, DIV2 and SAD16. Read port B is addressed
// with 5 bits and reaches every register: it serves MOVR and the second
// source (or the destination being accumulated) of the other instructions.
// The single write port has a separate enable for each byte, which lets MOVC
// load an 8-bit constant into either half of a register and leave the other
// half unchanged. A host writes SPRs through its own port (configuration, e.g.
// the LD coordinates) and reads all of them continuously (results); a
// processor write to the same SPR in the same cycle wins.
// Port widths (4 and 5 address bits, byte-wide write halves) follow the
// published datapath; the host port is this design's choice.
//
// Timing: reads are combinational, writes take effect at the rising edge.
// Synchronous active-low reset clears every register.
module regfile
  import asip_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] ra_a,
  output word_t      rd_a,
  input  logic [4:0] ra_b,
  output word_t      rd_b,
  input  logic [4:0] wa,
  input  word_t      wd,
  input  logic       we_hi,
  input  logic       we_lo,
  input  logic       host_we,
  input  logic [2:0] host_idx,
  input  word_t      host_wd,
  output word_t      spr [N_SPR]
);

  word_t regs [NREG];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) regs[i] <= '0;
    end else begin
      if (host_we) regs[SPR_BASE + 32'(host_idx)] <= host_wd;
      if (we_hi) regs[wa][15:8] <= wd[15:8];
      if (we_lo) regs[wa][7:0]  <= wd[7:0];
    end
  end

  always_comb begin
    rd_a = regs[{1'b0, ra_a}];
    rd_b = regs[ra_b];
    for (int i = 0; i < N_SPR; i++) spr[i] = regs[SPR_BASE + i];
  end

endmodule
