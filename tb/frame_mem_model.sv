// frame_mem_model: behavioural model of the external frame memory that holds
// the current and the reference frame (FRAME_W x FRAME_H bytes each).
// A read issued with re returns its byte on rdata in the following cycle.
// The pixel values come from tb_pkg (cur_px / ref_px, or cur_sm / ref_sm
// when SMOOTH is set); nothing is stored.
module frame_mem_model #(
  parameter bit          SMOOTH  = 1'b0,
  parameter int unsigned FRAME_W = 176,
  parameter int unsigned AW      = 15
) (
  input  logic          clk,
  input  logic          re,
  input  logic          frame,     // 0 = current, 1 = reference
  input  logic [AW-1:0] addr,
  output logic [7:0]    rdata
);
  int x, y;
  always_ff @(posedge clk) begin
    if (re) begin
      x = int'(addr) % FRAME_W;
      y = int'(addr) / FRAME_W;
      if (SMOOTH) rdata <= frame ? tb_pkg::ref_sm(x, y) : tb_pkg::cur_sm(x, y);
      else        rdata <= frame ? tb_pkg::ref_px(x, y) : tb_pkg::cur_px(x, y);
    end
  end
endmodule
