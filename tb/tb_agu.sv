// tb_agu: self-checking test of the AGU with the frame-memory model.
// Loads a macroblock and a search area at given frame coordinates, checks
// that busy lasts N*N + 1 cycles (N = 16 and 31) and that one frame read is
// issued per cycle, then reads the local memory back through the SAD16 pixel
// supply (capture pointers, step 16 times) for every macroblock line and for
// random candidate lines, comparing with the frame pixels computed here.
module tb_agu;
  import asip_pkg::*;
  localparam int unsigned FRAME_W = 176, FRAME_H = 144, SA_DIM = 31, AW = 15;
  logic clk = 0, rst_n = 0;
  logic ld_start = 0, ld_sel = 0, busy, ext_re, ext_frame, sad_cap = 0, sad_step = 0;
  word_t ld_x = '0, ld_y = '0, ptr_mb = '0, ptr_ca = '0;
  logic [AW-1:0] ext_addr;
  pixel_t ext_rdata, mb_px, cand_px;
  int checks = 0, failures = 0;
  int mbx = 64, mby = 48, sax = 56, say = 40;

  agu #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .SA_DIM(SA_DIM)) dut (
    .clk, .rst_n, .ld_start, .ld_sel, .ld_x, .ld_y, .busy, .ext_re, .ext_frame, .ext_addr,
    .ext_rdata, .sad_cap, .ptr_mb, .ptr_ca, .sad_step, .mb_px, .cand_px);

  frame_mem_model #(.FRAME_W(FRAME_W), .AW(AW)) u_fm (
    .clk, .re(ext_re), .frame(ext_frame), .addr(ext_addr), .rdata(ext_rdata));

  always #5 clk = ~clk;

  task automatic load(input logic sel, input int x, input int y, input int n);
    int cyc, reads;
    ld_sel = sel; ld_x = word_t'(x); ld_y = word_t'(y); ld_start = 1;
    @(posedge clk); #1 ld_start = 0;
    cyc = 0; reads = 0;
    while (busy) begin
      if (ext_re) reads++;
      cyc++;
      @(posedge clk); #1;
    end
    checks += 2;
    if (cyc != n * n + 1) begin failures++; $display("FAIL busy cycles %0d exp %0d", cyc, n * n + 1); end
    if (reads != n * n) begin failures++; $display("FAIL reads %0d exp %0d", reads, n * n); end
  endtask

  task automatic check_line(input int mb_row, input int cx, input int cy);
    ptr_mb = word_t'(mb_row * 16); ptr_ca = word_t'(cy * 32 + cx); sad_cap = 1;
    @(posedge clk); #1 sad_cap = 0;
    for (int i = 0; i < 16; i++) begin
      checks += 2;
      if (mb_px !== cur_px(mbx + i, mby + mb_row)) begin
        failures++; $display("FAIL mb row %0d px %0d: %h", mb_row, i, mb_px);
      end
      if (cand_px !== ref_px(sax + cx + i, say + cy)) begin
        failures++; $display("FAIL cand (%0d,%0d) px %0d: %h", cx, cy, i, cand_px);
      end
      sad_step = 1; @(posedge clk); #1 sad_step = 0;
    end
  endtask

  import tb_pkg::*;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    load(1'b0, mbx, mby, 16);
    load(1'b1, sax, say, SA_DIM);
    for (int r = 0; r < 16; r++) check_line(r, r % 16, r);
    for (int t = 0; t < 40; t++) check_line(int'($urandom % 16), int'($urandom % 16), int'($urandom % 31));
    // a second MB load at another place replaces the first
    mbx = 0; mby = 0;
    load(1'b0, mbx, mby, 16);
    for (int r = 0; r < 16; r += 5) check_line(r, 0, r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
