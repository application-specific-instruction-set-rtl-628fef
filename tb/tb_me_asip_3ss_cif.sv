// tb_me_asip_3ss_cif: the three-step-search firmware of tb_me_asip_3ss, run
// on the processor configured for CIF frames (352x288, 17-bit frame address)
// instead of the QCIF default. Macroblocks are placed where only a CIF frame
// has them (x >= 176 or y >= 144), so the frame address must use the full
// width. The firmware is unchanged: only the AGU's frame-address arithmetic
// depends on the frame size. Results are checked against the same reference
// 3SS; the cost per macroblock is the same as for QCIF.
module tb_me_asip_3ss_cif;
  import asip_pkg::*;
  import tb_pkg::*;

  localparam int unsigned FRAME_W = 352, FRAME_H = 288, AW = 17;

  logic clk = 0, rst_n = 0;
  logic prog_we = 0;
  logic [9:0] prog_addr = '0;
  logic [15:0] prog_data = '0;
  logic host_spr_we = 0;
  logic [2:0] host_spr_idx = '0;
  word_t host_spr_wd = '0;
  word_t spr [N_SPR];
  logic ext_re, ext_frame;
  logic [AW-1:0] ext_addr;
  pixel_t ext_rdata;
  logic [9:0] pc;
  logic agu_busy, flag_n, flag_z, stall_agu, stall_sad;

  me_asip #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H)) dut (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_data, .host_spr_we, .host_spr_idx,
    .host_spr_wd, .spr, .ext_re, .ext_frame, .ext_addr, .ext_rdata, .pc, .agu_busy,
    .flag_n, .flag_z, .stall_agu, .stall_sad);

  frame_mem_model #(.FRAME_W(FRAME_W), .AW(AW)) u_fm (
    .clk, .re(ext_re), .frame(ext_frame), .addr(ext_addr), .rdata(ext_rdata));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;
  always @(posedge clk) if (rst_n) cycles++;

  task automatic expect_true(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [15:0] prog [1024];
  int n_words;
  // neighbour order: (-1,-1) (0,-1) (1,-1) (-1,0) (1,0) (-1,1) (0,1) (1,1)
  int nx [8] = '{-1, 0, 1, -1, 1, -1, 0, 1};
  int ny [8] = '{-1, -1, -1, 0, 0, 1, 1, 1};

  task automatic emit(inout int a, input logic [15:0] w);
    prog[a] = w;
    a++;
  endtask

  // R1 SAD, R2 best SAD, R3 candidate pointer, R5 centre pointer,
  // R6 best pointer, R11 scratch, R12 = 0, R13 offset, R14/R15 line pointers
  task automatic emit_eval(inout int a);
    int skip;
    skip = a + 16 + 3 + 3 + 2;
    emit(a, enc_movr(5'd1, 5'd12));
    emit(a, enc_movr(5'd14, 5'd12));
    emit(a, enc_movr(5'd15, 5'd3));
    for (int i = 0; i < 16; i++) emit(a, enc_sad16(4'd1, 4'd14, 4'd15));
    emit(a, enc_sub(4'd11, 4'd2, 4'd1));
    emit(a, enc_j(CC_N, 10'(skip)));
    emit(a, enc_j(CC_Z, 10'(skip)));
    emit(a, enc_movr(5'd2, 5'd1));
    emit(a, enc_movr(5'd6, 5'd3));
  endtask

  task automatic assemble();
    int a, l_wait;
    a = 0;
    emit(a, enc_movc(0, 4'd12, 8'h00));
    l_wait = a;
    emit(a, enc_movr(5'd11, 5'd31));
    emit(a, enc_add(4'd11, 4'd11, 4'd12));
    emit(a, enc_j(CC_Z, 10'(l_wait)));
    emit(a, enc_ld(1'b0));
    emit(a, enc_ld(1'b1));
    emit(a, enc_movc(0, 4'd5, 8'h08));          // centre (8, 8) = 8*32 + 8
    emit(a, enc_movc(1, 4'd5, 8'h01));
    emit(a, enc_movr(5'd3, 5'd5));
    emit(a, enc_movr(5'd6, 5'd5));
    emit(a, enc_movc(0, 4'd2, 8'hFF));
    emit(a, enc_movc(1, 4'd2, 8'h7F));
    emit_eval(a);                               // centre
    for (int s = 4; s >= 1; s = s / 2) begin
      for (int k = 0; k < 8; k++) begin
        int off;
        off = ny[k] * s * 32 + nx[k] * s;
        emit(a, enc_movc(0, 4'd13, 8'((off < 0) ? -off : off)));
        if (off < 0) emit(a, enc_sub(4'd3, 4'd5, 4'd13));
        else         emit(a, enc_add(4'd3, 4'd5, 4'd13));
        emit_eval(a);
      end
      emit(a, enc_movr(5'd5, 5'd6));            // move to the best point
    end
    emit(a, enc_movr(5'd28, 5'd6));
    emit(a, enc_movr(5'd30, 5'd2));
    emit(a, enc_movr(5'd31, 5'd12));
    emit(a, enc_j(CC_U, 10'(l_wait)));
    n_words = a;
  endtask

  function automatic int cand_sad(input int mbx, input int mby, input int sax, input int say,
                                  input int cx, input int cy);
    int s;
    s = 0;
    for (int j = 0; j < 16; j++)
      for (int i = 0; i < 16; i++) begin
        int d;
        d = int'(cur_px(mbx + i, mby + j)) - int'(ref_px(sax + cx + i, say + cy + j));
        s += (d < 0) ? -d : d;
      end
    return s;
  endfunction

  task automatic ref_3ss(input int mbx, input int mby, input int sax, input int say,
                         output int bx, output int by, output int best);
    int cx, cy;
    cx = 8; cy = 8; bx = 8; by = 8;
    best = cand_sad(mbx, mby, sax, say, 8, 8);
    for (int s = 4; s >= 1; s = s / 2) begin
      for (int k = 0; k < 8; k++) begin
        int v;
        v = cand_sad(mbx, mby, sax, say, cx + nx[k] * s, cy + ny[k] * s);
        if (v < best) begin best = v; bx = cx + nx[k] * s; by = cy + ny[k] * s; end
      end
      cx = bx; cy = by;
    end
  endtask

  task automatic host_write(input int idx, input int v);
    @(negedge clk);
    host_spr_we = 1; host_spr_idx = 3'(idx); host_spr_wd = word_t'(v);
    @(negedge clk);
    host_spr_we = 0;
  endtask

  task automatic run_mb(input int mbx, input int mby);
    int sax, say, bx, by, best, t0;
    sax = mbx - 8; say = mby - 8;
    ref_3ss(mbx, mby, sax, say, bx, by, best);
    host_write(0, mbx); host_write(1, mby); host_write(2, sax); host_write(3, say);
    t0 = cycles;
    host_write(7, 1);
    while (spr[7] != 0) @(posedge clk);
    #1;
    $display("INFO CIF 3SS MB (%0d,%0d): best (%0d,%0d) SAD %0d, expected (%0d,%0d) SAD %0d, %0d cycles",
             mbx, mby, spr[4] % 32, spr[4] / 32, spr[6], bx, by, best, cycles - t0);
    expect_true(spr[4] == word_t'(by * 32 + bx), "best position");
    expect_true(spr[6] == word_t'(best), "best SAD");
    expect_true((cycles - t0) * 100 <= 15 * 81475, "3SS cost at most 15% of full search");
  endtask

  initial begin
    assemble();
    for (int i = 0; i < n_words; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 10'(i); prog_data = prog[i];
    end
    @(negedge clk);
    prog_we = 0;
    rst_n = 1;
    $display("INFO CIF 3SS firmware: %0d words", n_words);
    expect_true($bits(ext_addr) == 17, "CIF frame address is 17 bits");
    run_mb(320, 256);
    run_mb(208, 64);
    run_mb(96, 176);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
