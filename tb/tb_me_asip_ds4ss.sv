// tb_me_asip_ds4ss: runs diamond-search (DS) and four-step-search (4SS)
// firmware on the processor at its default parameters, on the smooth test
// image, and checks each result against a reference model written here.
//
// Both programs work on the 16x16 candidate positions (x, y in 0..15) of a
// search area whose zero-motion position is (8, 8), and skip any point that
// falls outside that range (bounds tested with SUB and conditional jumps).
//   DS : evaluate the centre, then the large diamond (8 points at distance 2
//        or (1,1)) around the best point until the centre stays best, then
//        the small diamond (4 points at distance 1) once.
//   4SS: evaluate the centre, then up to three steps of the 5x5 square
//        (8 points at distance 2); if the centre stays best the search goes
//        straight to the final 3x3 square (8 points at distance 1). The step
//        counter is halved with DIV2 (4, 2, 1, 0).
// Points already visited are evaluated again (no redundancy elimination);
// this changes the cycle count, not the result. A later point replaces the
// best only if its SAD is smaller. The firmware reports the best position as
// a search-area pointer (y*32 + x) in R28 and its SAD in R30, then clears R31.
// One macroblock per algorithm gets a search area shifted so that the true
// match lies outside the candidate range, which drives the search into the
// range borders and exercises the skipping of out-of-range points (the
// smooth image has local minima, so the search may stop before the corner).
// The cycles per macroblock are printed and checked to be below 25% of the
// full-search figure (81475 cycles, tb_me_asip).
module tb_me_asip_ds4ss;
  import asip_pkg::*;
  import tb_pkg::*;

  localparam int unsigned FRAME_W = 176, AW = 15;

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

  me_asip dut (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_data, .host_spr_we, .host_spr_idx,
    .host_spr_wd, .spr, .ext_re, .ext_frame, .ext_addr, .ext_rdata, .pc, .agu_busy,
    .flag_n, .flag_z, .stall_agu, .stall_sad);

  frame_mem_model #(.SMOOTH(1'b1), .FRAME_W(FRAME_W), .AW(AW)) u_fm (
    .clk, .re(ext_re), .frame(ext_frame), .addr(ext_addr), .rdata(ext_rdata));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;
  always @(posedge clk) if (rst_n) cycles++;

  task automatic expect_true(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // pattern tables
  int ldsp_x [8] = '{0, -1, 1, -2, 2, -1, 1, 0};
  int ldsp_y [8] = '{-2, -1, -1, 0, 0, 1, 1, 2};
  int sdsp_x [4] = '{0, -1, 1, 0};
  int sdsp_y [4] = '{-1, 0, 0, 1};
  int sq_x   [8] = '{-1, 0, 1, -1, 1, -1, 0, 1};
  int sq_y   [8] = '{-1, -1, -1, 0, 0, 1, 1, 1};

  // ---------------- assembler ----------------
  logic [15:0] prog [1024];
  int n_words;
  int fix [$];       // jumps to patch with the current point's skip address

  task automatic emit(inout int a, input logic [15:0] w);
    prog[a] = w;
    a++;
  endtask

  // Registers: R0 4SS step counter, R1 SAD, R2 best SAD, R3 candidate pointer,
  // R4/R5 centre x/y, R6 best pointer, R7/R8 candidate x/y, R9 = 16,
  // R10 centre pointer, R11 scratch, R12 = 0, R13 constant, R14/R15 line
  // pointers, R16/R17 best x/y.
  task automatic emit_sad_and_compare(inout int a);
    emit(a, enc_movr(5'd1, 5'd12));
    emit(a, enc_movr(5'd14, 5'd12));
    emit(a, enc_movr(5'd15, 5'd3));
    for (int i = 0; i < 16; i++) emit(a, enc_sad16(4'd1, 4'd14, 4'd15));
    emit(a, enc_sub(4'd11, 4'd2, 4'd1));
    fix.push_back(a); emit(a, 16'h0);          // J.N skip
    fix.push_back(a); emit(a, 16'h1);          // J.Z skip
    emit(a, enc_movr(5'd2, 5'd1));
    emit(a, enc_movr(5'd6, 5'd3));
    emit(a, enc_movr(5'd16, 5'd7));
    emit(a, enc_movr(5'd17, 5'd8));
  endtask

  task automatic emit_coord(inout int a, input logic [3:0] rdst, input logic [3:0] rcen, input int d);
    if (d == 0) emit(a, enc_movr(5'(rdst), 5'(rcen)));
    else begin
      emit(a, enc_movc(0, 4'd13, 8'((d < 0) ? -d : d)));
      if (d < 0) begin
        emit(a, enc_sub(rdst, rcen, 4'd13));
        fix.push_back(a); emit(a, 16'h0);      // J.N skip (below 0)
      end else begin
        emit(a, enc_add(rdst, rcen, 4'd13));
        emit(a, enc_sub(4'd11, 4'd9, rdst));  // 16 - coordinate
        fix.push_back(a); emit(a, 16'h0);      // J.N skip
        fix.push_back(a); emit(a, 16'h1);      // J.Z skip
      end
    end
  endtask

  task automatic emit_point(inout int a, input int dx, input int dy);
    int off;
    fix.delete();
    emit_coord(a, 4'd7, 4'd4, dx);
    emit_coord(a, 4'd8, 4'd5, dy);
    off = dy * 32 + dx;
    emit(a, enc_movc(0, 4'd13, 8'((off < 0) ? -off : off)));
    if (off < 0) emit(a, enc_sub(4'd3, 4'd10, 4'd13));
    else         emit(a, enc_add(4'd3, 4'd10, 4'd13));
    emit_sad_and_compare(a);
    foreach (fix[i]) prog[fix[i]] = enc_j(prog[fix[i]] == 16'h1 ? CC_Z : CC_N, 10'(a));
  endtask

  task automatic emit_prologue(inout int a, output int l_wait);
    emit(a, enc_movc(0, 4'd12, 8'h00));
    l_wait = a;
    emit(a, enc_movr(5'd11, 5'd31));
    emit(a, enc_add(4'd11, 4'd11, 4'd12));
    emit(a, enc_j(CC_Z, 10'(l_wait)));
    emit(a, enc_ld(1'b0));
    emit(a, enc_ld(1'b1));
    emit(a, enc_movc(1, 4'd13, 8'h00));
    emit(a, enc_movc(0, 4'd9, 8'd16));
    emit(a, enc_movc(0, 4'd4, 8'd8));
    emit(a, enc_movc(0, 4'd5, 8'd8));
    emit(a, enc_movc(0, 4'd10, 8'h08));        // (8, 8) = 8*32 + 8
    emit(a, enc_movc(1, 4'd10, 8'h01));
    emit(a, enc_movc(0, 4'd2, 8'hFF));
    emit(a, enc_movc(1, 4'd2, 8'h7F));
    emit_point(a, 0, 0);                       // centre
  endtask

  task automatic emit_move_centre(inout int a);
    emit(a, enc_movr(5'd10, 5'd6));
    emit(a, enc_movr(5'd4, 5'd16));
    emit(a, enc_movr(5'd5, 5'd17));
  endtask

  task automatic emit_epilogue(inout int a, input int l_wait);
    emit(a, enc_movr(5'd28, 5'd6));
    emit(a, enc_movr(5'd30, 5'd2));
    emit(a, enc_movr(5'd31, 5'd12));
    emit(a, enc_j(CC_U, 10'(l_wait)));
  endtask

  task automatic assemble_ds();
    int a, l_wait, l_ldsp, j_sdsp;
    a = 0;
    emit_prologue(a, l_wait);
    l_ldsp = a;
    for (int k = 0; k < 8; k++) emit_point(a, ldsp_x[k], ldsp_y[k]);
    emit(a, enc_sub(4'd11, 4'd6, 4'd10));
    j_sdsp = a; emit(a, 16'h0);
    emit_move_centre(a);
    emit(a, enc_j(CC_U, 10'(l_ldsp)));
    prog[j_sdsp] = enc_j(CC_Z, 10'(a));
    for (int k = 0; k < 4; k++) emit_point(a, sdsp_x[k], sdsp_y[k]);
    emit_epilogue(a, l_wait);
    n_words = a;
  endtask

  task automatic assemble_4ss();
    int a, l_wait, l_step, j_final1, j_final2;
    a = 0;
    emit_prologue(a, l_wait);
    emit(a, enc_movc(0, 4'd0, 8'd4));
    emit(a, enc_movc(1, 4'd0, 8'd0));
    l_step = a;
    for (int k = 0; k < 8; k++) emit_point(a, 2 * sq_x[k], 2 * sq_y[k]);
    emit(a, enc_sub(4'd11, 4'd6, 4'd10));
    j_final1 = a; emit(a, 16'h0);               // centre best: final step
    emit_move_centre(a);
    emit(a, enc_div2(4'd0, 4'd0));
    j_final2 = a; emit(a, 16'h0);               // three steps done: final step
    emit(a, enc_j(CC_U, 10'(l_step)));
    prog[j_final1] = enc_j(CC_Z, 10'(a));
    prog[j_final2] = enc_j(CC_Z, 10'(a));
    for (int k = 0; k < 8; k++) emit_point(a, sq_x[k], sq_y[k]);
    emit_epilogue(a, l_wait);
    n_words = a;
  endtask

  // ---------------- reference models ----------------
  int n_skipped = 0;   // out-of-range points met by the reference searches

  function automatic int cand_sad(input int mbx, input int mby, input int sax, input int say,
                                  input int cx, input int cy);
    int s;
    s = 0;
    for (int j = 0; j < 16; j++)
      for (int i = 0; i < 16; i++) begin
        int d;
        d = int'(cur_sm(mbx + i, mby + j)) - int'(ref_sm(sax + cx + i, say + cy + j));
        s += (d < 0) ? -d : d;
      end
    return s;
  endfunction

  task automatic try_point(input int mbx, input int mby, input int sax, input int say,
                           input int x, input int y, inout int bx, inout int by, inout int best,
                           inout int npts);
    int v;
    if (x < 0 || y < 0 || x > 15 || y > 15) begin n_skipped++; return; end
    npts++;
    v = cand_sad(mbx, mby, sax, say, x, y);
    if (v < best) begin best = v; bx = x; by = y; end
  endtask

  task automatic ref_search(input bit ds, input int mbx, input int mby, input int sax,
                            input int say, output int bx, output int by, output int best,
                            output int npts);
    int cx, cy, steps;
    cx = 8; cy = 8; bx = 8; by = 8; best = 32'h7FFF; npts = 0;
    try_point(mbx, mby, sax, say, 8, 8, bx, by, best, npts);
    if (ds) begin
      forever begin
        for (int k = 0; k < 8; k++)
          try_point(mbx, mby, sax, say, cx + ldsp_x[k], cy + ldsp_y[k], bx, by, best, npts);
        if (bx == cx && by == cy) break;
        cx = bx; cy = by;
      end
      for (int k = 0; k < 4; k++)
        try_point(mbx, mby, sax, say, cx + sdsp_x[k], cy + sdsp_y[k], bx, by, best, npts);
    end else begin
      steps = 4;
      forever begin
        for (int k = 0; k < 8; k++)
          try_point(mbx, mby, sax, say, cx + 2 * sq_x[k], cy + 2 * sq_y[k], bx, by, best, npts);
        if (bx == cx && by == cy) break;
        cx = bx; cy = by;
        steps = steps / 2;
        if (steps == 0) break;
      end
      for (int k = 0; k < 8; k++)
        try_point(mbx, mby, sax, say, cx + sq_x[k], cy + sq_y[k], bx, by, best, npts);
    end
  endtask

  // ---------------- host ----------------
  task automatic host_write(input int idx, input int v);
    @(negedge clk);
    host_spr_we = 1; host_spr_idx = 3'(idx); host_spr_wd = word_t'(v);
    @(negedge clk);
    host_spr_we = 0;
  endtask

  task automatic load_firmware();
    rst_n = 0;
    for (int i = 0; i < n_words; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 10'(i); prog_data = prog[i];
    end
    @(negedge clk);
    prog_we = 0;
    rst_n = 1;
  endtask

  task automatic run_mb(input bit ds, input int mbx, input int mby, input int ox = 0,
                        input int oy = 0);
    int sax, say, bx, by, best, npts, t0;
    sax = mbx - 8 + ox; say = mby - 8 + oy;
    n_skipped = 0;
    ref_search(ds, mbx, mby, sax, say, bx, by, best, npts);
    host_write(0, mbx); host_write(1, mby); host_write(2, sax); host_write(3, say);
    t0 = cycles;
    host_write(7, 1);
    while (spr[7] != 0) @(posedge clk);
    #1;
    $display("INFO %s MB (%0d,%0d): MV (%0d,%0d) SAD %0d, expected MV (%0d,%0d) SAD %0d, %0d points, %0d cycles",
             ds ? "DS " : "4SS", mbx, mby, int'(spr[4] % 32) - 8, int'(spr[4] / 32) - 8, spr[6],
             bx - 8, by - 8, best, npts, cycles - t0);
    expect_true(spr[4] == word_t'(by * 32 + bx), "best position");
    expect_true(spr[6] == word_t'(best), "best SAD");
    expect_true((cycles - t0) * 100 <= 25 * 81475, "cost below 25% of full search");
    // 4SS from (8, 8) stays within 0..15 by construction; DS can leave the range
    if (ox != 0 && ds) expect_true(n_skipped > 0, "border case skips out-of-range points");
    n_skipped = 0;
  endtask

  initial begin
    assemble_ds();
    $display("INFO DS firmware: %0d words", n_words);
    expect_true(n_words <= 1024, "DS firmware fits the 1024-word memory");
    load_firmware();
    run_mb(1, 64, 48);
    run_mb(1, 112, 80);
    run_mb(1, 24, 104);
    run_mb(1, 80, 64, -6, 7);   // true match outside the range: search runs into the borders
    assemble_4ss();
    $display("INFO 4SS firmware: %0d words", n_words);
    expect_true(n_words <= 1024, "4SS firmware fits the 1024-word memory");
    load_firmware();
    run_mb(0, 64, 48);
    run_mb(0, 112, 80);
    run_mb(0, 24, 104);
    run_mb(0, 80, 64, -6, 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
