// tb_me_asip_mvfast: runs an MVFAST (motion vector field adaptive search)
// firmware on the processor at its default parameters, on the smooth test
// image, and checks it against a reference model written here.
//
// The host passes the motion vectors of the left, top and top-right
// neighbour macroblocks as search-area pointers ((mvy+8)*32 + mvx+8) in
// R28..R30. The firmware decodes each pointer into x and y (five DIV2 and
// five doublings), takes the largest city-block magnitude |mvx| + |mvy| and
// classifies the motion:
//   low    (magnitude < L1): small-diamond search around (0,0), repeated
//          until the centre stays best;
//   medium (L1 <= magnitude <= L2): large-diamond search around (0,0) until
//          the centre stays best, then one small-diamond step;
//   high   (magnitude > L2): the centre becomes the best of (0,0) and the
//          three predictors, then small-diamond steps as for low motion.
// L1 = 1 and L2 = 2 are typical MVFAST values; the firmware loads them as
// constants. Points outside the 16x16 candidate range are skipped; points
// already visited are evaluated again. A later point replaces the best only
// if its SAD is smaller. Each of the three modes must occur at least once.
// Results: best pointer in R28, best SAD in R30, R31 cleared.
module tb_me_asip_mvfast;
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

  // ---------------- assembler ----------------
  logic [15:0] prog [1024];
  int n_words;
  int fix [$];       // jumps to patch with the current point's skip address

  task automatic emit(inout int a, input logic [15:0] w);
    prog[a] = w;
    a++;
  endtask

  // Registers: R0 largest predictor magnitude, then the mode (0 = medium), R1 SAD, R2 best SAD, R3 candidate pointer,
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


  localparam int L1 = 1, L2 = 2;

  // decode the predictor pointer in SPR R28+k into R3 (pointer), R7 (x), R8 (y)
  task automatic emit_decode(inout int a, input int k);
    emit(a, enc_movr(5'd3, 5'(28 + k)));
    emit(a, enc_div2(4'd8, 4'd3));
    for (int i = 0; i < 4; i++) emit(a, enc_div2(4'd8, 4'd8));
    emit(a, enc_add(4'd13, 4'd8, 4'd8));
    for (int i = 0; i < 4; i++) emit(a, enc_add(4'd13, 4'd13, 4'd13));
    emit(a, enc_sub(4'd7, 4'd3, 4'd13));
    emit(a, enc_movc(1, 4'd13, 8'd0));          // R13's high byte back to 0
  endtask

  // R14 = |R_src - 8|
  task automatic emit_absdiff8(inout int a, input logic [3:0] dst, input logic [3:0] src);
    emit(a, enc_movc(0, 4'd13, 8'd8));
    emit(a, enc_sub(dst, src, 4'd13));
    emit(a, enc_j(CC_P, 10'(a + 2)));
    emit(a, enc_sub(dst, 4'd12, dst));
  endtask

  task automatic assemble_mvfast();
    int a, l_wait, l_sdsp, l_ldsp, l_out, j_low, j_high, j_sd, j_out1, j_out2, j_med;
    int ja [$];
    a = 0;
    emit_prologue(a, l_wait);                  // evaluates (0,0) = (8,8)
    // largest predictor magnitude into R0
    emit(a, enc_movc(0, 4'd0, 8'd0));
    emit(a, enc_movc(1, 4'd0, 8'd0));
    for (int k = 0; k < 3; k++) begin
      int skip;
      emit_decode(a, k);
      emit_absdiff8(a, 4'd14, 4'd7);
      emit_absdiff8(a, 4'd15, 4'd8);
      emit(a, enc_add(4'd14, 4'd14, 4'd15));
      emit(a, enc_sub(4'd11, 4'd0, 4'd14));
      skip = a + 3;
      emit(a, enc_j(CC_P, 10'(skip)));
      emit(a, enc_j(CC_Z, 10'(skip)));
      emit(a, enc_movr(5'd0, 5'd14));
    end
    // classify
    emit(a, enc_movc(0, 4'd13, 8'(L1)));
    emit(a, enc_sub(4'd11, 4'd0, 4'd13));
    j_low = a; emit(a, 16'h0);                 // J.N LOW
    emit(a, enc_movc(0, 4'd13, 8'(L2)));
    emit(a, enc_sub(4'd11, 4'd0, 4'd13));
    j_high = a; emit(a, 16'h0);                // J.P HIGH
    // medium: mode 0, large diamond from (0,0)
    emit(a, enc_movc(0, 4'd0, 8'd0));
    l_ldsp = a;
    for (int k = 0; k < 8; k++) emit_point(a, ldsp_x[k], ldsp_y[k]);
    emit(a, enc_sub(4'd11, 4'd6, 4'd10));
    j_sd = a; emit(a, 16'h0);                  // J.Z SDSP
    emit_move_centre(a);
    emit(a, enc_j(CC_U, 10'(l_ldsp)));
    // high: best of (0,0) and the predictors becomes the centre
    prog[j_high] = enc_j(CC_P, 10'(a));
    for (int k = 0; k < 3; k++) begin
      emit_decode(a, k);
      fix.delete();
      emit_sad_and_compare(a);
      foreach (fix[i]) prog[fix[i]] = enc_j(prog[fix[i]] == 16'h1 ? CC_Z : CC_N, 10'(a));
    end
    emit_move_centre(a);
    // low (and high after the centre move): mode 1, small diamond repeated
    prog[j_low] = enc_j(CC_N, 10'(a));
    emit(a, enc_movc(0, 4'd0, 8'd1));
    l_sdsp = a;
    prog[j_sd] = enc_j(CC_Z, 10'(a));
    for (int k = 0; k < 4; k++) emit_point(a, sdsp_x[k], sdsp_y[k]);
    emit(a, enc_add(4'd11, 4'd0, 4'd12));
    j_out1 = a; emit(a, 16'h0);                // medium: one small diamond only
    emit(a, enc_sub(4'd11, 4'd6, 4'd10));
    j_out2 = a; emit(a, 16'h0);                // centre stayed best
    emit_move_centre(a);
    emit(a, enc_j(CC_U, 10'(l_sdsp)));
    prog[j_out1] = enc_j(CC_Z, 10'(a));
    prog[j_out2] = enc_j(CC_Z, 10'(a));
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


  task automatic ref_mvfast(input int mbx, input int mby, input int sax, input int say,
                            input int px [3], input int py [3], output int mode,
                            output int bx, output int by, output int best, output int npts);
    int cx, cy, mag;
    cx = 8; cy = 8; bx = 8; by = 8; best = 32'h7FFF; npts = 0;
    try_point(mbx, mby, sax, say, 8, 8, bx, by, best, npts);
    mag = 0;
    for (int k = 0; k < 3; k++) begin
      int m;
      m = ((px[k] < 8) ? 8 - px[k] : px[k] - 8) + ((py[k] < 8) ? 8 - py[k] : py[k] - 8);
      if (m > mag) mag = m;
    end
    mode = (mag < L1) ? 0 : (mag <= L2) ? 1 : 2;
    if (mode == 1) begin
      forever begin
        for (int k = 0; k < 8; k++)
          try_point(mbx, mby, sax, say, cx + ldsp_x[k], cy + ldsp_y[k], bx, by, best, npts);
        if (bx == cx && by == cy) break;
        cx = bx; cy = by;
      end
      for (int k = 0; k < 4; k++)
        try_point(mbx, mby, sax, say, cx + sdsp_x[k], cy + sdsp_y[k], bx, by, best, npts);
    end else begin
      if (mode == 2) begin
        for (int k = 0; k < 3; k++)
          try_point(mbx, mby, sax, say, px[k], py[k], bx, by, best, npts);
        cx = bx; cy = by;
      end
      forever begin
        for (int k = 0; k < 4; k++)
          try_point(mbx, mby, sax, say, cx + sdsp_x[k], cy + sdsp_y[k], bx, by, best, npts);
        if (bx == cx && by == cy) break;
        cx = bx; cy = by;
      end
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


  int n_mode [3] = '{0, 0, 0};

  // predictors given as motion vectors relative to (0,0)
  task automatic run_mb(input int mbx, input int mby, input int mvx [3], input int mvy [3]);
    int sax, say, bx, by, best, npts, t0, mode;
    int px [3], py [3];
    sax = mbx - 8; say = mby - 8;
    for (int k = 0; k < 3; k++) begin px[k] = mvx[k] + 8; py[k] = mvy[k] + 8; end
    ref_mvfast(mbx, mby, sax, say, px, py, mode, bx, by, best, npts);
    n_mode[mode]++;
    host_write(0, mbx); host_write(1, mby); host_write(2, sax); host_write(3, say);
    for (int k = 0; k < 3; k++) host_write(4 + k, py[k] * 32 + px[k]);
    t0 = cycles;
    host_write(7, 1);
    while (spr[7] != 0) @(posedge clk);
    #1;
    $display("INFO MVFAST %s MB (%0d,%0d): MV (%0d,%0d) SAD %0d, expected MV (%0d,%0d) SAD %0d, %0d points, %0d cycles",
             mode == 0 ? "low   " : mode == 1 ? "medium" : "high  ", mbx, mby,
             int'(spr[4] % 32) - 8, int'(spr[4] / 32) - 8, spr[6], bx - 8, by - 8, best, npts,
             cycles - t0);
    expect_true(spr[4] == word_t'(by * 32 + bx), "best position");
    expect_true(spr[6] == word_t'(best), "best SAD");
  endtask

  initial begin
    assemble_mvfast();
    $display("INFO MVFAST firmware: %0d words", n_words);
    expect_true(n_words <= 1024, "MVFAST firmware fits the 1024-word memory");
    load_firmware();
    run_mb(64, 48, '{0, 0, 0}, '{0, 0, 0});        // low motion
    run_mb(112, 80, '{1, 0, 1}, '{0, -1, -1});     // medium motion
    run_mb(24, 104, '{3, 5, -4}, '{-2, 5, 1});     // high motion, one exact predictor
    run_mb(80, 64, '{2, -6, 7}, '{-1, 0, 7});      // high motion, no exact predictor
    for (int m = 0; m < 3; m++) expect_true(n_mode[m] > 0, $sformatf("mode %0d used", m));
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
