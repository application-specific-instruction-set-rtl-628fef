// tb_me_asip: end-to-end test of the motion-estimation processor at its
// default parameters (QCIF frame, 31x31 search area, 1024-word firmware).
//
// The testbench assembles a full-search block-matching firmware with the
// asip_pkg encoders, loads it, and plays the host: it writes the macroblock
// and search-area coordinates into R24..R27, sets R31 = 1 to start, waits for
// the firmware to clear R31 and reads the motion vector (R28, R29, relative
// to the search-area centre) and the best SAD (R30). Frames come from the
// frame-memory model: the reference frame is the current one moved by
// (3, -2) plus noise. For each macroblock the expected vector and SAD are
// found here by an exhaustive search over the same 16x16 candidate positions
// with the same tie rule (the first minimum in raster order wins).
// It also checks that every SAD16 lasts 19 cycles with 16 SADU accumulate
// cycles and that each LD keeps the AGU busy N*N + 1 cycles, and it counts the
// mechanisms the design has: SAD16 stalls, AGU interlock stalls on LD and on
// SAD16, instructions executed while a load runs in the background, each jump
// condition taken and not taken, MOVC high and low, DIV2, host SPR writes.
// A mechanism that never happens counts as a failure.
module tb_me_asip;
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

  frame_mem_model #(.FRAME_W(FRAME_W), .AW(AW)) u_fm (
    .clk, .re(ext_re), .frame(ext_frame), .addr(ext_addr), .rdata(ext_rdata));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic expect_true(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- firmware ----------------
  logic [15:0] prog [1024];
  int n_words;

  task automatic emit(inout int a, input logic [15:0] w);
    prog[a] = w;
    a++;
  endtask

  // Full search over 16x16 candidates. Registers:
  //  R1 SAD accumulator   R2 best SAD    R3 candidate line pointer base
  //  R4 cx  R5 cy         R6/R7 best cx/cy (then MV)   R8 = 1   R9 = 16
  //  R10 = 16 (SA row stride 32 minus 16)  R11 scratch  R12 = 0  R13 = 8
  //  R14/R15 SAD16 line pointers
  task automatic assemble();
    int a, l_wait, l_loop, l_next, l_store, pass;
    l_wait = 0; l_loop = 0; l_next = 0; l_store = 0;
    for (pass = 0; pass < 2; pass++) begin
      a = 0;
      emit(a, enc_movc(0, 4'd12, 8'h00));
      emit(a, enc_movc(1, 4'd12, 8'h00));
      l_wait = a;
      emit(a, enc_movr(5'd11, 5'd31));             // wait for start (R31 != 0)
      emit(a, enc_add(4'd11, 4'd11, 4'd12));
      emit(a, enc_j(CC_Z, 10'(l_wait)));
      emit(a, enc_ld(1'b0));                       // macroblock, in the background
      emit(a, enc_movc(0, 4'd8, 8'd1));
      emit(a, enc_movc(1, 4'd8, 8'd0));
      emit(a, enc_movc(0, 4'd9, 8'd16));
      emit(a, enc_movc(0, 4'd10, 8'd16));
      emit(a, enc_movc(0, 4'd2, 8'hFF));
      emit(a, enc_movc(1, 4'd2, 8'h7F));           // best = 0x7FFF
      emit(a, enc_ld(1'b1));                       // search area (waits for the MB load)
      emit(a, enc_movr(5'd3, 5'd12));
      emit(a, enc_movr(5'd4, 5'd12));
      emit(a, enc_movr(5'd5, 5'd12));
      l_loop = a;
      emit(a, enc_movr(5'd1, 5'd12));
      emit(a, enc_movr(5'd14, 5'd12));
      emit(a, enc_movr(5'd15, 5'd3));
      for (int i = 0; i < 16; i++) emit(a, enc_sad16(4'd1, 4'd14, 4'd15));
      emit(a, enc_sub(4'd11, 4'd2, 4'd1));         // best - cur
      emit(a, enc_j(CC_N, 10'(l_next)));
      emit(a, enc_j(CC_Z, 10'(l_next)));
      emit(a, enc_movr(5'd2, 5'd1));
      emit(a, enc_movr(5'd6, 5'd4));
      emit(a, enc_movr(5'd7, 5'd5));
      l_next = a;
      emit(a, enc_add(4'd4, 4'd4, 4'd8));
      emit(a, enc_add(4'd3, 4'd3, 4'd8));
      emit(a, enc_sub(4'd11, 4'd4, 4'd9));
      emit(a, enc_j(CC_N, 10'(l_loop)));
      emit(a, enc_movr(5'd4, 5'd12));
      emit(a, enc_add(4'd3, 4'd3, 4'd10));
      emit(a, enc_add(4'd5, 4'd5, 4'd8));
      emit(a, enc_sub(4'd11, 4'd5, 4'd9));
      emit(a, enc_j(CC_N, 10'(l_loop)));
      emit(a, enc_div2(4'd13, 4'd9));              // 8 = centre of the search area
      emit(a, enc_sub(4'd6, 4'd6, 4'd13));
      emit(a, enc_sub(4'd7, 4'd7, 4'd13));
      emit(a, enc_sub(4'd11, 4'd2, 4'd12));
      emit(a, enc_j(CC_P, 10'(l_store)));          // best SAD > 0
      emit(a, enc_movc(0, 4'd2, 8'h00));
      l_store = a;
      emit(a, enc_movr(5'd28, 5'd6));
      emit(a, enc_movr(5'd29, 5'd7));
      emit(a, enc_movr(5'd30, 5'd2));
      emit(a, enc_movr(5'd31, 5'd12));             // done
      emit(a, enc_j(CC_U, 10'(l_wait)));
    end
    n_words = a;
  endtask

  // ---------------- reference search ----------------
  task automatic ref_search(input int mbx, input int mby, input int sax, input int say,
                            output int bx, output int by, output int best);
    best = 32'h7FFF; bx = 0; by = 0;
    for (int cy = 0; cy < 16; cy++)
      for (int cx = 0; cx < 16; cx++) begin
        int s;
        s = 0;
        for (int j = 0; j < 16; j++)
          for (int i = 0; i < 16; i++) begin
            int d;
            d = int'(cur_px(mbx + i, mby + j)) - int'(ref_px(sax + cx + i, say + cy + j));
            s += (d < 0) ? -d : d;
          end
        if (s < best) begin best = s; bx = cx; by = cy; end
      end
  endtask

  // ---------------- mechanism counters ----------------
  int n_sad_stall, n_agu_stall_ld, n_agu_stall_sad, n_overlap, n_movc_hi, n_movc_lo;
  int n_div2, n_host_wr, n_sad16;
  int n_taken [4], n_not [4];
  int sad_len, sad_acc, busy_len, bad_sad_len, bad_busy_len, cycles;
  logic [15:0] ir;
  logic ir_v, busy_q;

  assign ir   = dut.u_ctrl.ir;
  assign ir_v = dut.u_ctrl.ir_v;

  initial begin
    n_sad_stall = 0; n_agu_stall_ld = 0; n_agu_stall_sad = 0; n_overlap = 0;
    n_movc_hi = 0; n_movc_lo = 0; n_div2 = 0; n_host_wr = 0; n_sad16 = 0;
    for (int i = 0; i < 4; i++) begin n_taken[i] = 0; n_not[i] = 0; end
    sad_len = 0; sad_acc = 0; busy_len = 0; bad_sad_len = 0; bad_busy_len = 0;
    busy_q = 0; cycles = 0;
  end

  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (host_spr_we) n_host_wr++;
    if (stall_sad) n_sad_stall++;
    if (stall_agu && opcode_e'(ir[15:13]) == OP_LD) n_agu_stall_ld++;
    if (stall_agu && opcode_e'(ir[15:13]) == OP_SAD16) n_agu_stall_sad++;
    if (ir_v && !dut.stall) begin
      opcode_e op;
      op = opcode_e'(ir[15:13]);
      if (agu_busy && op != OP_LD && op != OP_SAD16) n_overlap++;
      if (op == OP_MOVC) begin if (ir[12]) n_movc_hi++; else n_movc_lo++; end
      if (op == OP_DIV2) n_div2++;
      if (op == OP_J) begin
        if (dut.jump) n_taken[ir[12:11]]++; else n_not[ir[12:11]]++;
      end
    end
    // SAD16 length: cycles with the SAD16 in the IR, from its first
    // non-waiting cycle to its write-back
    if (ir_v && opcode_e'(ir[15:13]) == OP_SAD16 && !stall_agu) begin
      sad_len++;
      if (dut.ctrl.sad_en) sad_acc++;
      if (!dut.stall) begin
        n_sad16++;
        if (sad_len != 19 || sad_acc != 16) bad_sad_len++;
        sad_len = 0; sad_acc = 0;
      end
    end
    // LD length
    if (agu_busy) busy_len++;
    else if (busy_q) begin
      if (busy_len != 16 * 16 + 1 && busy_len != 31 * 31 + 1) bad_busy_len++;
      busy_len = 0;
    end
    busy_q <= agu_busy;
  end

  task automatic host_write(input int idx, input int v);
    @(negedge clk);
    host_spr_we = 1; host_spr_idx = 3'(idx); host_spr_wd = word_t'(v);
    @(negedge clk);
    host_spr_we = 0;
  endtask

  task automatic run_mb(input int mbx, input int mby);
    int sax, say, bx, by, best, t0;
    sax = mbx - 8; say = mby - 8;
    ref_search(mbx, mby, sax, say, bx, by, best);
    host_write(0, mbx); host_write(1, mby); host_write(2, sax); host_write(3, say);
    t0 = cycles;
    host_write(7, 1);
    while (spr[7] != 0) @(posedge clk);
    #1;
    $display("INFO MB (%0d,%0d): MV (%0d,%0d) SAD %0d, expected MV (%0d,%0d) SAD %0d, %0d cycles",
             mbx, mby, $signed(spr[4]), $signed(spr[5]), spr[6], bx - 8, by - 8, best,
             cycles - t0);
    expect_true(spr[4] == word_t'(bx - 8), "MV x");
    expect_true(spr[5] == word_t'(by - 8), "MV y");
    expect_true(spr[6] == word_t'(best), "best SAD");
  endtask

  initial begin
    assemble();
    $display("INFO full-search firmware: %0d words", n_words);
    rst_n = 0;
    for (int i = 0; i < n_words; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 10'(i); prog_data = prog[i];
    end
    @(negedge clk);
    prog_we = 0;
    rst_n = 1;
    run_mb(64, 48);   // interior macroblock: true motion (3, -2)
    run_mb(16, 96);
    expect_true(bad_sad_len == 0, $sformatf("%0d SAD16 not 19 cycles / 16 accumulations", bad_sad_len));
    expect_true(bad_busy_len == 0, $sformatf("%0d LD with wrong busy length", bad_busy_len));
    expect_true(n_sad16 == 2 * 256 * 16, $sformatf("SAD16 count %0d", n_sad16));
    $display("INFO mechanisms: sad_stall=%0d agu_stall_ld=%0d agu_stall_sad=%0d overlap=%0d",
             n_sad_stall, n_agu_stall_ld, n_agu_stall_sad, n_overlap);
    $display("INFO movc_hi=%0d movc_lo=%0d div2=%0d host_writes=%0d", n_movc_hi, n_movc_lo,
             n_div2, n_host_wr);
    for (int c = 0; c < 4; c++)
      $display("INFO jump cc=%0d taken=%0d not_taken=%0d", c, n_taken[c], n_not[c]);
    expect_true(n_sad_stall > 0, "SAD16 stall seen");
    expect_true(n_agu_stall_ld > 0, "LD waiting for AGU seen");
    expect_true(n_agu_stall_sad > 0, "SAD16 waiting for AGU seen");
    expect_true(n_overlap > 0, "instructions overlapping a load seen");
    expect_true(n_movc_hi > 0 && n_movc_lo > 0, "MOVC high and low seen");
    expect_true(n_div2 > 0, "DIV2 seen");
    expect_true(n_host_wr > 0, "host SPR writes seen");
    for (int c = 0; c < 4; c++) expect_true(n_taken[c] > 0, $sformatf("jump cc=%0d taken", c));
    expect_true(n_not[1] > 0 && n_not[3] > 0, "conditional jumps not taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
