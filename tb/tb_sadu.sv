// tb_sadu: self-checking test of the serial SAD unit: for random lines of 16
// pixel pairs it loads a random initial value, accumulates for 16 enabled
// cycles (with idle cycles in between) and compares with the sum of absolute
// differences worked out here; also checks that start overrides en and that
// a full 16x16 block of maximal differences reaches 65280.
module tb_sadu;
  import asip_pkg::*;
  logic clk = 0, start = 0, en = 0;
  word_t sad_init = '0, sad;
  pixel_t mb_px = '0, cand_px = '0;
  int checks = 0, failures = 0;
  int exp;

  sadu dut (.clk, .start, .en, .sad_init, .mb_px, .cand_px, .sad);

  always #5 clk = ~clk;

  task automatic chk(input int e, input string what);
    checks++;
    if (sad !== word_t'(e)) begin
      failures++; $display("FAIL %s sad=%0d exp=%0d", what, sad, e);
    end
  endtask

  initial begin
    for (int line = 0; line < 200; line++) begin
      sad_init = word_t'($urandom % 20000);
      start = 1; en = 1;   // start has priority
      @(posedge clk); #1;
      start = 0;
      exp = int'(sad_init);
      chk(exp, "after start");
      for (int i = 0; i < 16; i++) begin
        en      = ($urandom % 4) != 0;
        mb_px   = pixel_t'($urandom);
        cand_px = pixel_t'($urandom);
        if (en) exp += (mb_px > cand_px) ? mb_px - cand_px : cand_px - mb_px;
        @(posedge clk); #1;
      end
      en = 0;
      chk(exp, "line");
    end
    // worst-case block
    sad_init = 0; start = 1; @(posedge clk); #1; start = 0;
    en = 1;
    for (int i = 0; i < 256; i++) begin
      mb_px = (i % 2) ? 8'd255 : 8'd0; cand_px = ~mb_px;
      @(posedge clk); #1;
    end
    en = 0;
    chk(65280, "max block");
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
