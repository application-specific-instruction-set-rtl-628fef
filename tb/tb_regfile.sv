// tb_regfile: self-checking test of the register file against an array model:
// random full-word and single-byte writes to all 32 registers, host writes to
// the SPRs (and a processor write to the same SPR winning), both read ports
// (port A only reaching R0..R15) and the SPR outputs; reset clears everything.
module tb_regfile;
  import asip_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] ra_a = '0;
  logic [4:0] ra_b = '0, wa = '0;
  word_t rd_a, rd_b, wd = '0, host_wd = '0;
  logic we_hi = 0, we_lo = 0, host_we = 0;
  logic [2:0] host_idx = '0;
  word_t spr [N_SPR];
  word_t model [NREG];
  int checks = 0, failures = 0;

  regfile dut (.clk, .rst_n, .ra_a, .rd_a, .ra_b, .rd_b, .wa, .wd, .we_hi, .we_lo,
               .host_we, .host_idx, .host_wd, .spr);

  always #5 clk = ~clk;

  task automatic compare_all();
    for (int r = 0; r < NREG; r++) begin
      ra_b = 5'(r); ra_a = 4'(r);
      #1;
      checks++;
      if (rd_b !== model[r]) begin failures++; $display("FAIL R%0d portB=%h exp=%h", r, rd_b, model[r]); end
      if (r < 16) begin
        checks++;
        if (rd_a !== model[r]) begin failures++; $display("FAIL R%0d portA=%h exp=%h", r, rd_a, model[r]); end
      end
    end
    for (int s = 0; s < N_SPR; s++) begin
      checks++;
      if (spr[s] !== model[SPR_BASE + s]) begin failures++; $display("FAIL SPR%0d", s); end
    end
  endtask

  initial begin
    @(posedge clk); #1 rst_n = 1;
    for (int r = 0; r < NREG; r++) model[r] = '0;
    compare_all();
    for (int i = 0; i < 3000; i++) begin
      wa = 5'($urandom); wd = word_t'($urandom);
      we_hi = $urandom % 2; we_lo = $urandom % 2;
      host_we = ($urandom % 4) == 0; host_idx = 3'($urandom); host_wd = word_t'($urandom);
      if (i % 50 == 0) begin host_we = 1; wa = 5'(SPR_BASE + host_idx); we_hi = 1; we_lo = 1; end
      @(posedge clk); #1;
      if (host_we) model[SPR_BASE + host_idx] = host_wd;
      if (we_hi) model[wa][15:8] = wd[15:8];
      if (we_lo) model[wa][7:0]  = wd[7:0];
      we_hi = 0; we_lo = 0; host_we = 0;
      if (i % 100 == 99) compare_all();
    end
    compare_all();
    rst_n = 0; @(posedge clk); #1 rst_n = 1;
    for (int r = 0; r < NREG; r++) model[r] = '0;
    compare_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
