// tb_local_mem: self-checking test of the local pixel memory: fills the
// macroblock array (256 bytes) and the search-area array (31 rows of stride
// 32) with random bytes and reads both back through their own read ports in
// the same cycles, against an array model.
module tb_local_mem;
  import asip_pkg::*;
  localparam int unsigned SA_DIM = 31, SA_STRIDE = 32, SA_AW = 10;
  logic clk = 0, we = 0, wsel = 0;
  logic [SA_AW-1:0] waddr = '0, sa_raddr = '0;
  logic [7:0] mb_raddr = '0;
  pixel_t wdata = '0, mb_rdata, sa_rdata;
  pixel_t mb_m [256];
  pixel_t sa_m [SA_STRIDE * SA_DIM];
  int checks = 0, failures = 0;

  local_mem #(.SA_DIM(SA_DIM)) dut (.clk, .we, .wsel, .waddr, .wdata, .mb_raddr, .mb_rdata,
                                    .sa_raddr, .sa_rdata);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 256; i++) begin
      mb_m[i] = pixel_t'($urandom);
      we = 1; wsel = 0; waddr = SA_AW'(i); wdata = mb_m[i];
      @(posedge clk); #1;
    end
    for (int i = 0; i < SA_STRIDE * SA_DIM; i++) begin
      sa_m[i] = pixel_t'($urandom);
      we = 1; wsel = 1; waddr = SA_AW'(i); wdata = sa_m[i];
      @(posedge clk); #1;
    end
    we = 0;
    for (int i = 0; i < SA_STRIDE * SA_DIM; i++) begin
      mb_raddr = 8'(i * 7); sa_raddr = SA_AW'((i * 13) % (SA_STRIDE * SA_DIM));
      #1;
      checks += 2;
      if (mb_rdata !== mb_m[mb_raddr]) begin failures++; $display("FAIL mb %0d", mb_raddr); end
      if (sa_rdata !== sa_m[sa_raddr]) begin failures++; $display("FAIL sa %0d", sa_raddr); end
    end
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
