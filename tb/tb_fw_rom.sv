// tb_fw_rom: self-checking test of the firmware memory: fills all 1024 words
// through the load port with a pseudo-random image, then reads every word
// back in a scrambled order.
module tb_fw_rom;
  localparam int unsigned PC_W = 10;
  logic clk = 0, load_we = 0;
  logic [PC_W-1:0] load_addr = '0, addr = '0;
  logic [15:0] load_data = '0, data;
  logic [15:0] img [2**PC_W];
  int checks = 0, failures = 0;

  fw_rom #(.PC_W(PC_W)) dut (.clk, .load_we, .load_addr, .load_data, .addr, .data);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 2**PC_W; i++) begin
      img[i]    = 16'($urandom);
      load_we   = 1; load_addr = PC_W'(i); load_data = img[i];
      @(posedge clk); #1;
    end
    load_we = 0;
    for (int i = 0; i < 2**PC_W; i++) begin
      addr = PC_W'(i * 37 + 5);
      #1;
      checks++;
      if (data !== img[addr]) begin
        failures++; $display("FAIL addr=%0d data=%h exp=%h", addr, data, img[addr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
