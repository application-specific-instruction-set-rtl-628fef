// tb_pc_unit: self-checking test of the program counter: reset, sequential
// fetch, taken jumps (target fetched in the same cycle) and stalls (address
// repeated), against a cycle model, with random stimulus.
module tb_pc_unit;
  localparam int unsigned PC_W = 10;
  logic clk = 0, rst_n = 0, stall = 0, jump = 0;
  logic [PC_W-1:0] target = '0, fetch_addr, pc;
  logic [PC_W-1:0] m_pc;
  int checks = 0, failures = 0;

  pc_unit #(.PC_W(PC_W)) dut (.clk, .rst_n, .stall, .jump, .target, .fetch_addr, .pc);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1; m_pc = 0;
    checks++; if (pc !== 0) begin failures++; $display("FAIL reset pc=%0d", pc); end
    for (int i = 0; i < 2000; i++) begin
      stall  = ($urandom % 5) == 0;
      jump   = ($urandom % 6) == 0;
      target = PC_W'($urandom);
      #1;
      checks++;
      if (fetch_addr !== (jump ? target : m_pc)) begin
        failures++; $display("FAIL fetch_addr=%0d exp=%0d", fetch_addr, jump ? target : m_pc);
      end
      m_pc = (jump ? target : m_pc) + (stall ? 0 : 1);
      @(posedge clk); #1;
      checks++;
      if (pc !== m_pc) begin failures++; $display("FAIL pc=%0d exp=%0d", pc, m_pc); end
    end
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
