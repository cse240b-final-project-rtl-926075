// tb_omi_imem: loads random instruction words and reads them back.
module tb_omi_imem;
  import omi_pkg::*;
  logic clk = 0;
  logic [7:0] raddr, waddr;
  instr_t rdata, wdata;
  logic we;
  instr_t m [256];
  int checks = 0, failures = 0;

  omi_imem dut (.clk, .raddr, .rdata, .we, .waddr, .wdata);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; raddr = 0; waddr = 0; wdata = '0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      we = 1; waddr = 8'(a); wdata = {$urandom, $urandom, $urandom};
      m[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      raddr = 8'($urandom);
      #1;
      checks++;
      if (rdata !== m[raddr]) begin failures++; $display("FAIL addr %0d", raddr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
