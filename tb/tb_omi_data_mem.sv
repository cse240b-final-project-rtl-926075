// tb_omi_data_mem: random writes and five-port reads against a model,
// including address wrap-around above the memory depth.
module tb_omi_data_mem;
  localparam int DEPTH = 64;
  logic clk = 0;
  logic [31:0] raddr [5];
  logic [31:0] rdata [5];
  logic we;
  logic [31:0] waddr, wdata;
  logic [31:0] m [DEPTH];
  int checks = 0, failures = 0;

  omi_data_mem #(.DEPTH(DEPTH)) dut (.clk, .raddr, .rdata, .we, .waddr, .wdata);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0;
    foreach (raddr[p]) raddr[p] = 0;
    foreach (m[i]) m[i] = 0;
    // fill the memory first: it has no reset
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = a; wdata = 0;
    end
    @(negedge clk);
    we = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); waddr = $urandom_range(0, 2 * DEPTH - 1); wdata = $urandom;
      foreach (raddr[p]) raddr[p] = $urandom_range(0, 2 * DEPTH - 1);
      #1;
      foreach (raddr[p]) begin
        checks++;
        if (rdata[p] !== m[raddr[p] % DEPTH]) begin
          failures++;
          $display("FAIL port %0d addr %0d", p, raddr[p]);
        end
      end
      @(posedge clk);
      if (we) m[waddr % DEPTH] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
