// tb_omi_data_counters: random counter writes and stride steps from random
// threads against a model of four per-thread counter sets, with contexts
// claimed by fork (copy of the issuing thread) and by the host (zeroed).
// A write and a step to the same loop counter add the stride to the value
// written.
module tb_omi_data_counters;
  logic clk = 0, rst_n = 0;
  logic [1:0] tid;
  logic active, we, step_rl, step_wl;
  logic [3:0] fork_mask, host_mask;
  logic [1:0] widx;
  logic [31:0] wdata, stride_rl, stride_wl;
  logic [31:0] rdaddr, rladdr, wraddr, wladdr;
  logic [31:0] m [4][4];
  int checks = 0, failures = 0, copies = 0;

  omi_data_counters dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] cur [4];
    logic [1:0]  other;
    tid = 0; active = 0; fork_mask = 0; host_mask = 0;
    we = 0; widx = 0; wdata = 0; step_rl = 0; step_wl = 0; stride_rl = 0; stride_wl = 0;
    foreach (m[t, i]) m[t][i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      tid = 2'($urandom);
      #1;
      checks++;
      if (rdaddr !== m[tid][0] || rladdr !== m[tid][1] || wraddr !== m[tid][2] ||
          wladdr !== m[tid][3]) begin
        failures++;
        $display("FAIL n=%0d t=%0d %h %h %h %h exp %h %h %h %h", n, tid, rdaddr, rladdr,
                 wraddr, wladdr, m[tid][0], m[tid][1], m[tid][2], m[tid][3]);
      end
      active = $urandom_range(0, 3) != 0;
      we = $urandom_range(0, 1); widx = 2'($urandom); wdata = $urandom_range(0, 1000);
      step_rl = $urandom_range(0, 1); step_wl = $urandom_range(0, 1);
      stride_rl = 32'($signed($urandom_range(0, 8)) - 4);
      stride_wl = 32'($signed($urandom_range(0, 8)) - 4);
      other = tid + 2'($urandom_range(1, 3));
      fork_mask = 0; host_mask = 0;
      case ($urandom_range(0, 9))
        0: fork_mask[other] = 1'b1;
        1: host_mask[other] = 1'b1;
        default: ;
      endcase
      @(posedge clk);
      cur = m[tid];
      if (fork_mask[other]) begin m[other] = cur; copies++; end
      if (host_mask[other]) m[other] = '{0, 0, 0, 0};
      if (active) begin
        if (we) m[tid][widx] = wdata;
        if (step_rl) m[tid][1] = m[tid][1] + stride_rl;
        if (step_wl) m[tid][3] = m[tid][3] + stride_wl;
      end
    end
    @(negedge clk); active = 0; fork_mask = 0; host_mask = 0;
    checks++;
    if (copies == 0) begin failures++; $display("FAIL no fork copy exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
