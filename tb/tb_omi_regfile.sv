// tb_omi_regfile: random writes and reads against a model of 16 registers,
// including reset to zero and read-old-value during a write.
module tb_omi_regfile;
  logic clk = 0, rst_n = 0;
  logic [3:0] ra_idx, rb_idx, wa;
  logic [31:0] ra_data, rb_data, wd;
  logic we;
  logic [31:0] model [16];
  int checks = 0, failures = 0;

  omi_regfile dut (.clk, .rst_n, .ra_idx, .rb_idx, .ra_data, .rb_data, .we, .wa, .wd);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wa = 0; wd = 0; ra_idx = 0; rb_idx = 0;
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); wa = 4'($urandom); wd = $urandom;
      ra_idx = 4'($urandom); rb_idx = ($urandom_range(0, 1) != 0) ? wa : 4'($urandom);
      #1;
      checks += 2;
      if (ra_data !== model[ra_idx]) begin failures++; $display("FAIL a r%0d", ra_idx); end
      if (rb_data !== model[rb_idx]) begin failures++; $display("FAIL b r%0d", rb_idx); end
      @(posedge clk);
      if (we) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
