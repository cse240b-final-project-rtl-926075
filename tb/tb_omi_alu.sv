// tb_omi_alu: checks every default OMI function against a reference model
// on random and corner operands, and that other function numbers are refused.
module tb_omi_alu;
  import omi_pkg::*;
  logic [7:0]  func;
  logic [31:0] a, b, y;
  logic        legal;
  int checks = 0, failures = 0;

  omi_alu dut (.func, .a, .b, .y, .legal);

  function automatic logic [31:0] ref_y(logic [7:0] f, logic [31:0] x, logic [31:0] z);
    int unsigned s = z % 32;
    case (f)
      0: return x + z;
      1: return x + (~z + 1);
      2: return x << s;
      3: return x >> s;
      4: begin
        logic [31:0] r = x >> s;
        if (x[31]) for (int k = 0; k < 32; k++) if (k >= 32 - s) r[k] = 1'b1;
        return r;
      end
      5: return x & z;
      6: return x | z;
      7: return x ^ z;
      8: return (z == 0) ? x : x - (x / z) * z;
      default: return 0;
    endcase
  endfunction

  task automatic check(logic [7:0] f, logic [31:0] x, logic [31:0] z);
    func = f; a = x; b = z;
    #1;
    checks++;
    if (f <= 8) begin
      if (!legal || y !== ref_y(f, x, z)) begin
        failures++;
        $display("FAIL func=%0d a=%h b=%h y=%h exp=%h", f, x, z, y, ref_y(f, x, z));
      end
    end else if (legal) begin
      failures++;
      $display("FAIL func=%0d should be illegal", f);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] corners [6] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h8000_0000, 32'h7fff_ffff, 32'd37};
    for (int f = 0; f <= 8; f++)
      foreach (corners[i]) foreach (corners[j]) check(8'(f), corners[i], corners[j]);
    for (int n = 0; n < 2000; n++) check(8'($urandom_range(0, 8)), $urandom, $urandom);
    for (int n = 0; n < 200; n++)  check(8'($urandom_range(0, 8)), $urandom, $urandom_range(0, 40));
    for (int f = 9; f < 256; f += 17) check(8'(f), $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
