// tb_omi_cond: checks the six condition instructions (signed) against a
// reference built from the sign bits and an unsigned comparison.
module tb_omi_cond;
  import omi_pkg::*;
  opcode_e     op;
  logic [31:0] a, b;
  logic        result;
  int checks = 0, failures = 0;

  omi_cond dut (.op, .a, .b, .result);

  function automatic logic slt(logic [31:0] x, logic [31:0] z);
    if (x[31] != z[31]) return x[31];
    return x < z;
  endfunction

  function automatic logic ref_r(opcode_e o, logic [31:0] x, logic [31:0] z);
    case (o)
      OP_CMP:  return x == z;
      OP_NCMP: return x != z;
      OP_GT:   return slt(z, x);
      OP_GTE:  return !slt(x, z);
      OP_LT:   return slt(x, z);
      OP_LTE:  return !slt(z, x);
      default: return 1'b0;
    endcase
  endfunction

  task automatic check(opcode_e o, logic [31:0] x, logic [31:0] z);
    op = o; a = x; b = z;
    #1;
    checks++;
    if (result !== ref_r(o, x, z)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h got %b", o.name(), x, z, result);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    opcode_e ops [7] = '{OP_CMP, OP_NCMP, OP_GT, OP_GTE, OP_LT, OP_LTE, OP_MOV};
    logic [31:0] v [5] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h8000_0000, 32'h7fff_ffff};
    foreach (ops[k]) foreach (v[i]) foreach (v[j]) check(ops[k], v[i], v[j]);
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] x = $urandom;
      check(ops[$urandom_range(0, 5)], x, ($urandom_range(0, 3) == 0) ? x : $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
