// tb_rv_alu: random and corner-case vectors for every ALU operation, compared with results
// worked out here (shift amounts of 32 and more give 0; comparisons are signed).
module tb_rv_alu;
  import rv_pkg::*;
  alu_op_e op;
  word_t a, b, y;
  logic eq, lt;
  int checks = 0, failures = 0;

  rv_alu dut (.*);

  function automatic word_t model(alu_op_e o, word_t x, word_t z);
    longint sx = longint'($signed(x)), sz = longint'($signed(z));
    case (o)
      ALU_ADD:    return word_t'(64'(x) + 64'(z));
      ALU_SUB:    return word_t'(64'(x) + 64'(~z) + 64'd1);
      ALU_AND:    return x & z;
      ALU_OR:     return x | z;
      ALU_XOR:    return x ^ z;
      ALU_SLT:    return (sx < sz) ? 32'd1 : 32'd0;
      ALU_SLL:    return (z > 31) ? '0 : word_t'(64'(x) * (64'd1 << z[4:0]));
      ALU_SRL:    return (z > 31) ? '0 : word_t'(64'(x) / (64'd1 << z[4:0]));
      ALU_PASS_B: return z;
      default:    return '0;
    endcase
  endfunction

  task automatic one(alu_op_e o, word_t x, word_t z);
    op = o; a = x; b = z; #1;
    checks++;
    if (y !== model(o, x, z) || eq !== (x == z) || lt !== ($signed(x) < $signed(z))) begin
      failures++;
      $display("FAIL: op %s a %h b %h y %h expected %h", o.name(), x, z, y, model(o, x, z));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t corner [6] = '{32'h0, 32'h1, 32'h7fff_ffff, 32'h8000_0000, 32'hffff_ffff, 32'd32};
    for (int o = 0; o <= int'(ALU_PASS_B); o++) begin
      foreach (corner[i]) foreach (corner[j]) one(alu_op_e'(o), corner[i], corner[j]);
      for (int k = 0; k < 300; k++) one(alu_op_e'(o), $urandom, (k % 3 == 0) ? word_t'($urandom_range(0, 40)) : $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
