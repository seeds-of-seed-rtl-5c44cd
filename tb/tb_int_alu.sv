// tb_int_alu: self-checking test of the single-cycle ALU.
// Drives every operation with directed corner values and random operands
// and compares with a reference computed in the testbench.
module tb_int_alu;
  import seed_pkg::*;

  alu_op_t op;
  xlen_t   a, b, y;
  int      checks = 0, failures = 0;

  int_alu #(.W(XLEN)) dut (.op, .a, .b, .y);

  function automatic xlen_t ref_alu(alu_op_t o, xlen_t x, xlen_t z);
    case (o)
      ALU_ADD: return x + z;
      ALU_SUB: return x - z;
      ALU_AND: return x & z;
      ALU_OR:  return x | z;
      ALU_XOR: return x ^ z;
      ALU_SLL: return x << z[5:0];
      ALU_SRL: return x >> z[5:0];
      default: return (($signed(x) < $signed(z)) ? 64'd1 : 64'd0);
    endcase
  endfunction

  task automatic check(alu_op_t o, xlen_t x, xlen_t z);
    xlen_t e;
    op = o; a = x; b = z;
    #1;
    e = ref_alu(o, x, z);
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", o, x, z, y, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed corners
    check(ALU_SLT, 64'hFFFF_FFFF_FFFF_FFFF, 64'd0);     // -1 < 0
    check(ALU_SLT, 64'd0, 64'hFFFF_FFFF_FFFF_FFFF);
    check(ALU_SLL, 64'd1, 64'd63);
    check(ALU_SRL, 64'h8000_0000_0000_0000, 64'd63);
    check(ALU_SUB, 64'd0, 64'd1);
    for (int i = 0; i < 2000; i++) begin
      check(alu_op_t'($urandom_range(0, 7)), {$urandom, $urandom}, {$urandom, $urandom});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
