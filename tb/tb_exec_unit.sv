// tb_exec_unit -- random operands for every ALU operation and branch
// condition, compared with results computed here with the JVM's int rules
// (wrapping arithmetic, 5-bit shift counts, narrowing conversions, signed
// comparisons), plus corner values.
module tb_exec_unit;
  import poc_pkg::*;

  alu_e alu;
  br_e  br;
  logic [31:0] a, b, y;
  logic taken;
  int checks = 0, failures = 0;

  exec_unit dut (.*);

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%0d b=%0d: got %0d expected %0d", what, $signed(a), $signed(b), got, exp);
    end
  endtask

  function automatic int ref_alu(alu_e f, int x, int z);
    case (f)
      ALU_MOV:  return x;
      ALU_ADD:  return x + z;
      ALU_SUB:  return x - z;
      ALU_MUL:  return x * z;
      ALU_AND:  return x & z;
      ALU_OR:   return x | z;
      ALU_XOR:  return x ^ z;
      ALU_SHL:  return x << (z & 31);
      ALU_SHR:  return x >>> (z & 31);
      ALU_USHR: return int'(unsigned'(x) >> (z & 31));
      ALU_NEG:  return 0 - x;
      ALU_I2B:  return int'(byte'(x));
      ALU_I2C:  return x & 32'hffff;
      ALU_I2S:  return int'(shortint'(x));
      default:  return x;
    endcase
  endfunction

  function automatic bit ref_br(br_e c, int x, int z);
    case (c)
      BR_EQ: return x == z;
      BR_NE: return x != z;
      BR_LT: return x < z;
      BR_GE: return x >= z;
      BR_GT: return x > z;
      BR_LE: return x <= z;
      BR_ALWAYS: return 1;
      default: return 0;
    endcase
  endfunction

  int corner [6] = '{0, 1, -1, 32'h7fffffff, 32'h80000000, 37};

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int x, z;
      x = (n < 36) ? corner[n % 6] : int'($urandom);
      z = (n < 36) ? corner[(n / 6) % 6] : ((n % 3 == 0) ? x : int'($urandom));
      if (n % 7 == 0 && n >= 36) z = int'($urandom_range(0, 40));
      a = x; b = z;
      for (int f = 0; f <= int'(ALU_I2S); f++) begin
        alu = alu_e'(f); br = BR_NONE; #1;
        chk($sformatf("alu %0d", f), int'(y), ref_alu(alu_e'(f), x, z));
        chk("no branch", taken, 0);
      end
      for (int c = 1; c <= int'(BR_ALWAYS); c++) begin
        alu = ALU_NONE; br = br_e'(c); #1;
        chk($sformatf("br %0d", c), taken, ref_br(br_e'(c), x, z));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
