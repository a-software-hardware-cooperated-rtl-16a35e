// exec_unit -- integer execution unit and branch condition.
//
// Computes the result of an O_E operation (add, subtract, multiply, logic,
// shifts with the JVM's 5-bit shift count, negate, narrowing conversions) or
// a move, and evaluates the condition of an O_B bytecode comparing a with b
// (b is zero for the single-operand if<cond> forms).  Arithmetic wraps as
// in the JVM.  The document does not describe the execution unit; this
// integer unit is this design's own, and is enough to run integer bytecode.
//
// Purely combinational.
module exec_unit
  import poc_pkg::*;
(
  input  alu_e         alu,
  input  br_e          br,
  input  logic [31:0]  a,
  input  logic [31:0]  b,
  output logic [31:0]  y,
  output logic         taken
);

  logic signed [31:0] sa, sb;
  assign sa = a;
  assign sb = b;

  always_comb begin
    unique case (alu)
      ALU_MOV:  y = a;
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_MUL:  y = a * b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_SHL:  y = a << b[4:0];
      ALU_SHR:  y = 32'(sa >>> b[4:0]);
      ALU_USHR: y = a >> b[4:0];
      ALU_NEG:  y = -a;
      ALU_I2B:  y = {{24{a[7]}}, a[7:0]};
      ALU_I2C:  y = {16'd0, a[15:0]};
      ALU_I2S:  y = {{16{a[15]}}, a[15:0]};
      default:  y = a;
    endcase
    unique case (br)
      BR_EQ:     taken = (sa == sb);
      BR_NE:     taken = (sa != sb);
      BR_LT:     taken = (sa <  sb);
      BR_GE:     taken = (sa >= sb);
      BR_GT:     taken = (sa >  sb);
      BR_LE:     taken = (sa <= sb);
      BR_ALWAYS: taken = 1'b1;
      default:   taken = 1'b0;
    endcase
  end

endmodule
