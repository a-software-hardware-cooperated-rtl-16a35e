// poc_classifier -- POC type classification of one JVM bytecode.
//
// Looks at an opcode and the four bytes after it and returns a dec_t record:
// the POC type (P, O_E, O_B, O_C, O_T or C), the data type and width of the
// value it moves, how many values an operator pops, where a producer takes
// its value from, the local-variable index, the immediate (constant, branch
// offset or iinc increment) and the bytecode length.  The P' tag opcode is
// recognised as a producer whose source is "data forwarding or top of stack"
// (DF_TOS) with width 1.
//
// The POC types and their meaning follow the document; the document does not
// list the type of each of the JVM's opcodes, so the table below is this
// design's own assignment from the JVM specification: constant and load
// bytecodes are P, stores are C, arithmetic, conversions, comparisons and
// array accesses are O_E, conditional branches and gotos are O_B, field
// access, object creation and type checks (which need micro-code) are O_C,
// and stack shuffles, calls, returns, switches and everything else are O_T.
// exec_ok marks the bytecodes the integer execution unit of tpoc_java_core
// can run; the others are still classified and folded but trap when executed.
//
// Purely combinational; no clock.
module poc_classifier
  import poc_pkg::*;
(
  input  logic [7:0]     op,        // opcode byte
  input  logic [7:0]     b1,        // following bytes (operands)
  input  logic [7:0]     b2,
  input  logic [7:0]     b3,
  input  logic [7:0]     b4,
  input  logic [PCW-1:0] pc,
  input  logic           valid,
  output dec_t           d
);

  logic [31:0] s8, s16, s32;
  assign s8  = {{24{b1[7]}}, b1};
  assign s16 = {{16{b1[7]}}, b1, b2};
  assign s32 = {b1, b2, b3, b4};

  // Types of the load/store families, in JVM order: i, l, f, d, a.
  function automatic dtype_e fam5(logic [2:0] i);
    case (i)
      3'd0:    return DT_INT;
      3'd1:    return DT_LONG;
      3'd2:    return DT_FLOAT;
      3'd3:    return DT_DOUBLE;
      default: return DT_REF;
    endcase
  endfunction

  // Types of the arithmetic families, in JVM order: i, l, f, d.
  function automatic dtype_e fam4(logic [1:0] i);
    case (i)
      2'd0:    return DT_INT;
      2'd1:    return DT_LONG;
      2'd2:    return DT_FLOAT;
      default: return DT_DOUBLE;
    endcase
  endfunction

  logic [7:0] rel;   // opcode minus the start of its family

  always_comb begin
    d         = '0;
    d.valid   = valid;
    d.opcode  = op;
    d.pc      = pc;
    d.len     = 3'd1;
    d.poc     = POC_OT;
    d.dtype   = DT_NONE;
    d.stype   = DT_NONE;
    d.nsrc    = 3'd0;
    d.has_res = 1'b0;
    d.psrc    = PS_CONST;
    d.alu     = ALU_NONE;
    d.br      = BR_NONE;
    d.exec_ok = 1'b0;
    rel       = 8'd0;

    if (op == OP_PTAG) begin
      d.poc = POC_P; d.psrc = PS_DFTOS; d.dtype = DT_INT; d.exec_ok = 1'b1;
    end else if (op == 8'h00) begin                       // nop
      d.exec_ok = 1'b1;
    end else if (op == 8'h01) begin                       // aconst_null
      d.poc = POC_P; d.dtype = DT_REF; d.imm = 32'd0; d.exec_ok = 1'b1;
    end else if (op >= 8'h02 && op <= 8'h08) begin        // iconst_m1..5
      d.poc = POC_P; d.dtype = DT_INT; d.exec_ok = 1'b1;
      d.imm = 32'(op) - 32'd3;
    end else if (op >= 8'h09 && op <= 8'h0a) begin        // lconst
      d.poc = POC_P; d.dtype = DT_LONG; d.imm = 32'(op - 8'h09);
    end else if (op >= 8'h0b && op <= 8'h0d) begin        // fconst
      d.poc = POC_P; d.dtype = DT_FLOAT;
    end else if (op >= 8'h0e && op <= 8'h0f) begin        // dconst
      d.poc = POC_P; d.dtype = DT_DOUBLE;
    end else if (op == 8'h10) begin                       // bipush
      d.poc = POC_P; d.dtype = DT_INT; d.len = 3'd2; d.imm = s8; d.exec_ok = 1'b1;
    end else if (op == 8'h11) begin                       // sipush
      d.poc = POC_P; d.dtype = DT_INT; d.len = 3'd3; d.imm = s16; d.exec_ok = 1'b1;
    end else if (op == 8'h12) begin                       // ldc
      d.poc = POC_P; d.psrc = PS_POOL; d.dtype = DT_INT; d.len = 3'd2;
    end else if (op == 8'h13) begin                       // ldc_w
      d.poc = POC_P; d.psrc = PS_POOL; d.dtype = DT_INT; d.len = 3'd3;
    end else if (op == 8'h14) begin                       // ldc2_w
      d.poc = POC_P; d.psrc = PS_POOL; d.dtype = DT_LONG; d.len = 3'd3;
    end else if (op >= 8'h15 && op <= 8'h19) begin        // xload idx
      d.poc = POC_P; d.psrc = PS_LV; d.len = 3'd2; d.lv_idx = b1; d.exec_ok = 1'b1;
      d.dtype = fam5(3'(op - 8'h15));
    end else if (op >= 8'h1a && op <= 8'h2d) begin        // xload_n
      rel = op - 8'h1a;
      d.poc = POC_P; d.psrc = PS_LV; d.lv_idx = {6'd0, rel[1:0]}; d.exec_ok = 1'b1;
      d.dtype = fam5(3'(rel >> 2));
    end else if (op >= 8'h2e && op <= 8'h35) begin        // xaload
      d.poc = POC_OE; d.nsrc = 3'd2; d.has_res = 1'b1; d.stype = DT_ANY;
      case (op)
        8'h2f:   d.dtype = DT_LONG;
        8'h30:   d.dtype = DT_FLOAT;
        8'h31:   d.dtype = DT_DOUBLE;
        8'h32:   d.dtype = DT_REF;
        default: d.dtype = DT_INT;
      endcase
    end else if (op >= 8'h36 && op <= 8'h3a) begin        // xstore idx
      d.poc = POC_C; d.len = 3'd2; d.lv_idx = b1; d.nsrc = 3'd1; d.exec_ok = 1'b1;
      d.dtype = fam5(3'(op - 8'h36));
    end else if (op >= 8'h3b && op <= 8'h4e) begin        // xstore_n
      rel = op - 8'h3b;
      d.poc = POC_C; d.lv_idx = {6'd0, rel[1:0]}; d.nsrc = 3'd1; d.exec_ok = 1'b1;
      d.dtype = fam5(3'(rel >> 2));
    end else if (op >= 8'h4f && op <= 8'h56) begin        // xastore
      d.poc = POC_OE; d.nsrc = 3'd3; d.stype = DT_ANY;
    end else if (op >= 8'h57 && op <= 8'h5f) begin        // pop .. swap
      d.exec_ok = (op == 8'h57) || (op == 8'h59);          // pop, dup
      d.alu     = (op == 8'h59) ? ALU_MOV : ALU_NONE;
    end else if (op >= 8'h60 && op <= 8'h83) begin        // arithmetic / logic
      rel = op - 8'h60;
      d.poc = POC_OE; d.has_res = 1'b1; d.nsrc = 3'd2;
      d.dtype = fam4(rel[1:0]); d.stype = d.dtype;
      if (op >= 8'h78) d.dtype = (rel[0]) ? DT_LONG : DT_INT;  // shifts, logic: i/l only
      if (op >= 8'h78) d.stype = d.dtype;
      if (op >= 8'h74 && op <= 8'h77) d.nsrc = 3'd1;           // neg
      if (op == 8'h79 || op == 8'h7b || op == 8'h7d) d.stype = DT_ANY; // long shifts
      case (op)
        8'h60: begin d.alu = ALU_ADD;  d.exec_ok = 1'b1; end
        8'h64: begin d.alu = ALU_SUB;  d.exec_ok = 1'b1; end
        8'h68: begin d.alu = ALU_MUL;  d.exec_ok = 1'b1; end
        8'h74: begin d.alu = ALU_NEG;  d.exec_ok = 1'b1; end
        8'h78: begin d.alu = ALU_SHL;  d.exec_ok = 1'b1; end
        8'h7a: begin d.alu = ALU_SHR;  d.exec_ok = 1'b1; end
        8'h7c: begin d.alu = ALU_USHR; d.exec_ok = 1'b1; end
        8'h7e: begin d.alu = ALU_AND;  d.exec_ok = 1'b1; end
        8'h80: begin d.alu = ALU_OR;   d.exec_ok = 1'b1; end
        8'h82: begin d.alu = ALU_XOR;  d.exec_ok = 1'b1; end
        default: ;
      endcase
    end else if (op == 8'h84) begin                       // iinc
      d.len = 3'd3; d.lv_idx = b1; d.imm = {{24{b2[7]}}, b2}; d.alu = ALU_ADD; d.exec_ok = 1'b1;
    end else if (op >= 8'h85 && op <= 8'h93) begin        // conversions
      d.poc = POC_OE; d.has_res = 1'b1; d.nsrc = 3'd1;
      case (op)
        8'h85: begin d.stype = DT_INT;    d.dtype = DT_LONG;   end
        8'h86: begin d.stype = DT_INT;    d.dtype = DT_FLOAT;  end
        8'h87: begin d.stype = DT_INT;    d.dtype = DT_DOUBLE; end
        8'h88: begin d.stype = DT_LONG;   d.dtype = DT_INT;    end
        8'h89: begin d.stype = DT_LONG;   d.dtype = DT_FLOAT;  end
        8'h8a: begin d.stype = DT_LONG;   d.dtype = DT_DOUBLE; end
        8'h8b: begin d.stype = DT_FLOAT;  d.dtype = DT_INT;    end
        8'h8c: begin d.stype = DT_FLOAT;  d.dtype = DT_LONG;   end
        8'h8d: begin d.stype = DT_FLOAT;  d.dtype = DT_DOUBLE; end
        8'h8e: begin d.stype = DT_DOUBLE; d.dtype = DT_INT;    end
        8'h8f: begin d.stype = DT_DOUBLE; d.dtype = DT_LONG;   end
        8'h90: begin d.stype = DT_DOUBLE; d.dtype = DT_FLOAT;  end
        8'h91: begin d.stype = DT_INT; d.dtype = DT_INT; d.alu = ALU_I2B; d.exec_ok = 1'b1; end
        8'h92: begin d.stype = DT_INT; d.dtype = DT_INT; d.alu = ALU_I2C; d.exec_ok = 1'b1; end
        default: begin d.stype = DT_INT; d.dtype = DT_INT; d.alu = ALU_I2S; d.exec_ok = 1'b1; end
      endcase
    end else if (op >= 8'h94 && op <= 8'h98) begin        // lcmp, fcmp, dcmp
      d.poc = POC_OE; d.has_res = 1'b1; d.nsrc = 3'd2; d.dtype = DT_INT;
      d.stype = (op == 8'h94) ? DT_LONG : (op <= 8'h96) ? DT_FLOAT : DT_DOUBLE;
    end else if (op >= 8'h99 && op <= 8'ha6) begin        // if<cond>, if_icmp, if_acmp
      d.poc = POC_OB; d.len = 3'd3; d.imm = s16; d.exec_ok = 1'b1;
      d.nsrc  = (op <= 8'h9e) ? 3'd1 : 3'd2;
      d.stype = (op >= 8'ha5) ? DT_REF : DT_INT;
      rel = (op <= 8'h9e) ? op - 8'h99 : (op <= 8'ha4) ? op - 8'h9f : op - 8'ha5;
      d.br = br_e'(3'(rel) + 3'd1);
    end else if (op == 8'ha7) begin                       // goto
      d.poc = POC_OB; d.len = 3'd3; d.imm = s16; d.br = BR_ALWAYS; d.exec_ok = 1'b1;
    end else if (op == 8'ha8) begin                       // jsr
      d.len = 3'd3;
    end else if (op == 8'ha9) begin                       // ret
      d.len = 3'd2;
    end else if (op == 8'hb1) begin                       // return
      d.exec_ok = 1'b1;
    end else if (op >= 8'hb2 && op <= 8'hb5) begin        // get/put static/field
      d.poc = POC_OC; d.len = 3'd3; d.stype = DT_ANY;
      d.nsrc    = (op == 8'hb2) ? 3'd0 : (op == 8'hb5) ? 3'd2 : 3'd1;
      d.has_res = (op == 8'hb2) || (op == 8'hb4);
      d.dtype   = d.has_res ? DT_INT : DT_NONE;
    end else if (op >= 8'hb6 && op <= 8'hb8) begin        // invoke
      d.len = 3'd3;
    end else if (op == 8'hb9) begin                       // invokeinterface
      d.len = 3'd5;
    end else if (op == 8'hbb) begin                       // new
      d.poc = POC_OC; d.len = 3'd3; d.has_res = 1'b1; d.dtype = DT_REF;
    end else if (op == 8'hbc || op == 8'hbd) begin        // newarray, anewarray
      d.poc = POC_OC; d.len = (op == 8'hbc) ? 3'd2 : 3'd3; d.nsrc = 3'd1;
      d.stype = DT_INT; d.has_res = 1'b1; d.dtype = DT_REF;
    end else if (op == 8'hbe) begin                       // arraylength
      d.poc = POC_OE; d.nsrc = 3'd1; d.stype = DT_REF; d.has_res = 1'b1; d.dtype = DT_INT;
    end else if (op == 8'hc0 || op == 8'hc1) begin        // checkcast, instanceof
      d.poc = POC_OC; d.len = 3'd3; d.nsrc = 3'd1; d.stype = DT_REF; d.has_res = 1'b1;
      d.dtype = (op == 8'hc0) ? DT_REF : DT_INT;
    end else if (op == 8'hc5) begin                       // multianewarray
      d.len = 3'd4;
    end else if (op == 8'hc6 || op == 8'hc7) begin        // ifnull, ifnonnull
      d.poc = POC_OB; d.len = 3'd3; d.imm = s16; d.nsrc = 3'd1; d.stype = DT_REF;
      d.br = (op == 8'hc6) ? BR_EQ : BR_NE; d.exec_ok = 1'b1;
    end else if (op == 8'hc8) begin                       // goto_w
      d.poc = POC_OB; d.len = 3'd5; d.imm = s32; d.br = BR_ALWAYS; d.exec_ok = 1'b1;
    end else if (op == 8'hc9) begin                       // jsr_w
      d.len = 3'd5;
    end

    d.width = (d.poc == POC_P || d.poc == POC_C) ? dt_width(d.dtype) : 2'd1;
    if (d.poc == POC_P && d.dtype != DT_INT && d.dtype != DT_REF) d.exec_ok = 1'b0;
    if (d.poc == POC_C && d.dtype != DT_INT && d.dtype != DT_REF) d.exec_ok = 1'b0;
  end

endmodule
