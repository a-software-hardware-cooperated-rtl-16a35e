// tb_poc_classifier -- checks the POC classification of representative
// bytecodes of every family against values taken from the JVM
// specification (type, length, operand count, source, immediate, index),
// including the P' tag.
module tb_poc_classifier;
  import poc_pkg::*;

  logic [7:0] op, b1, b2, b3, b4;
  logic [PCW-1:0] pc;
  dec_t d;
  int checks = 0, failures = 0;

  poc_classifier dut (.op, .b1, .b2, .b3, .b4, .pc, .valid(1'b1), .d);

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s op=%02h: got %0d expected %0d", what, op, got, exp);
    end
  endtask

  // op, bytes, expected poc, len, dtype, nsrc, psrc, imm, lv
  task automatic t(logic [7:0] o, logic [7:0] x1, logic [7:0] x2, poc_e p, int len,
                   dtype_e dt, int ns, psrc_e ps, int imm, int lvi, bit ok);
    op = o; b1 = x1; b2 = x2; b3 = 8'h11; b4 = 8'h22; pc = 16'h0100;
    #1;
    chk("poc", d.poc, p);
    chk("len", d.len, len);
    chk("dtype", d.dtype, dt);
    if (p != POC_P && p != POC_OT) chk("nsrc", d.nsrc, ns);
    if (p == POC_P) chk("psrc", d.psrc, ps);
    if (p == POC_P && ps == PS_CONST) chk("imm", int'(d.imm), imm);
    if (p == POC_OB) chk("offset", int'(d.imm), imm);
    if (ps == PS_LV || p == POC_C) chk("lv", d.lv_idx, lvi);
    chk("exec_ok", d.exec_ok, ok);
    chk("pc", d.pc, 16'h0100);
  endtask

  initial begin
    op = 0; b1 = 0; b2 = 0; b3 = 0; b4 = 0; pc = 0;
    //  opcode  b1     b2     poc     len dtype      ns psrc      imm   lv  exec
    t(8'h02, 8'h00, 8'h00, POC_P,  1, DT_INT,    0, PS_CONST,  -1,  0, 1); // iconst_m1
    t(8'h05, 8'h00, 8'h00, POC_P,  1, DT_INT,    0, PS_CONST,   2,  0, 1); // iconst_2
    t(8'h08, 8'h00, 8'h00, POC_P,  1, DT_INT,    0, PS_CONST,   5,  0, 1); // iconst_5
    t(8'h01, 8'h00, 8'h00, POC_P,  1, DT_REF,    0, PS_CONST,   0,  0, 1); // aconst_null
    t(8'h10, 8'hf0, 8'h00, POC_P,  2, DT_INT,    0, PS_CONST, -16,  0, 1); // bipush -16
    t(8'h11, 8'h12, 8'h34, POC_P,  3, DT_INT,    0, PS_CONST, 16'h1234, 0, 1); // sipush
    t(8'h11, 8'hff, 8'h00, POC_P,  3, DT_INT,    0, PS_CONST, -256, 0, 1); // sipush neg
    t(8'h12, 8'h03, 8'h00, POC_P,  2, DT_INT,    0, PS_POOL,    0,  0, 0); // ldc
    t(8'h09, 8'h00, 8'h00, POC_P,  1, DT_LONG,   0, PS_CONST,   0,  0, 0); // lconst_0
    t(8'h15, 8'h09, 8'h00, POC_P,  2, DT_INT,    0, PS_LV,      0,  9, 1); // iload 9
    t(8'h16, 8'h04, 8'h00, POC_P,  2, DT_LONG,   0, PS_LV,      0,  4, 0); // lload 4
    t(8'h1d, 8'h00, 8'h00, POC_P,  1, DT_INT,    0, PS_LV,      0,  3, 1); // iload_3
    t(8'h22, 8'h00, 8'h00, POC_P,  1, DT_FLOAT,  0, PS_LV,      0,  0, 0); // fload_0
    t(8'h2b, 8'h00, 8'h00, POC_P,  1, DT_REF,    0, PS_LV,      0,  1, 1); // aload_1
    t(8'hcb, 8'h00, 8'h00, POC_P,  1, DT_INT,    0, PS_DFTOS,   0,  0, 1); // P' tag
    t(8'h36, 8'h07, 8'h00, POC_C,  2, DT_INT,    1, PS_CONST,   0,  7, 1); // istore 7
    t(8'h3e, 8'h00, 8'h00, POC_C,  1, DT_INT,    1, PS_CONST,   0,  3, 1); // istore_3
    t(8'h49, 8'h00, 8'h00, POC_C,  1, DT_DOUBLE, 1, PS_CONST,   0,  2, 0); // dstore_2
    t(8'h4c, 8'h00, 8'h00, POC_C,  1, DT_REF,    1, PS_CONST,   0,  1, 1); // astore_1
    t(8'h60, 8'h00, 8'h00, POC_OE, 1, DT_INT,    2, PS_CONST,   0,  0, 1); // iadd
    t(8'h63, 8'h00, 8'h00, POC_OE, 1, DT_DOUBLE, 2, PS_CONST,   0,  0, 0); // dadd
    t(8'h6c, 8'h00, 8'h00, POC_OE, 1, DT_INT,    2, PS_CONST,   0,  0, 0); // idiv
    t(8'h74, 8'h00, 8'h00, POC_OE, 1, DT_INT,    1, PS_CONST,   0,  0, 1); // ineg
    t(8'h7b, 8'h00, 8'h00, POC_OE, 1, DT_LONG,   2, PS_CONST,   0,  0, 0); // lshr
    t(8'h83, 8'h00, 8'h00, POC_OE, 1, DT_LONG,   2, PS_CONST,   0,  0, 0); // lxor
    t(8'h82, 8'h00, 8'h00, POC_OE, 1, DT_INT,    2, PS_CONST,   0,  0, 1); // ixor
    t(8'h85, 8'h00, 8'h00, POC_OE, 1, DT_LONG,   1, PS_CONST,   0,  0, 0); // i2l
    t(8'h91, 8'h00, 8'h00, POC_OE, 1, DT_INT,    1, PS_CONST,   0,  0, 1); // i2b
    t(8'h94, 8'h00, 8'h00, POC_OE, 1, DT_INT,    2, PS_CONST,   0,  0, 0); // lcmp
    t(8'h2e, 8'h00, 8'h00, POC_OE, 1, DT_INT,    2, PS_CONST,   0,  0, 0); // iaload
    t(8'h99, 8'h00, 8'h10, POC_OB, 3, DT_NONE,   1, PS_CONST,  16,  0, 1); // ifeq +16
    t(8'ha3, 8'hff, 8'hf0, POC_OB, 3, DT_NONE,   2, PS_CONST, -16,  0, 1); // if_icmpgt -16
    t(8'ha7, 8'h01, 8'h00, POC_OB, 3, DT_NONE,   0, PS_CONST, 256,  0, 1); // goto +256
    t(8'hc6, 8'h00, 8'h08, POC_OB, 3, DT_NONE,   1, PS_CONST,   8,  0, 1); // ifnull
    t(8'hb4, 8'h00, 8'h01, POC_OC, 3, DT_INT,    1, PS_CONST,   0,  0, 0); // getfield
    t(8'hb5, 8'h00, 8'h01, POC_OC, 3, DT_NONE,   2, PS_CONST,   0,  0, 0); // putfield
    t(8'hbb, 8'h00, 8'h01, POC_OC, 3, DT_REF,    0, PS_CONST,   0,  0, 0); // new
    t(8'h00, 8'h00, 8'h00, POC_OT, 1, DT_NONE,   0, PS_CONST,   0,  0, 1); // nop
    t(8'h59, 8'h00, 8'h00, POC_OT, 1, DT_NONE,   0, PS_CONST,   0,  0, 1); // dup
    t(8'h5f, 8'h00, 8'h00, POC_OT, 1, DT_NONE,   0, PS_CONST,   0,  0, 0); // swap
    t(8'hb6, 8'h00, 8'h01, POC_OT, 3, DT_NONE,   0, PS_CONST,   0,  0, 0); // invokevirtual
    t(8'hb9, 8'h00, 8'h01, POC_OT, 5, DT_NONE,   0, PS_CONST,   0,  0, 0); // invokeinterface
    t(8'hb1, 8'h00, 8'h00, POC_OT, 1, DT_NONE,   0, PS_CONST,   0,  0, 1); // return
    // iinc: index in b1, signed increment in b2
    op = 8'h84; b1 = 8'h05; b2 = 8'hfe; #1;
    chk("iinc len", d.len, 3); chk("iinc lv", d.lv_idx, 5); chk("iinc imm", int'(d.imm), -2);
    // width of a long producer is two words
    op = 8'h16; #1; chk("lload width", d.width, 2);
    op = 8'h15; #1; chk("iload width", d.width, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
