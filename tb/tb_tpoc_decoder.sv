// tb_tpoc_decoder -- feeds folded groups (classified and folded from byte
// windows) to the decoder in program order and checks the operation it
// builds: operand sources (constant, local variable, stack slot), the stack
// slots taken by P' tags and by operands missing from the group, the result
// destination and its identification number, the stack depth after each
// group, branch targets, O_T handling, traps and the flush restore.  Expected
// slots are worked out by hand from the stack depth before each group.
module tb_tpoc_decoder;
  import poc_pkg::*;

  logic clk = 1'b0, rst_n, issue, flush;
  logic [SPW:0] flush_sp, sp;
  logic [MAX_FOLD-1:0][7:0] op, b1, b2;
  logic [MAX_FOLD-1:0] vld;
  dec_t [MAX_FOLD-1:0] win;
  fgrp_t grp;
  uop_t uop;
  int checks = 0, failures = 0;

  for (genvar i = 0; i < MAX_FOLD; i++) begin : g_cls
    poc_classifier u (.op(op[i]), .b1(b1[i]), .b2(b2[i]), .b3(8'h00), .b4(8'h00),
                      .pc(PCW'(16'h40 + i)), .valid(vld[i]), .d(win[i]));
  end
  poc_fold_unit u_fold (.win, .grp);
  tpoc_decoder dut (.clk, .rst_n, .grp, .issue, .flush, .flush_sp, .uop, .sp);

  always #5 clk = ~clk;

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic window(logic [23:0] w0, logic [23:0] w1, logic [23:0] w2, logic [23:0] w3);
    logic [3:0][23:0] w;
    w = {w3, w2, w1, w0};
    for (int i = 0; i < MAX_FOLD; i++) begin
      op[i] = w[i][23:16]; b1[i] = w[i][15:8]; b2[i] = w[i][7:0];
      vld[i] = (w[i][23:16] != 8'hff);
    end
    #1;
  endtask

  // Check one operand: kind, then slot / lv / imm as applies.
  task automatic opnd(string n, opnd_t o, osrc_e k, int v);
    chk({n, " kind"}, o.kind, k);
    if (k == OS_STACK) chk({n, " slot"}, o.slot, v);
    if (k == OS_LV)    chk({n, " lv"}, o.lv, v);
    if (k == OS_CONST) chk({n, " imm"}, int'(o.imm), v);
  endtask

  task automatic dst(string n, dst_e k, int v, int sp_after);
    chk({n, " dst"}, uop.dst, k);
    if (k == DST_STACK) chk({n, " id"}, uop.dst_slot, v);
    if (k == DST_LV)    chk({n, " dst lv"}, uop.dst_lv, v);
    chk({n, " sp_after"}, uop.sp_after, sp_after);
  endtask

  task automatic step();
    issue = 1; @(posedge clk); #1 issue = 0;
  endtask

  localparam logic [23:0] ICONST1 = 24'h040000, ILOAD_0 = 24'h1a0000, ILOAD_1 = 24'h1b0000,
    ILOAD_2 = 24'h1c0000, BIPUSH7 = 24'h100700, IMUL = 24'h680000, ISUB = 24'h640000,
    PT = 24'hcb0000, IADD = 24'h600000, ISTORE_3 = 24'h3e0000, IFEQ = 24'h990010,
    DUP = 24'h590000, POP = 24'h570000, IINC = 24'h840205, LDC = 24'h120100, RET = 24'hb10000,
    INEG = 24'h740000, NONE = 24'hff0000, ICMPGT = 24'ha3fff0, ISTORE5 = 24'h360500,
    IXOR = 24'h820000, IASTORE = 24'h4f0000, GOTO = 24'ha70020;

  initial begin
    rst_n = 0; issue = 0; flush = 0; flush_sp = 0;
    window(NONE, NONE, NONE, NONE);
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    chk("sp reset", sp, 0);

    // [P1] alone: push constant into slot 0
    window(ICONST1, ILOAD_2, BIPUSH7, IMUL);
    opnd("P1 a", uop.a, OS_CONST, 1); chk("P1 alu", uop.alu, ALU_MOV);
    dst("P1", DST_STACK, 0, 1); chk("P1 valid", uop.valid, 1); chk("P1 nbc", uop.nbc, 1);
    step(); chk("sp 1", sp, 1);
    // [P4 P5 OE1] = P1'
    window(ILOAD_2, BIPUSH7, IMUL, ILOAD_1);
    opnd("g2 a", uop.a, OS_LV, 2); opnd("g2 b", uop.b, OS_CONST, 7);
    chk("g2 alu", uop.alu, ALU_MUL); dst("g2", DST_STACK, 1, 2); chk("g2 nbc", uop.nbc, 3);
    step();
    // [P3 P' OE2]: P' reads the previous result's slot
    window(ILOAD_1, PT, ISUB, ILOAD_0);
    opnd("g3 a", uop.a, OS_LV, 1); opnd("g3 b", uop.b, OS_STACK, 1);
    chk("g3 alu", uop.alu, ALU_SUB); dst("g3", DST_STACK, 1, 2); chk("g3 ptags", uop.nptag, 1);
    step();
    // [P6 OE5] = P'
    window(ILOAD_0, INEG, PT, PT);
    opnd("g4 a", uop.a, OS_LV, 0); dst("g4", DST_STACK, 2, 3);
    step();
    // [P' P' OE6]: earlier P' -> slot 1, later P' (newest) -> slot 2
    window(PT, PT, IADD, ILOAD_0);
    opnd("g5 a", uop.a, OS_STACK, 1); opnd("g5 b", uop.b, OS_STACK, 2);
    dst("g5", DST_STACK, 1, 2); chk("g5 ptags", uop.nptag, 2);
    step();
    // [P2 P' OB1]: branch, no result, target = pc + offset
    window(ILOAD_0, PT, ICMPGT, NONE);
    opnd("g6 a", uop.a, OS_LV, 0); opnd("g6 b", uop.b, OS_STACK, 1);
    chk("g6 br", uop.br, BR_GT); chk("g6 target", uop.target, 16'h42 - 16);
    dst("g6", DST_NONE, 0, 1);
    step();
    // [ICONST1] push -> sp 2; then [iadd istore_3]: both operands from stack
    window(ICONST1, NONE, NONE, NONE); step();
    window(IADD, ISTORE_3, NONE, NONE);
    opnd("g8 a", uop.a, OS_STACK, 0); opnd("g8 b", uop.b, OS_STACK, 1);
    dst("g8", DST_LV, 3, 0);
    step(); chk("sp 0", sp, 0);
    // [ICONST1], then [iload_1 iadd] with one operand missing from the group
    window(ICONST1, NONE, NONE, NONE); step();
    window(ILOAD_1, IADD, ISTORE5, NONE);
    opnd("g10 a", uop.a, OS_STACK, 0); opnd("g10 b", uop.b, OS_LV, 1);
    dst("g10", DST_LV, 5, 0);
    step();
    // ifeq alone with empty group: operand from stack vs constant 0
    window(ICONST1, NONE, NONE, NONE); step();
    window(IFEQ, NONE, NONE, NONE);
    opnd("ifeq a", uop.a, OS_STACK, 0); opnd("ifeq b", uop.b, OS_CONST, 0);
    chk("ifeq br", uop.br, BR_EQ); dst("ifeq", DST_NONE, 0, 0);
    step();
    // goto: no operands, always
    window(GOTO, NONE, NONE, NONE);
    chk("goto br", uop.br, BR_ALWAYS); chk("goto target", uop.target, 16'h60);
    dst("goto", DST_NONE, 0, 0);
    // dup, pop, iinc, return
    window(ICONST1, NONE, NONE, NONE); step();
    window(DUP, NONE, NONE, NONE);
    opnd("dup a", uop.a, OS_STACK, 0); dst("dup", DST_STACK, 1, 2); step();
    window(POP, NONE, NONE, NONE); dst("pop", DST_NONE, 0, 1); step();
    window(IINC, NONE, NONE, NONE);
    opnd("iinc a", uop.a, OS_LV, 2); opnd("iinc b", uop.b, OS_CONST, 5);
    chk("iinc alu", uop.alu, ALU_ADD); dst("iinc", DST_LV, 2, 1); step();
    window(RET, NONE, NONE, NONE); chk("return halt", uop.halt, 1); chk("return trap", uop.trap, 0);
    // traps
    window(LDC, NONE, NONE, NONE); chk("ldc trap", uop.trap, 1); chk("ldc op", uop.trap_op, 8'h12);
    window(IASTORE, NONE, NONE, NONE); chk("iastore trap", uop.trap, 1);
    window(ILOAD_1, IADD, NONE, NONE); chk("iadd no trap", uop.trap, 0);
    // no issue: sp holds; flush restores
    window(ICONST1, NONE, NONE, NONE);
    @(posedge clk); #1 chk("sp held", sp, 1);
    flush = 1; flush_sp = 7'd9; issue = 1;
    @(posedge clk); #1 flush = 0; issue = 0;
    chk("sp flushed", sp, 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
