// tb_poc_fold_unit -- checks which bytecodes issue together for windows of
// classified bytecodes, with foldability 4 (default), 3 and 2: the worked
// four-bytecode example, every group of the extended-folding-group example
// in original and rescheduled order, type mismatches, producer surplus,
// partial windows and the byte length of each group.
module tb_poc_fold_unit;
  import poc_pkg::*;

  logic [MAX_FOLD-1:0][7:0] op, b1, b2;
  logic [MAX_FOLD-1:0]      vld;
  dec_t [MAX_FOLD-1:0]      win;
  fgrp_t g4, g3, g2;
  int checks = 0, failures = 0;

  for (genvar i = 0; i < MAX_FOLD; i++) begin : g_cls
    poc_classifier u (.op(op[i]), .b1(b1[i]), .b2(b2[i]), .b3(8'h00), .b4(8'h00),
                      .pc(PCW'(i)), .valid(vld[i]), .d(win[i]));
  end

  poc_fold_unit               dut4 (.win, .grp(g4));
  poc_fold_unit #(.FOLD(3))   dut3 (.win, .grp(g3));
  poc_fold_unit #(.FOLD(2))   dut2 (.win, .grp(g2));

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Window of up to four bytecodes, given as {op, b1, b2} triples; 8'hff as
  // opcode marks an empty slot.  Expected: nbc for FOLD 4, 3, 2; np; bytes.
  task automatic t(string name, logic [23:0] w0, logic [23:0] w1, logic [23:0] w2,
                   logic [23:0] w3, int n4, int n3, int n2, int np4, int bytes4,
                   bit op4, bit cons4);
    logic [3:0][23:0] w;
    w = {w3, w2, w1, w0};
    for (int i = 0; i < MAX_FOLD; i++) begin
      op[i] = w[i][23:16]; b1[i] = w[i][15:8]; b2[i] = w[i][7:0];
      vld[i] = (w[i][23:16] != 8'hff);
    end
    #1;
    chk({name, " nbc4"}, g4.nbc, n4);
    chk({name, " nbc3"}, g3.nbc, n3);
    chk({name, " nbc2"}, g2.nbc, n2);
    chk({name, " np"}, g4.np, np4);
    chk({name, " bytes"}, g4.nbytes, bytes4);
    chk({name, " has_op"}, g4.has_op, op4);
    chk({name, " has_cons"}, g4.has_cons, cons4);
    chk({name, " valid"}, g4.valid, vld[0]);
  endtask

  localparam logic [23:0] ICONST2 = 24'h050000, ILOAD1 = 24'h150100, IADD = 24'h600000,
    ISTORE2 = 24'h360200, ILOAD_0 = 24'h1a0000, ILOAD_1 = 24'h1b0000, ILOAD_2 = 24'h1c0000,
    BIPUSH7 = 24'h100700, IMUL = 24'h680000, ISUB = 24'h640000, PT = 24'hcb0000,
    IXOR = 24'h820000, ISTORE5 = 24'h360500, INEG = 24'h740000, ICMPGT = 24'ha30007,
    ICONST1 = 24'h040000, FLOAD0 = 24'h220000, LLOAD0 = 24'h1e0000, LLOAD2 = 24'h200000,
    LADD = 24'h610000, NOP = 24'h000000, ALOAD0 = 24'h2a0000, GETFIELD = 24'hb40001,
    ISTORE_3 = 24'h3e0000, FSTORE_1 = 24'h440000, IINC = 24'h840101, NONE = 24'hff0000;

  initial begin
    //                      window                               n4 n3 n2 np bytes op cons
    t("table3",  ICONST2, ILOAD1, IADD, ISTORE2,                 4, 3, 1, 2, 6, 1, 1);
    t("P1..P4",  ICONST1, ILOAD_0, ILOAD_1, ILOAD_2,             1, 1, 1, 1, 1, 0, 0);
    t("PPP+O",   ILOAD_1, ILOAD_2, BIPUSH7, IMUL,                1, 1, 1, 1, 1, 0, 0);
    t("PP+O P",  ILOAD_2, BIPUSH7, IMUL, ISUB,                   3, 3, 1, 2, 4, 1, 0);
    t("P O C",   ILOAD_2, IXOR, ISTORE5, INEG,                   3, 3, 2, 1, 4, 1, 1);
    t("O O",     ISUB, ILOAD_0, ILOAD_1, ILOAD_2,                1, 1, 1, 0, 1, 1, 0);
    t("P'P O C", PT, ILOAD_2, IXOR, ISTORE5,                     4, 3, 1, 2, 5, 1, 1);
    t("P P' O",  ILOAD_1, PT, ISUB, ILOAD1,                      3, 3, 1, 2, 3, 1, 0);
    t("P'P' O",  PT, PT, IADD, ILOAD_0,                          3, 3, 1, 2, 3, 1, 0);
    t("P P' OB", ILOAD_0, PT, ICMPGT, NONE,                      3, 3, 1, 2, 5, 1, 0);
    t("P O1 P'", ILOAD_1, INEG, PT, PT,                          2, 2, 2, 1, 2, 1, 0);
    t("P OT",    ILOAD_1, NOP, ILOAD_2, IADD,                    1, 1, 1, 1, 1, 0, 0);
    t("OT",      IINC, ILOAD_2, IADD, NONE,                      1, 1, 1, 0, 3, 1, 0);
    t("P C",     BIPUSH7, ISTORE_3, ILOAD_1, NONE,               2, 2, 2, 1, 3, 0, 1);
    t("PP C",    ICONST1, BIPUSH7, ISTORE_3, NONE,               1, 1, 1, 1, 1, 0, 0);
    t("C",       ISTORE_3, ILOAD_1, NONE, NONE,                  1, 1, 1, 0, 1, 0, 1);
    t("type",    ILOAD_0, FLOAD0, IADD, NONE,                    1, 1, 1, 1, 1, 0, 0);
    t("long",    LLOAD0, LLOAD2, LADD, NONE,                     3, 3, 1, 2, 3, 1, 0);
    t("OE Cf",   ILOAD_0, ILOAD_1, IADD, FSTORE_1,               3, 3, 1, 2, 3, 1, 0);
    t("P OC C",  ALOAD0, GETFIELD, ISTORE_3, NONE,               3, 3, 2, 1, 5, 1, 1);
    t("partial", ILOAD_0, ILOAD_1, NONE, NONE,                   1, 1, 1, 1, 1, 0, 0);
    t("empty",   NONE, NONE, NONE, NONE,                         1, 1, 1, 0, 0, 0, 0);
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
