// tb_poc_fold_check -- checks the foldability rules cell by cell: every
// combination of the POC type of the combined bytecode N with the POC type of
// bytecode N+1, the producer-count limits, the type-matching note, and the
// combined bytecode produced.
module tb_poc_fold_check;
  import poc_pkg::*;

  fstate_t cur, nxt;
  dec_t    nb;
  logic    fi, cont;
  int checks = 0, failures = 0;

  poc_fold_check dut (.cur, .nb, .fi, .cont, .nxt);

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic dec_t mk(poc_e p, dtype_e dt, dtype_e st, int ns, bit res);
    dec_t d;
    d = '0;
    d.valid = 1'b1; d.poc = p; d.dtype = dt; d.stype = st;
    d.nsrc = 3'(ns); d.has_res = res;
    return d;
  endfunction

  function automatic fstate_t st(poc_e k, int np, dtype_e pt, bit res, dtype_e rt);
    fstate_t s;
    s = '0;
    s.kind = k; s.np = 3'(np);
    for (int i = 0; i < MAX_FOLD; i++) s.ptype[i] = pt;
    s.has_res = res; s.rtype = rt;
    return s;
  endfunction

  // Apply and compare relation (1 = FI) and status (1 = C).
  task automatic t(string name, fstate_t c, dec_t n, bit efi, bit econt);
    cur = c; nb = n; #1;
    chk({name, " FI"}, fi, efi);
    chk({name, " C"}, cont, econt);
  endtask

  dec_t P_i, OE_i, OB_i, OC_i, OT, C_i, C_f, OE_l, P_f;

  initial begin
    P_i  = mk(POC_P,  DT_INT,  DT_NONE, 0, 0);
    P_f  = mk(POC_P,  DT_FLOAT, DT_NONE, 0, 0);
    OE_i = mk(POC_OE, DT_INT,  DT_INT, 2, 1);
    OE_l = mk(POC_OE, DT_LONG, DT_LONG, 2, 1);
    OB_i = mk(POC_OB, DT_NONE, DT_INT, 2, 0);
    OC_i = mk(POC_OC, DT_INT,  DT_ANY, 1, 1);
    OT   = mk(POC_OT, DT_NONE, DT_NONE, 0, 0);
    C_i  = mk(POC_C,  DT_INT,  DT_NONE, 1, 0);
    C_f  = mk(POC_C,  DT_FLOAT, DT_NONE, 1, 0);

    // Row P (one producer)
    t("P+P",   st(POC_P, 1, DT_INT, 0, DT_INT), P_i,  0, 1);
    chk("P+P np", nxt.np, 2);
    chk("P+P kind", nxt.kind, POC_P);
    t("P+OE",  st(POC_P, 1, DT_INT, 0, DT_INT), OE_i, 1, 1);
    chk("P+OE kind", nxt.kind, POC_OE);
    chk("P+OE res", nxt.has_res, 1);
    t("P+OB",  st(POC_P, 1, DT_INT, 0, DT_INT), OB_i, 1, 0);
    t("P+OC",  st(POC_P, 1, DT_INT, 0, DT_INT), OC_i, 1, 1);
    chk("P+OC kind", nxt.kind, POC_OC);
    t("P+OT",  st(POC_P, 1, DT_INT, 0, DT_INT), OT,   0, 0);
    t("P+C",   st(POC_P, 1, DT_INT, 0, DT_INT), C_i,  1, 0);
    chk("P+C kind", nxt.kind, POC_C);
    // producer count limits
    t("PP+OE",  st(POC_P, 2, DT_INT, 0, DT_INT), OE_i, 1, 1);
    t("PPP+OE", st(POC_P, 3, DT_INT, 0, DT_INT), OE_i, 0, 0);
    t("PP+C",   st(POC_P, 2, DT_INT, 0, DT_INT), C_i,  0, 0);
    t("PP+OC1", st(POC_P, 2, DT_INT, 0, DT_INT), OC_i, 0, 0);
    // Note 1: types must match
    t("Pf+OEi", st(POC_P, 1, DT_FLOAT, 0, DT_INT), OE_i, 0, 0);
    t("Pi+OEl", st(POC_P, 2, DT_INT, 0, DT_INT), OE_l, 0, 0);
    t("Pl+OEl", st(POC_P, 2, DT_LONG, 0, DT_INT), OE_l, 1, 1);
    t("Pi+Cf",  st(POC_P, 1, DT_INT, 0, DT_INT), C_f, 0, 0);
    t("Pf+OC",  st(POC_P, 1, DT_FLOAT, 0, DT_INT), OC_i, 1, 1);   // any-type source

    // Row O_E
    t("OE+P",  st(POC_OE, 0, DT_INT, 1, DT_INT), P_i,  0, 0);
    t("OE+OE", st(POC_OE, 0, DT_INT, 1, DT_INT), OE_i, 0, 0);
    t("OE+OB", st(POC_OE, 0, DT_INT, 1, DT_INT), OB_i, 0, 0);
    t("OE+OC", st(POC_OE, 0, DT_INT, 1, DT_INT), OC_i, 0, 0);
    t("OE+OT", st(POC_OE, 0, DT_INT, 1, DT_INT), OT,   0, 0);
    t("OE+C",  st(POC_OE, 2, DT_INT, 1, DT_INT), C_i,  1, 0);
    chk("OE+C kind", nxt.kind, POC_OE);
    chk("OE+C res consumed", nxt.has_res, 0);
    t("OE+Cf", st(POC_OE, 2, DT_INT, 1, DT_INT), C_f,  0, 0);
    t("OEnores+C", st(POC_OE, 0, DT_INT, 0, DT_NONE), C_i, 0, 0);
    // Row O_C
    t("OC+C",  st(POC_OC, 1, DT_INT, 1, DT_INT), C_i,  1, 0);
    t("OC+P",  st(POC_OC, 1, DT_INT, 1, DT_INT), P_i,  0, 0);
    // Rows O_B, O_T, C: always SI/E
    t("OB+C",  st(POC_OB, 2, DT_INT, 0, DT_NONE), C_i,  0, 0);
    t("OB+P",  st(POC_OB, 2, DT_INT, 0, DT_NONE), P_i,  0, 0);
    t("OT+P",  st(POC_OT, 0, DT_INT, 0, DT_NONE), P_i,  0, 0);
    t("OT+C",  st(POC_OT, 0, DT_INT, 0, DT_NONE), C_i,  0, 0);
    t("C+P",   st(POC_C, 1, DT_INT, 0, DT_NONE), P_i,  0, 0);
    t("C+OE",  st(POC_C, 1, DT_INT, 0, DT_NONE), OE_i, 0, 0);
    t("C+C",   st(POC_C, 1, DT_INT, 0, DT_NONE), C_i,  0, 0);
    // invalid next bytecode ends the check
    nb = OE_i; nb.valid = 1'b0; cur = st(POC_P, 1, DT_INT, 0, DT_INT); #1;
    chk("invalid FI", fi, 0); chk("invalid C", cont, 0);
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
