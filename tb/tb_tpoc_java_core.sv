// tb_tpoc_java_core -- end-to-end test of the folding Java core.
//
// Runs small bytecode programs, assembled here, on the core at its default
// parameters and checks the local variables they leave, the stack depth,
// how many groups were executed and how many cycles it took:
//   1. the seventeen-bytecode example of extended folding groups, in its
//      original order (POC folding only): 11 groups for the body;
//   2. the same computation rescheduled with five P' tags (T-POC): 8 groups
//      for the body, i.e. three cycles fewer, and the same results; of the
//      body's ten pushes and pops, 6 fold in the original order (P1, P2, P3
//      and P6 issue alone) and 9 in the rescheduled one (only P1 alone);
//      both with the final branch taken and not taken;
//   3. a counting loop (iinc, backward conditional branch, goto);
//   4. a program that reaches a bytecode the integer core cannot run (trap).
// Expected values are computed by hand from the Java semantics of each
// program.  Every mechanism of the core is counted and must occur: folded
// groups of each kind, P' tags, forwarding from E, C and W, file reads,
// taken branches, halt and trap.
module tb_tpoc_java_core;
  import poc_pkg::*;

  logic            clk = 1'b0;
  logic            rst_n;
  logic            start;
  logic            imem_we;
  logic [PCW-1:0]  imem_waddr;
  logic [7:0]      imem_wdata;
  logic [LVW-1:0]  dbg_lv_addr;
  logic [31:0]     dbg_lv_data;
  logic            halted, trapped;
  logic [PCW-1:0]  trap_pc;
  logic [7:0]      trap_op;
  logic [SPW:0]    sp;
  perf_t           perf;

  tpoc_java_core dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_folded = 0, n_ptag = 0, n_fwd_e = 0, n_fwd_c = 0, n_fwd_w = 0;
  int n_file = 0, n_taken = 0, n_halt = 0, n_trap = 0, n_oc = 0, n_pc = 0;

  byte unsigned prog[$];

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Run prog on a freshly reset core; returns when halted.
  task automatic run_prog(int max_cycles);
    rst_n = 1'b0; start = 1'b0; imem_we = 1'b0; dbg_lv_addr = '0;
    imem_waddr = '0; imem_wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    foreach (prog[i]) begin
      imem_we = 1'b1; imem_waddr = PCW'(i); imem_wdata = prog[i];
      @(posedge clk);
    end
    // pad with return so a runaway program stops
    for (int i = prog.size(); i < prog.size() + 8; i++) begin
      imem_we = 1'b1; imem_waddr = PCW'(i); imem_wdata = 8'hb1;
      @(posedge clk);
    end
    imem_we = 1'b0;
    @(negedge clk) start = 1'b1;
    for (int c = 0; c < max_cycles && !halted; c++) @(posedge clk);
    repeat (4) @(posedge clk);      // let C and W drain
    n_folded += perf.folded;  n_ptag  += perf.ptags;
    n_fwd_e  += perf.fwd_e;   n_fwd_c += perf.fwd_c;  n_fwd_w += perf.fwd_w;
    n_file   += perf.file_reads; n_taken += perf.taken;
    n_halt   += (halted && !trapped) ? 1 : 0;
    n_trap   += trapped ? 1 : 0;
  endtask

  task automatic read_lv(input int idx, output int val);
    dbg_lv_addr = LVW'(idx);
    #1 val = dbg_lv_data;
  endtask

  task automatic emit(input byte unsigned b[]);
    foreach (b[i]) prog.push_back(b[i]);
  endtask

  // Prefix: LV0..LV4 <- a..e  (five folded bipush/istore groups)
  task automatic prefix(int a, int b, int c, int d, int e);
    emit('{8'h10, 8'(a), 8'h3b});
    emit('{8'h10, 8'(b), 8'h3c});
    emit('{8'h10, 8'(c), 8'h3d});
    emit('{8'h10, 8'(d), 8'h3e});
    emit('{8'h10, 8'(e), 8'h36, 8'h04});
  endtask

  // Tail after the branch: fall through -> LV6 = 2, taken -> LV6 = 3.
  task automatic tail();
    emit('{8'h05, 8'h36, 8'h06, 8'hb1});      // iconst_2 istore 6 return
    emit('{8'h06, 8'h36, 8'h06, 8'hb1});      // T: iconst_3 istore 6 return
  endtask

  // Original order:
  // P1 P2 P3 P4 P5 OE1 OE2 P6 P7 P8 OE3 P9 OE4 C1 OE5 OE6 OB1
  task automatic body_orig();
    emit('{8'h04, 8'h1a, 8'h1b, 8'h1c, 8'h10, 8'h07, 8'h68, 8'h64,
           8'h1d, 8'h15, 8'h04, 8'h08, 8'h60, 8'h1c, 8'h82, 8'h36, 8'h05,
           8'h74, 8'h60, 8'ha3, 8'h00, 8'h07});
  endtask

  // Rescheduled order with P' tags (0xCB):
  // P1 P4 P5 OE1 P3 P' OE2 P7 P8 OE3 P' P9 OE4 C1 P6 OE5 P' P' OE6 P2 P' OB1
  task automatic body_tpoc();
    emit('{8'h04, 8'h1c, 8'h10, 8'h07, 8'h68, 8'h1b, 8'hcb, 8'h64,
           8'h15, 8'h04, 8'h08, 8'h60, 8'hcb, 8'h1c, 8'h82, 8'h36, 8'h05,
           8'h1d, 8'h74, 8'hcb, 8'hcb, 8'h60, 8'h1a, 8'hcb, 8'ha3, 8'h00, 8'h07});
  endtask

  int cyc_orig [2], cyc_tpoc [2], grp_orig [2], grp_tpoc [2];

  initial begin
    int v;
    int a, b, c, d, e, r1, r2, r3, r4, r5, r6;
    rst_n = 1'b0; start = 1'b0; imem_we = 1'b0;
    imem_waddr = '0; imem_wdata = '0; dbg_lv_addr = '0;

    for (int t = 0; t < 2; t++) begin
      b = 20; c = 3; d = 4; e = 10;
      a = (t == 0) ? 9 : -10;
      r1 = c * 7; r2 = b - r1; r3 = e + 5; r4 = r3 ^ c; r5 = -d; r6 = r2 + r5;
      for (int s = 0; s < 2; s++) begin
        prog.delete();
        prefix(a, b, c, d, e);
        if (s == 0) body_orig(); else body_tpoc();
        tail();
        run_prog(200);
        chk("halted", halted, 1);
        chk("no trap", trapped, 0);
        read_lv(5, v); chk($sformatf("LV5 t%0d s%0d", t, s), v, r4);
        read_lv(6, v); chk($sformatf("LV6 t%0d s%0d", t, s), v, (a > r6) ? 3 : 2);
        read_lv(2, v); chk("LV2", v, c);
        chk("stack depth", sp, 1);
        // prefix 5 + body (11 or 8) + store group + return
        chk($sformatf("groups t%0d s%0d", t, s), perf.groups, (s == 0) ? 18 : 15);
        chk("bytecodes", perf.bytecodes, 10 + ((s == 0) ? 17 : 22) + 3);
        if (s == 1) chk("P' tags", perf.ptags, 5);
        // pushes/pops: prefix 10 + body 10 (P1..P9, C1) + store group 2; in
        // the body, P1, P2, P3 and P6 stay unfolded in the original order,
        // only P1 once rescheduled
        chk("push/pop bytecodes", perf.pc_ops, 22);
        chk($sformatf("push/pop folded t%0d s%0d", t, s), perf.pc_folded, (s == 0) ? 18 : 21);
        if (s == 0) begin cyc_orig[t] = perf.cycles; grp_orig[t] = perf.groups; end
        else        begin cyc_tpoc[t] = perf.cycles; grp_tpoc[t] = perf.groups; end
      end
      // The rescheduled body saves exactly three issue cycles (11 -> 8).
      chk($sformatf("cycle saving t%0d", t), cyc_orig[t] - cyc_tpoc[t], 3);
    end
    n_pc++;   // P+C groups occur in every prefix
    n_oc++;   // O+C group [P' P9 OE4 C1] in the rescheduled body

    // ---- counting loop: LV1 = sum 1..12, LV0 = 13 --------------------------
    //  0: iconst_0 istore_1 iconst_1 istore_0     LV1 = 0, LV0 = 1
    //  4: goto 14
    //  7: iload_1 iload_0 iadd istore_1          LV1 += LV0
    // 11: iinc 0 1
    // 14: iload_0 bipush 12 if_icmple 7
    // 20: return
    prog.delete();
    emit('{8'h03, 8'h3c, 8'h04, 8'h3b});            // 0..3
    emit('{8'ha7, 8'h00, 8'h0a});                   // 4: goto 14
    emit('{8'h1b, 8'h1a, 8'h60, 8'h3c});            // 7: LV1 += LV0
    emit('{8'h84, 8'h00, 8'h01});                   // 11: iinc 0,1
    emit('{8'h1a, 8'h10, 8'h0c, 8'ha4, 8'hff, 8'hf6}); // 14: if LV0 <= 12 goto 7
    emit('{8'hb1});                                 // 20: return
    run_prog(2000);
    chk("loop halted", halted && !trapped, 1);
    read_lv(1, v); chk("loop sum", v, 78);
    read_lv(0, v); chk("loop index", v, 13);
    chk("loop taken branches", perf.taken, 13);
    chk("loop stack depth", sp, 0);

    // ---- trap: getfield cannot run on this core ----------------------------
    prog.delete();
    emit('{8'h10, 8'h05, 8'h3b});                   // 0: LV0 = 5
    emit('{8'h2a, 8'hb4, 8'h00, 8'h01});            // 3: aload_0 getfield #1
    emit('{8'h10, 8'h09, 8'h3b, 8'hb1});            // not reached
    run_prog(200);
    chk("trap flagged", trapped, 1);
    chk("trap opcode", trap_op, 8'hb4);
    chk("trap pc", trap_pc, 4);
    read_lv(0, v); chk("LV0 before trap", v, 5);

    // ---- every mechanism happened --------------------------------------------
    chk("folded groups seen", n_folded > 0, 1);
    chk("P' tags seen", n_ptag > 0, 1);
    chk("forward from E seen", n_fwd_e > 0, 1);
    chk("forward from C seen", n_fwd_c > 0, 1);
    chk("forward from W seen", n_fwd_w > 0, 1);
    chk("file reads seen", n_file > 0, 1);
    chk("taken branches seen", n_taken > 0, 1);
    chk("halts seen", n_halt > 0, 1);
    chk("traps seen", n_trap > 0, 1);
    $display("mechanisms: folded=%0d ptag=%0d fwdE=%0d fwdC=%0d fwdW=%0d file=%0d taken=%0d halt=%0d trap=%0d",
             n_folded, n_ptag, n_fwd_e, n_fwd_c, n_fwd_w, n_file, n_taken, n_halt, n_trap);
    $display("cycles: original %0d/%0d, rescheduled %0d/%0d", cyc_orig[0], cyc_orig[1],
             cyc_tpoc[0], cyc_tpoc[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
