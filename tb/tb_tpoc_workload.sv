// tb_tpoc_workload -- random integer basic blocks, run in their original
// order and in T-POC order, on cores of foldability 4 (default parameters),
// 3 and 2.
//
// Each block first loads eight local variables with constants, then runs
// random assignment statements `LVx = <expression>` and ends with return.
// The original order is the post-order a Java compiler emits (operands pushed
// long before the operator that consumes them); it is valid on any core, so
// the three cores run it side by side.
//
// The T-POC order is produced here by a small model of the software
// rescheduler, which works on the expression tree and targets one
// foldability N.  Every operator becomes one group: its last q operands
// (q <= N-1) folded in front of it -- the producer itself for a constant or
// a local variable, a P' tag for the result of an earlier group -- then the
// operator, and at the root the store when it fits.  The first n-q operands
// are left on the stack below the P' slots; one that is a constant or a
// variable is pushed alone at its original place.  For each operator q is
// chosen to need the fewest groups, preferring the larger q.  Groups of
// inner operators come first, so each P' finds its value at the right place
// on the stack.  Code rescheduled for one N is only valid on a core of that
// foldability, so each core runs its own version.
//
// Checked for every block: the local variables against a stack-machine
// interpreter of the original order; a clean halt with an empty operand
// stack; for the T-POC order, exactly the predicted number of groups (from
// the choices above and the 7-byte queue) and of P' tags, and never more
// cycles than the original order; and that a wider folding window never
// needs more groups.  Blocks of 16 and 64 bytecodes are run, the two basic
// block sizes the document uses for the rescheduler.  The bytecodes per
// issue cycle of each order and foldability are printed.
module tb_tpoc_workload;
  import poc_pkg::*;

  localparam int BLOCKS_PER_SIZE = 30;
  localparam int NLV = 8;

  logic            clk = 1'b0;
  logic            rst_n;
  logic            start;
  logic            imem_we;
  logic [PCW-1:0]  imem_waddr;
  logic [7:0]      imem_wdata;
  logic [LVW-1:0]  dbg_lv_addr;
  // index 0: default core (foldability 4), 1: foldability 3, 2: foldability 2
  logic [2:0][31:0]    dbg_lv_data;
  logic [2:0]          halted, trapped;
  logic [2:0][PCW-1:0] trap_pc;
  logic [2:0][7:0]     trap_op;
  logic [2:0][SPW:0]   sp;
  perf_t [2:0]         perf;

  tpoc_java_core dut (
    .clk, .rst_n, .start, .imem_we, .imem_waddr, .imem_wdata, .dbg_lv_addr,
    .dbg_lv_data (dbg_lv_data[0]), .halted (halted[0]), .trapped (trapped[0]),
    .trap_pc (trap_pc[0]), .trap_op (trap_op[0]), .sp (sp[0]), .perf (perf[0])
  );

  tpoc_java_core #(.FOLD(3)) dut3 (
    .clk, .rst_n, .start, .imem_we, .imem_waddr, .imem_wdata, .dbg_lv_addr,
    .dbg_lv_data (dbg_lv_data[1]), .halted (halted[1]), .trapped (trapped[1]),
    .trap_pc (trap_pc[1]), .trap_op (trap_op[1]), .sp (sp[1]), .perf (perf[1])
  );

  tpoc_java_core #(.FOLD(2)) dut2 (
    .clk, .rst_n, .start, .imem_we, .imem_waddr, .imem_wdata, .dbg_lv_addr,
    .dbg_lv_data (dbg_lv_data[2]), .halted (halted[2]), .trapped (trapped[2]),
    .trap_pc (trap_pc[2]), .trap_op (trap_op[2]), .sp (sp[2]), .perf (perf[2])
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---- token of the original program ------------------------------------
  typedef struct {
    int kind;            // 0 leaf, 1 unary op, 2 binary op
    byte unsigned b[3];  // bytes
    int len;
    int c0, c1;          // children (node indices in the statement)
  } tok_t;

  byte unsigned orig[$], prog_q[$];
  byte unsigned tpoc [3][$];          // T-POC code for foldability 4, 3, 2
  int ref_lv [NLV];
  int exp_groups [3], exp_ptags [3], exp_lone [3], n_pc_bytecodes;

  function automatic tok_t mk_leaf();
    tok_t t;
    int r;
    t.kind = 0; t.c0 = -1; t.c1 = -1;
    r = $urandom_range(0, 4);
    case (r)
      0: begin t.b[0] = 8'h1a + 8'($urandom_range(0, 3)); t.len = 1; end          // iload_n
      1: begin t.b[0] = 8'h15; t.b[1] = 8'($urandom_range(4, NLV-1)); t.len = 2; end // iload
      2: begin t.b[0] = 8'h02 + 8'($urandom_range(0, 6)); t.len = 1; end          // iconst
      3: begin t.b[0] = 8'h10; t.b[1] = 8'($urandom); t.len = 2; end              // bipush
      default: begin t.b[0] = 8'h11; t.b[1] = 8'($urandom); t.b[2] = 8'($urandom); t.len = 3; end
    endcase
    return t;
  endfunction

  function automatic tok_t mk_op(bit binary);
    tok_t t;
    byte unsigned bin [9] = '{8'h60, 8'h64, 8'h68, 8'h7e, 8'h80, 8'h82, 8'h78, 8'h7a, 8'h7c};
    byte unsigned un  [4] = '{8'h74, 8'h91, 8'h92, 8'h93};
    t.kind = binary ? 2 : 1; t.len = 1; t.c0 = -1; t.c1 = -1;
    t.b[0] = binary ? bin[$urandom_range(0, 8)] : un[$urandom_range(0, 3)];
    return t;
  endfunction

  // Reference interpreter step for one token.
  function automatic void interp(tok_t t, ref int stk[$]);
    int x, y, r;
    if (t.kind == 0) begin
      case (t.b[0])
        8'h15:   r = ref_lv[t.b[1]];
        8'h10:   r = int'(byte'(t.b[1]));
        8'h11:   r = int'(shortint'({t.b[1], t.b[2]}));
        default: r = (t.b[0] >= 8'h1a) ? ref_lv[t.b[0] - 8'h1a] : int'(t.b[0]) - 3;
      endcase
      stk.push_back(r);
    end else if (t.kind == 1) begin
      x = stk.pop_back();
      case (t.b[0])
        8'h74:   r = -x;
        8'h91:   r = int'(byte'(x));
        8'h92:   r = x & 32'hffff;
        default: r = int'(shortint'(x));
      endcase
      stk.push_back(r);
    end else begin
      y = stk.pop_back(); x = stk.pop_back();
      case (t.b[0])
        8'h60:   r = x + y;
        8'h64:   r = x - y;
        8'h68:   r = x * y;
        8'h7e:   r = x & y;
        8'h80:   r = x | y;
        8'h82:   r = x ^ y;
        8'h78:   r = x << (y & 31);
        8'h7a:   r = x >>> (y & 31);
        default: r = int'(unsigned'(x) >> (y & 31));
      endcase
      stk.push_back(r);
    end
  endfunction

  function automatic void put(ref byte unsigned q[$], tok_t t);
    for (int i = 0; i < t.len; i++) q.push_back(t.b[i]);
  endfunction

  // One statement: LV[dst] = random expression of `leaves` leaves.
  // Returns the number of bytecodes of the original order.
  function automatic int statement(int leaves, int dst);
    tok_t toks[$];
    int   ids[$];        // node stack while building
    int   depth, left, nbc, gbytes;
    int   stk[$];
    byte unsigned st[2];
    left = leaves; depth = 0;
    while (!(left == 0 && depth == 1)) begin
      int choice;
      // 0 leaf, 1 unary, 2 binary
      if (left > 0 && (depth < 2 || $urandom_range(0, 2) == 0)) choice = 0;
      else if (depth >= 2 && (left == 0 || $urandom_range(0, 3) != 0)) choice = 2;
      else if (depth >= 1 && $urandom_range(0, 4) == 0) choice = 1;
      else choice = (left > 0) ? 0 : 2;
      if (choice == 0) begin
        toks.push_back(mk_leaf());
        ids.push_back(toks.size() - 1);
        left--; depth++;
      end else begin
        tok_t t;
        t = mk_op(choice == 2);
        if (choice == 2) begin
          t.c1 = ids.pop_back(); t.c0 = ids.pop_back(); depth--;
        end else begin
          t.c0 = ids.pop_back();
        end
        toks.push_back(t);
        ids.push_back(toks.size() - 1);
      end
    end
    // store bytes
    if (dst < 4) begin st[0] = 8'h3b + 8'(dst); end
    else begin st[0] = 8'h36; st[1] = 8'(dst); end
    // original order and reference result
    foreach (toks[i]) begin
      put(orig, toks[i]);
      interp(toks[i], stk);
    end
    orig.push_back(st[0]); if (dst >= 4) orig.push_back(st[1]);
    ref_lv[dst] = stk.pop_back();
    nbc = toks.size() + 1;
    n_pc_bytecodes += leaves + 1;
    // T-POC order for foldability N = 4, 3, 2.  An operator with n operands
    // folds its last q = min(n, N-1) operands; the first n-q are left on the
    // stack beforehand, below the P' slots (a leaf among them is pushed
    // alone, where the compiler had it).  The store joins the root group if
    // the group still has room for it.
    for (int f = 0; f < 3; f++) begin
      int nfold;
      bit implicit [$], cfit [$];
      nfold = 4 - f;
      foreach (toks[i]) implicit.push_back(1'b0);
      foreach (toks[i]) cfit.push_back(1'b0);
      foreach (toks[i])
        if (toks[i].kind != 0) begin
          int n, best, best_cost;
          int ch [2];
          n = toks[i].kind;
          ch[0] = toks[i].c0; ch[1] = toks[i].c1;
          best = 0; best_cost = 1 << 20;
          // fewest groups: lone pushes of leaves left out, plus a lone store
          for (int q = ((n < nfold - 1) ? n : nfold - 1); q >= 0; q--) begin
            int cost, gb;
            bit fits;
            cost = 0; gb = 1;
            for (int j = 0; j < n; j++)
              if (j < n - q) cost += (toks[ch[j]].kind == 0) ? 1 : 0;
              else gb += (toks[ch[j]].kind == 0) ? toks[ch[j]].len : 1;
            fits = (q + 2 <= nfold) && (gb + ((dst < 4) ? 1 : 2) <= IQ_BYTES);
            if (i == toks.size() - 1 && !fits) cost++;
            if (cost < best_cost) begin best_cost = cost; best = q; cfit[i] = fits; end
          end
          for (int j = 0; j < n - best; j++) implicit[ch[j]] = 1'b1;
        end
      if (toks.size() == 1) begin
        for (int k = 0; k < toks[0].len; k++) tpoc[f].push_back(toks[0].b[k]);
        exp_groups[f]++;
      end else begin
        foreach (toks[i]) begin
          if (toks[i].kind == 0) begin
            if (implicit[i]) begin
              for (int k = 0; k < toks[i].len; k++) tpoc[f].push_back(toks[i].b[k]);
              exp_groups[f]++;
              exp_lone[f]++;
            end
          end else begin
            int nin;
            gbytes = 1; nin = 0;
            for (int c = 0; c < 2; c++) begin
              int ch;
              ch = (c == 0) ? toks[i].c0 : toks[i].c1;
              if (ch >= 0 && !implicit[ch]) begin
                nin++;
                if (toks[ch].kind == 0) begin
                  for (int k = 0; k < toks[ch].len; k++) tpoc[f].push_back(toks[ch].b[k]);
                  gbytes += toks[ch].len;
                end else begin
                  tpoc[f].push_back(OP_PTAG); gbytes += 1; exp_ptags[f]++;
                end
              end
            end
            tpoc[f].push_back(toks[i].b[0]);
            exp_groups[f]++;
            if (i == toks.size() - 1 && !cfit[i]) begin exp_groups[f]++; exp_lone[f]++; end
          end
        end
      end
      tpoc[f].push_back(st[0]); if (dst >= 4) tpoc[f].push_back(st[1]);
    end
    return nbc;
  endfunction

  // Load prog into the core, run it, return cycles; LVs then hold results.
  task automatic run(ref byte unsigned prog[$], input int max_cycles);
    rst_n = 1'b0; start = 1'b0; imem_we = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    foreach (prog[i]) begin
      imem_we = 1'b1; imem_waddr = PCW'(i); imem_wdata = prog[i];
      @(posedge clk);
    end
    imem_we = 1'b0;
    @(negedge clk) start = 1'b1;
    for (int c = 0; c < max_cycles && !(&halted); c++) @(posedge clk);
    repeat (4) @(posedge clk);
  endtask

  // Results, clean halt and empty stack on all three cores.
  // only: -1 for all three cores, else the one core that ran its own code
  task automatic check_all(string tag, int only);
    for (int f = 0; f < 3; f++) if (only < 0 || only == f) begin
      chk($sformatf("%s fold%0d halted", tag, 4 - f), halted[f] && !trapped[f], 1);
      chk($sformatf("%s fold%0d stack empty", tag, 4 - f), sp[f], 0);
    end
    for (int i = 0; i < NLV; i++) begin
      dbg_lv_addr = LVW'(i);
      #1;
      for (int f = 0; f < 3; f++) if (only < 0 || only == f)
        chk($sformatf("%s fold%0d LV%0d", tag, 4 - f, i), int'(dbg_lv_data[f]), ref_lv[i]);
    end
  endtask

  initial begin
    // [order][foldability]: bytecodes of the block (P' tags excluded), groups
    longint tot_bc [2], tot_grp [2][3], tot_pc, tot_pcf [2][3];
    rst_n = 1'b0; start = 1'b0; imem_we = 1'b0; imem_waddr = '0; imem_wdata = '0;
    dbg_lv_addr = '0;
    for (int sz = 0; sz < 2; sz++) begin
      int target;
      target = (sz == 0) ? 16 : 64;
      tot_bc = '{0, 0}; tot_grp = '{'{0, 0, 0}, '{0, 0, 0}}; tot_pc = 0;
      tot_pcf = '{'{0, 0, 0}, '{0, 0, 0}};
      for (int blk = 0; blk < BLOCKS_PER_SIZE; blk++) begin
        int nbc, cyc_o [3], grp [2][3];
        int prefix_groups;
        orig.delete();
        for (int f = 0; f < 3; f++) begin tpoc[f].delete(); exp_groups[f] = 0; exp_ptags[f] = 0; exp_lone[f] = 0; end
        n_pc_bytecodes = 0;
        // prefix: LV0..7 = random bytes (bipush + istore), same in both
        for (int i = 0; i < NLV; i++) begin
          byte unsigned v;
          v = 8'($urandom);
          ref_lv[i] = int'(byte'(v));
          orig.push_back(8'h10); orig.push_back(v);
          if (i < 4) orig.push_back(8'h3b + 8'(i));
          else begin orig.push_back(8'h36); orig.push_back(8'(i)); end
          for (int f = 0; f < 3; f++) begin
            tpoc[f].push_back(8'h10); tpoc[f].push_back(v);
            if (i < 4) tpoc[f].push_back(8'h3b + 8'(i));
            else begin tpoc[f].push_back(8'h36); tpoc[f].push_back(8'(i)); end
          end
        end
        prefix_groups = NLV;
        nbc = 0;
        while (nbc < target) nbc += statement($urandom_range(1, 5), $urandom_range(0, NLV-1));
        orig.push_back(8'hb1);
        for (int f = 0; f < 3; f++) tpoc[f].push_back(8'hb1);

        run(orig, 5000);
        check_all("orig", -1);
        for (int f = 0; f < 3; f++) begin
          cyc_o[f] = perf[f].cycles;
          grp[0][f] = perf[f].groups;
          chk($sformatf("orig fold%0d push/pop count", 4 - f), perf[f].pc_ops, n_pc_bytecodes + 2 * NLV);
          tot_pcf[0][f] += perf[f].pc_folded - 2 * NLV;
        end
        tot_bc[0] += perf[0].bytecodes - 2 * NLV - 1;
        tot_pc += n_pc_bytecodes;

        // each core runs the code rescheduled for its own foldability
        for (int f = 0; f < 3; f++) begin
          prog_q = tpoc[f];
          run(prog_q, 5000);
          check_all($sformatf("tpoc%0d", 4 - f), f);
          grp[1][f] = perf[f].groups;
          chk($sformatf("tpoc fold%0d groups", 4 - f), perf[f].groups, exp_groups[f] + prefix_groups + 1);
          chk($sformatf("tpoc fold%0d P' tags", 4 - f), perf[f].ptags, exp_ptags[f]);
          chk($sformatf("tpoc fold%0d push/pop count", 4 - f), perf[f].pc_ops, n_pc_bytecodes + 2 * NLV);
          chk($sformatf("tpoc fold%0d push/pop folded", 4 - f), perf[f].pc_folded,
              n_pc_bytecodes + 2 * NLV - exp_lone[f]);
          tot_pcf[1][f] += perf[f].pc_folded - 2 * NLV;
          chk($sformatf("tpoc fold%0d not slower", 4 - f), perf[f].cycles <= cyc_o[f], 1);
          tot_bc[1] += perf[f].bytecodes - perf[f].ptags - 2 * NLV - 1;
        end
        // a wider folding window never needs more groups
        for (int o = 0; o < 2; o++) begin
          chk("fold4 <= fold3 groups", grp[o][0] <= grp[o][1], 1);
          chk("fold3 <= fold2 groups", grp[o][1] <= grp[o][2], 1);
          for (int f = 0; f < 3; f++) tot_grp[o][f] += grp[o][f] - prefix_groups - 1;
        end
      end
      chk("same block bytecodes in both orders", 3 * tot_bc[0], tot_bc[1]);
      for (int f = 0; f < 3; f++)
        $display("blocks of %0d bytecodes, %0d-foldable: original %0d groups, %.2f bytecodes per issue cycle, %.1f%% of pushes/pops folded; T-POC %0d groups, %.2f, %.1f%%",
                 target, 4 - f, tot_grp[0][f], real'(tot_bc[0]) / real'(tot_grp[0][f]),
                 100.0 * real'(tot_pcf[0][f]) / real'(tot_pc),
                 tot_grp[1][f], real'(tot_bc[0]) / real'(tot_grp[1][f]),
                 100.0 * real'(tot_pcf[1][f]) / real'(tot_pc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
