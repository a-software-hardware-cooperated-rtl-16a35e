// tpoc_decoder -- turns a folded group into one operation and assigns result
// identification numbers.
//
// The decoder keeps the operand-stack depth `sp` as seen by the bytecodes it
// has issued.  For each group it works out, statically, which stack slots the
// group reads and which slot (if any) its result occupies; that slot number is
// the identification number of the result, recorded in the pipeline latch, and
// later stages compare operand slots against it to forward results.
//
// Operand order of a group with n source operands and k folded producers
// (k <= n): operands 0 .. n-k-1 are already on the stack (below everything
// else), operands n-k .. n-1 come from the producers in program order.  A
// plain producer supplies a constant or a local variable; a P' tag supplies
// a pending result: the last P' of the group takes the top of stack, the one
// before it the next slot down, and so on (the newest pending result is the
// nearest, which is how the document resolves two P' tags in one group).
// A lone producer pushes its value, a lone or folded consumer writes a local
// variable, an operator followed by a consumer writes the local variable
// instead of the stack.  O_T bytecodes issue alone: nop, pop, dup, iinc and
// return are executed; every other O_T or O_C bytecode, and any bytecode the
// integer execution unit cannot run, produces a trap operation.
// The operation also carries how many P' tags and how many real stack
// push/pop bytecodes (P and C) the group holds, for the event counters.
//
// On a flush (taken branch, halt or trap in the execute stage) sp is reset to
// the depth recorded with the flushing operation.
//
// Timing: uop is combinational from grp; sp updates on the clock when issue
// is high.
module tpoc_decoder
  import poc_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  fgrp_t          grp,
  input  logic           issue,       // group accepted this cycle
  input  logic           flush,
  input  logic [SPW:0]   flush_sp,
  output uop_t           uop,
  output logic [SPW:0]   sp
);

  dec_t       op, cons;
  logic [2:0] n, nimp, m, nptag;
  logic       has_res;

  function automatic opnd_t p_opnd(dec_t p, logic [SPW:0] slot);
    opnd_t o;
    o      = '0;
    o.lv   = p.lv_idx;
    o.imm  = p.imm;
    o.slot = slot[SPW-1:0];
    unique case (p.psrc)
      PS_LV:    o.kind = OS_LV;
      PS_DFTOS: o.kind = OS_STACK;
      default:  o.kind = OS_CONST;
    endcase
    return o;
  endfunction

  // Source operand i of a group (see the operand order above).
  function automatic opnd_t src_opnd(int i, fgrp_t g, logic [2:0] nn, logic [2:0] ni,
                                     logic [2:0] mm, logic [2:0] npt, logic [SPW:0] s);
    opnd_t o;
    int    j, t;
    o = '0;
    j = i - int'(ni);
    t = 0;
    if (i < int'(nn)) begin
      if (i < int'(ni)) begin
        o.kind = OS_STACK;
        o.slot = SPW'(s - (SPW+1)'(mm) + (SPW+1)'(i));
      end else begin
        for (int q = 0; q < MAX_FOLD; q++)
          if (q < j && g.bc[q].psrc == PS_DFTOS) t++;
        o = p_opnd(g.bc[(j >= 0 && j < MAX_FOLD) ? j : 0],
                   s - (SPW+1)'(npt) + (SPW+1)'(t));
      end
    end
    return o;
  endfunction

  always_comb begin
    op    = grp.bc[grp.np < 3'(MAX_FOLD) ? grp.np : 3'd0];
    cons  = grp.bc[(32'(grp.np) + 32'(grp.has_op)) < MAX_FOLD ?
                   grp.np + 3'(grp.has_op) : 3'd0];
    nptag = '0;
    for (int i = 0; i < MAX_FOLD; i++)
      if (i < int'(grp.np) && grp.bc[i].psrc == PS_DFTOS) nptag = nptag + 3'd1;

    // Effective operator: a group without one moves a single value.
    n       = grp.has_op ? op.nsrc : 3'd1;
    has_res = grp.has_op ? op.has_res : 1'b1;
    nimp    = (n > grp.np) ? n - grp.np : 3'd0;
    m       = nimp + nptag;

    uop          = '0;
    uop.valid    = grp.valid;
    uop.pc       = grp.has_op ? op.pc : grp.bc[0].pc;
    uop.nbc      = grp.nbc;
    uop.nptag    = nptag;
    uop.npc      = grp.np - nptag + 3'(grp.has_cons);
    uop.alu      = grp.has_op ? op.alu : ALU_MOV;
    uop.br       = grp.has_op && op.poc == POC_OB ? op.br : BR_NONE;
    uop.target   = op.pc + op.imm[PCW-1:0];

    // Source operands 0 and 1.
    uop.a = src_opnd(0, grp, n, nimp, m, nptag, sp);
    uop.b = src_opnd(1, grp, n, nimp, m, nptag, sp);
    if (n < 3'd2 && uop.br != BR_NONE) begin
      uop.b      = '0;
      uop.b.kind = OS_CONST;                // if<cond> compares with zero
    end

    // Destination.
    uop.sp_after = sp - (SPW+1)'(m);
    if (grp.has_cons) begin
      uop.dst    = DST_LV;
      uop.dst_lv = cons.lv_idx;
    end else if (has_res) begin
      uop.dst      = DST_STACK;
      uop.dst_slot = SPW'(sp - (SPW+1)'(m));
      uop.sp_after = sp - (SPW+1)'(m) + 1'b1;
    end

    // Operators outside the folding rules.
    if (grp.has_op && op.poc == POC_OT) begin
      uop.a = '0; uop.b = '0; uop.dst = DST_NONE; uop.sp_after = sp;
      unique case (op.opcode)
        8'h57: uop.sp_after = sp - 1'b1;                     // pop
        8'h59: begin                                         // dup
          uop.a.kind   = OS_STACK;
          uop.a.slot   = SPW'(sp - 1'b1);
          uop.dst      = DST_STACK;
          uop.dst_slot = SPW'(sp);
          uop.sp_after = sp + 1'b1;
        end
        8'h84: begin                                         // iinc
          uop.a.kind = OS_LV;    uop.a.lv  = op.lv_idx;
          uop.b.kind = OS_CONST; uop.b.imm = op.imm;
          uop.dst    = DST_LV;   uop.dst_lv = op.lv_idx;
        end
        8'hb1:   uop.halt = 1'b1;                             // return
        default: ;
      endcase
    end

    // Anything the execution unit cannot run traps when it reaches execute.
    for (int i = 0; i < MAX_FOLD; i++)
      if (i < int'(grp.nbc) && !grp.bc[i].exec_ok && !uop.trap) begin
        uop.trap    = 1'b1;
        uop.trap_op = grp.bc[i].opcode;
      end
    if (n > 3'd2 && !uop.trap) begin
      uop.trap    = 1'b1;
      uop.trap_op = op.opcode;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sp <= '0;
    else if (flush) sp <= flush_sp;
    else if (issue) sp <= uop.sp_after;
  end

endmodule
