// poc_fold_unit -- N-foldable sequential POC folding.
//
// Takes the first FOLD classified bytecodes at the head of the instruction
// queue and decides which of them issue together this cycle.  The check is
// sequential, as in the POC model: bytecode 0 is the first combined bytecode
// N, it is checked against bytecode 1 with poc_fold_check, the combination
// becomes the new N, and so on, until a check returns the ending status E or
// the window runs out.  The issued group ends at the last FI relation.  A run
// of producers that never meets an operator or consumer it can fold into is
// not folded: only its first bytecode issues (serial execution).
//
// Interface: win[i] is bytecode i of the window (valid bit inside); grp is
// the group chosen, with its bytecodes, their count, their total length in
// bytes, and how many producers lead it.  FOLD is the foldability (the
// document evaluates 2, 3 and 4 and uses 4 as its main configuration).
//
// Purely combinational: FOLD-1 chained check cells.
module poc_fold_unit
  import poc_pkg::*;
#(
  parameter int FOLD = 4
)(
  input  dec_t  [MAX_FOLD-1:0] win,
  output fgrp_t                grp
);

  fstate_t [FOLD-1:0] st;
  logic    [FOLD-1:0] alive;
  logic    [FOLD-1:0] fi;
  logic    [FOLD-1:0] cont;

  // Bytecode 0 starts the check.
  always_comb begin
    st[0]          = '0;
    st[0].kind     = win[0].poc;
    st[0].np       = (win[0].poc == POC_P) ? 3'd1 : 3'd0;
    st[0].ptype[0] = win[0].dtype;
    st[0].has_res  = win[0].has_res;
    st[0].rtype    = win[0].dtype;
  end
  assign alive[0] = win[0].valid;
  assign fi[0]    = 1'b0;
  assign cont[0]  = 1'b1;

  for (genvar i = 1; i < FOLD; i++) begin : g_chk
    dec_t nb;
    always_comb begin
      nb       = win[i];
      nb.valid = win[i].valid & alive[i-1];
    end
    poc_fold_check u_chk (
      .cur  (st[i-1]),
      .nb   (nb),
      .fi   (fi[i]),
      .cont (cont[i]),
      .nxt  (st[i])
    );
    assign alive[i] = alive[i-1] & cont[i] & win[i].valid;
  end

  logic [2:0] len;

  always_comb begin
    len = 3'd1;
    for (int i = 1; i < FOLD; i++)
      if (fi[i] && alive[i-1] && win[i].valid) len = 3'(i + 1);

    grp          = '0;
    grp.valid    = win[0].valid;
    grp.nbc      = len;
    for (int i = 0; i < MAX_FOLD; i++) begin
      if (i < int'(len) && i < FOLD && win[i].valid) begin
        grp.bc[i]   = win[i];
        grp.nbytes  = grp.nbytes + 4'(win[i].len);
        if (win[i].poc == POC_P) grp.np = grp.np + 3'd1;
        else if (win[i].poc == POC_C) grp.has_cons = 1'b1;
        else grp.has_op = 1'b1;
      end
    end
  end

endmodule
