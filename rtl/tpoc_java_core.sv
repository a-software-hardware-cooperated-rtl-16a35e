// tpoc_java_core -- single-pipeline Java processor with POC folding and
// P' tag support (the hardware half of the T-POC folding model).
//
// Bytecode that a software rescheduler has regrouped, with P' tags standing
// for results of earlier groups, is executed on a six-stage pipeline:
//   F  instr_queue      7-byte instruction queue, refilled from memory
//   D  poc_fold_unit    sequential N-foldable POC folding of the queue head
//      tpoc_decoder     group -> operation, stack slots = result IDs
//   R  pid_forward x2   operands from E, C or W latches by ID, else from the
//                       operand stack / local-variable files
//   E  exec_unit        integer ALU, branch condition; taken branches,
//                       return and traps flush F/D/R here
//   C  (no data cache operations are executed; the stage only delays)
//   W  word_regfile x2  result written to the operand stack or to a local
//                       variable
// One group (one to FOLD bytecodes) issues per cycle; there are no data
// stalls, because every pending result is forwarded.  A taken branch costs
// the groups fetched behind it.
//
// Interface: load the program through imem_* while start is low, then raise
// start; execution begins at address 0 and ends at a `return` bytecode
// (halted) or at a bytecode the integer core cannot run (halted and trapped,
// with its address and opcode).  Local variables can be read back through
// dbg_lv_*; perf counts the events of the pipeline.
//
// Following the document: the POC types and folding rules, the P' tag, the
// six stages, forwarding priority E over C over the top of stack, 7-byte
// queue and foldability 4.  This design's own: the execution unit, what
// executes and what traps, the memory and register-file sizes, the refill
// policy of the queue and the branch handling.
module tpoc_java_core
  import poc_pkg::*;
#(
  parameter int FOLD       = 4,       // foldability
  parameter int QBYTES     = 7,       // instruction queue bytes
  parameter int IMEM_BYTES = 4096,    // bytecode memory
  parameter int LV_WORDS   = 256      // local variables
)(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            imem_we,
  input  logic [PCW-1:0]  imem_waddr,
  input  logic [7:0]      imem_wdata,
  input  logic [LVW-1:0]  dbg_lv_addr,
  output logic [31:0]     dbg_lv_data,
  output logic            halted,
  output logic            trapped,
  output logic [PCW-1:0]  trap_pc,
  output logic [7:0]      trap_op,
  output logic [SPW:0]    sp,
  output perf_t           perf
);

  localparam int STACK_WORDS = 1 << SPW;

  logic running;
  assign running = start && !halted;

  // ---------------------------------------------------------------- F ----
  logic [QBYTES-1:0][PCW-1:0] fetch_addr;
  logic [QBYTES-1:0][7:0]     fetch_data;
  dec_t [MAX_FOLD-1:0]        win;
  logic [PCW-1:0]             head_pc;
  logic [3:0]                 qcount;
  logic                       flush, redirect;
  logic [PCW-1:0]             redirect_pc;
  logic [SPW:0]               flush_sp;
  logic                       issue;
  fgrp_t                      grp;

  bytecode_mem #(.BYTES(IMEM_BYTES), .NR(QBYTES), .AW(PCW)) u_imem (
    .clk   (clk),
    .we    (imem_we),
    .waddr (imem_waddr),
    .wdata (imem_wdata),
    .raddr (fetch_addr),
    .rdata (fetch_data)
  );

  instr_queue #(.QBYTES(QBYTES)) u_iq (
    .clk         (clk),
    .rst_n       (rst_n),
    .run         (running),
    .consume     (issue ? grp.nbytes : 4'd0),
    .redirect    (redirect),
    .redirect_pc (redirect_pc),
    .mem_addr    (fetch_addr),
    .mem_data    (fetch_data),
    .win         (win),
    .head_pc     (head_pc),
    .count       (qcount)
  );

  // ---------------------------------------------------------------- D ----
  uop_t d_uop;

  poc_fold_unit #(.FOLD(FOLD)) u_fold (
    .win (win),
    .grp (grp)
  );

  assign issue = grp.valid && running && !flush;

  tpoc_decoder u_dec (
    .clk      (clk),
    .rst_n    (rst_n),
    .grp      (grp),
    .issue    (issue),
    .flush    (flush),
    .flush_sp (flush_sp),
    .uop      (d_uop),
    .sp       (sp)
  );

  // ---------------------------------------------------------------- R ----
  uop_t        r_uop, e_uop, c_uop, w_uop;
  logic [31:0] e_a, e_b, e_y, c_val, w_val;
  logic        e_taken;

  logic [1:0][SPW-1:0] st_raddr;
  logic [1:0][31:0]    st_rdata;
  logic [2:0][LVW-1:0] lv_raddr;
  logic [2:0][31:0]    lv_rdata;

  logic [2:0]            stg_valid;
  dst_e [2:0]            stg_dst;
  logic [2:0][SPW-1:0]   stg_slot;
  logic [2:0][LVW-1:0]   stg_lv;
  logic [2:0][31:0]      stg_val;
  logic [31:0]           r_a, r_b;
  logic [1:0]            sel_a, sel_b;

  assign st_raddr[0] = r_uop.a.slot;
  assign st_raddr[1] = r_uop.b.slot;
  assign lv_raddr[0] = r_uop.a.lv;
  assign lv_raddr[1] = r_uop.b.lv;
  assign lv_raddr[2] = dbg_lv_addr;
  assign dbg_lv_data = lv_rdata[2];

  assign stg_valid = {w_uop.valid, c_uop.valid, e_uop.valid && !e_uop.trap};
  assign stg_dst   = {w_uop.dst, c_uop.dst, e_uop.dst};
  assign stg_slot  = {w_uop.dst_slot, c_uop.dst_slot, e_uop.dst_slot};
  assign stg_lv    = {w_uop.dst_lv, c_uop.dst_lv, e_uop.dst_lv};
  assign stg_val   = {w_val, c_val, e_y};

  pid_forward u_fwd_a (
    .o (r_uop.a), .stg_valid (stg_valid), .stg_dst (stg_dst), .stg_slot (stg_slot),
    .stg_lv (stg_lv), .stg_val (stg_val), .stack_val (st_rdata[0]),
    .lv_val (lv_rdata[0]), .val (r_a), .sel (sel_a)
  );
  pid_forward u_fwd_b (
    .o (r_uop.b), .stg_valid (stg_valid), .stg_dst (stg_dst), .stg_slot (stg_slot),
    .stg_lv (stg_lv), .stg_val (stg_val), .stack_val (st_rdata[1]),
    .lv_val (lv_rdata[1]), .val (r_b), .sel (sel_b)
  );

  // ---------------------------------------------------------------- E ----
  exec_unit u_exu (
    .alu   (e_uop.alu),
    .br    (e_uop.br),
    .a     (e_a),
    .b     (e_b),
    .y     (e_y),
    .taken (e_taken)
  );

  logic e_stop;
  assign e_stop      = e_uop.valid && (e_uop.halt || e_uop.trap);
  assign redirect    = e_uop.valid && !e_uop.trap && e_uop.br != BR_NONE && e_taken;
  assign redirect_pc = e_uop.target;
  assign flush       = redirect || e_stop;
  assign flush_sp    = e_uop.sp_after;

  // -------------------------------------------------- pipeline latches ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_uop <= '0;
      e_uop <= '0;
      c_uop <= '0;
      w_uop <= '0;
      e_a   <= '0;
      e_b   <= '0;
      c_val <= '0;
      w_val <= '0;
    end else begin
      r_uop       <= d_uop;
      r_uop.valid <= issue;
      e_uop       <= r_uop;
      e_uop.valid <= r_uop.valid && !flush;
      e_a         <= r_a;
      e_b         <= r_b;
      c_uop       <= e_uop;
      c_uop.valid <= e_uop.valid && !e_uop.trap;
      c_val       <= e_y;
      w_uop       <= c_uop;
      w_val       <= c_val;
    end
  end

  // ---------------------------------------------------------------- W ----
  word_regfile #(.DEPTH(STACK_WORDS), .NR(2)) u_stack (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (w_uop.valid && w_uop.dst == DST_STACK),
    .waddr (w_uop.dst_slot),
    .wdata (w_val),
    .raddr (st_raddr),
    .rdata (st_rdata)
  );

  word_regfile #(.DEPTH(LV_WORDS), .NR(3), .AW(LVW)) u_lv (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (w_uop.valid && w_uop.dst == DST_LV),
    .waddr (w_uop.dst_lv),
    .wdata (w_val),
    .raddr (lv_raddr),
    .rdata (lv_rdata)
  );

  // ------------------------------------------------- status, counters ----
  function automatic logic [31:0] cnt_src(opnd_t o, logic [1:0] sel, logic [1:0] want);
    return (o.kind == OS_STACK || o.kind == OS_LV) && sel == want ? 32'd1 : 32'd0;
  endfunction

  logic r_live;
  assign r_live = r_uop.valid && !flush;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      halted  <= 1'b0;
      trapped <= 1'b0;
      trap_pc <= '0;
      trap_op <= '0;
      perf    <= '0;
    end else begin
      if (e_stop && !halted) begin
        halted  <= 1'b1;
        trapped <= e_uop.trap;
        trap_pc <= e_uop.pc;
        trap_op <= e_uop.trap_op;
      end
      if (running) perf.cycles <= perf.cycles + 32'd1;
      if (e_uop.valid && !e_uop.trap) begin
        perf.groups    <= perf.groups + 32'd1;
        perf.bytecodes <= perf.bytecodes + 32'(e_uop.nbc);
        perf.folded    <= perf.folded + ((e_uop.nbc > 3'd1) ? 32'd1 : 32'd0);
        perf.ptags     <= perf.ptags + 32'(e_uop.nptag);
        perf.pc_ops    <= perf.pc_ops + 32'(e_uop.npc);
        perf.pc_folded <= perf.pc_folded + ((e_uop.nbc > 3'd1) ? 32'(e_uop.npc) : 32'd0);
      end
      if (r_live) begin
        perf.fwd_e      <= perf.fwd_e + cnt_src(r_uop.a, sel_a, 2'd0) + cnt_src(r_uop.b, sel_b, 2'd0);
        perf.fwd_c      <= perf.fwd_c + cnt_src(r_uop.a, sel_a, 2'd1) + cnt_src(r_uop.b, sel_b, 2'd1);
        perf.fwd_w      <= perf.fwd_w + cnt_src(r_uop.a, sel_a, 2'd2) + cnt_src(r_uop.b, sel_b, 2'd2);
        perf.file_reads <= perf.file_reads + cnt_src(r_uop.a, sel_a, 2'd3) + cnt_src(r_uop.b, sel_b, 2'd3);
      end
      if (redirect) perf.taken <= perf.taken + 32'd1;
    end
  end

endmodule
