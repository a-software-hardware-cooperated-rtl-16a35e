// poc_pkg -- types and constants shared by the POC / T-POC folding Java core.
//
// The Producer/Operator/Consumer (POC) model sorts every bytecode by where it
// takes its operands and where it leaves its result:
//   P   pushes a constant or a local variable onto the operand stack,
//   O_E is executed in an execution unit, O_B branches, O_C runs from
//   micro-code or traps, O_T ends any folding,
//   C   pops the top of stack into a local variable.
// The tagged model (T-POC) adds one opcode, the P' tag, which is a P whose
// source is "the newest pending result" (forwarded from a pipeline latch or
// read from the top of stack).  The opcode value of the tag (0xCB, the first
// unassigned JVM opcode) is this design's choice; the document only says a
// free reserved opcode is used.
//
// Records defined here:
//   dec_t   one classified bytecode (output of poc_classifier)
//   fgrp_t  one folded group as chosen by poc_fold_unit
//   uop_t   the operation the decoder hands to the operand-read stage, with
//           stack slot numbers that double as result identification numbers
package poc_pkg;

  localparam int MAX_FOLD = 4;        // largest foldability supported
  localparam int IQ_BYTES = 7;        // instruction queue size in bytes
  localparam int PCW      = 16;       // bytecode address width
  localparam int SPW      = 6;        // operand-stack slot number width
  localparam int LVW      = 8;        // local-variable index width

  localparam logic [7:0] OP_PTAG = 8'hCB;   // P' tag opcode

  typedef enum logic [2:0] {
    POC_P  = 3'd0,
    POC_OE = 3'd1,
    POC_OB = 3'd2,
    POC_OC = 3'd3,
    POC_OT = 3'd4,
    POC_C  = 3'd5
  } poc_e;

  typedef enum logic [2:0] {
    DT_INT    = 3'd0,
    DT_LONG   = 3'd1,
    DT_FLOAT  = 3'd2,
    DT_DOUBLE = 3'd3,
    DT_REF    = 3'd4,
    DT_ANY    = 3'd5,   // mixed operand types (e.g. array loads, shifts of long)
    DT_NONE   = 3'd6
  } dtype_e;

  // Where a P bytecode takes its value from.
  typedef enum logic [1:0] {
    PS_CONST = 2'd0,    // constant register / immediate
    PS_LV    = 2'd1,    // local variable
    PS_DFTOS = 2'd2,    // P' tag: data forwarding or top of stack
    PS_POOL  = 2'd3     // constant pool (ldc), not executable here
  } psrc_e;

  // Operation carried to the execution stage.
  typedef enum logic [4:0] {
    ALU_MOV, ALU_ADD, ALU_SUB, ALU_MUL, ALU_AND, ALU_OR, ALU_XOR,
    ALU_SHL, ALU_SHR, ALU_USHR, ALU_NEG, ALU_I2B, ALU_I2C, ALU_I2S,
    ALU_NONE
  } alu_e;

  typedef enum logic [2:0] {
    BR_NONE, BR_EQ, BR_NE, BR_LT, BR_GE, BR_GT, BR_LE, BR_ALWAYS
  } br_e;

  typedef struct packed {
    logic            valid;
    logic [7:0]      opcode;
    logic [2:0]      len;      // bytes, 1..5
    poc_e            poc;
    dtype_e          dtype;    // type pushed (P), produced (O) or stored (C)
    dtype_e          stype;    // source operand type of an O
    logic [1:0]      width;    // stack words of the value (1 or 2)
    logic [2:0]      nsrc;     // values popped by an O (C pops one)
    logic            has_res;  // O leaves a result
    psrc_e           psrc;     // P source kind
    logic [LVW-1:0]  lv_idx;   // local variable read (P) or written (C, iinc)
    logic [31:0]     imm;      // constant, branch offset or iinc increment
    alu_e            alu;      // execution-unit operation (O_E, iinc)
    br_e             br;       // branch condition (O_B)
    logic            exec_ok;  // this core's execution unit can run it
    logic [PCW-1:0]  pc;
  } dec_t;

  // Combined bytecode "N" of the folding check (Fig. 2 notation): its POC
  // type, the number of producers folded so far, their data types, and the
  // result of the operator if one was folded.
  typedef struct packed {
    poc_e                      kind;
    logic [2:0]                np;
    dtype_e [MAX_FOLD-1:0]     ptype;
    logic                      has_res;
    dtype_e                    rtype;
  } fstate_t;

  // Folded group: bytecodes bc[0 .. nbc-1] issued together in one cycle.
  // The first np of them are producers; then an optional operator and an
  // optional consumer follow.
  typedef struct packed {
    logic                      valid;
    logic [2:0]                nbc;
    logic [3:0]                nbytes;
    logic [2:0]                np;
    logic                      has_op;
    logic                      has_cons;
    dec_t [MAX_FOLD-1:0]       bc;
  } fgrp_t;

  typedef enum logic [1:0] {
    OS_NONE  = 2'd0,
    OS_STACK = 2'd1,
    OS_LV    = 2'd2,
    OS_CONST = 2'd3
  } osrc_e;

  typedef struct packed {
    osrc_e           kind;
    logic [SPW-1:0]  slot;     // stack slot (= identification number)
    logic [LVW-1:0]  lv;
    logic [31:0]     imm;
  } opnd_t;

  typedef enum logic [1:0] {
    DST_NONE  = 2'd0,
    DST_STACK = 2'd1,
    DST_LV    = 2'd2
  } dst_e;

  typedef struct packed {
    logic            valid;
    logic [PCW-1:0]  pc;        // address of the operator (branch base)
    alu_e            alu;
    br_e             br;
    opnd_t           a;
    opnd_t           b;
    dst_e            dst;
    logic [SPW-1:0]  dst_slot;  // result identification number
    logic [LVW-1:0]  dst_lv;
    logic [PCW-1:0]  target;    // branch target
    logic [SPW:0]    sp_after;  // stack depth after this group
    logic            halt;      // return: stop after this group
    logic            trap;      // needs micro-code or unsupported type
    logic [7:0]      trap_op;
    logic [2:0]      nbc;       // bytecodes in the group
    logic [2:0]      nptag;     // P' tags in the group
    logic [2:0]      npc;       // stack push/pop bytecodes (P, C; not P')
  } uop_t;

  // Event counters of the core.
  typedef struct packed {
    logic [31:0] cycles;      // cycles from start until halt
    logic [31:0] groups;      // groups executed (each issued in one cycle)
    logic [31:0] bytecodes;   // bytecodes executed, folded or not
    logic [31:0] folded;      // groups of more than one bytecode
    logic [31:0] ptags;       // P' tags executed
    logic [31:0] pc_ops;      // stack push/pop bytecodes executed (P, C)
    logic [31:0] pc_folded;   // ... of them issued within a larger group
    logic [31:0] fwd_e;       // stack/LV operands forwarded from E
    logic [31:0] fwd_c;       // ... from C
    logic [31:0] fwd_w;       // ... from W
    logic [31:0] file_reads;  // ... read from the stack or LV file
    logic [31:0] taken;       // taken branches (pipeline flushes)
  } perf_t;

  function automatic logic [1:0] dt_width(dtype_e t);
    return (t == DT_LONG || t == DT_DOUBLE) ? 2'd2 : 2'd1;
  endfunction

endpackage
