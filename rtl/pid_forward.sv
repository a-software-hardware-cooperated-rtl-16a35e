// pid_forward -- operand source selection by result identification number.
//
// One instance serves one source operand of the operation in the register
// (operand read) stage.  A stack operand carries the identification number
// (stack slot) of the value it needs; a local-variable operand carries the
// variable index.  The operand is compared with the destinations of the
// operations in the E, C and W stages; the nearest match wins (E before C
// before W, as the document prescribes for E over C), and with no match the
// value is read from the operand stack or the local-variable file.  A
// constant operand passes its immediate.  `sel` reports where the value came
// from, for the performance counters.
//
// Purely combinational.
module pid_forward
  import poc_pkg::*;
(
  input  opnd_t        o,
  input  logic [2:0]   stg_valid,            // [0]=E, [1]=C, [2]=W
  input  dst_e   [2:0] stg_dst,
  input  logic   [2:0][SPW-1:0] stg_slot,
  input  logic   [2:0][LVW-1:0] stg_lv,
  input  logic   [2:0][31:0]    stg_val,
  input  logic [31:0]  stack_val,            // stack file at o.slot
  input  logic [31:0]  lv_val,               // local variable file at o.lv
  output logic [31:0]  val,
  output logic [1:0]   sel                   // 0 E, 1 C, 2 W, 3 file/constant
);

  always_comb begin
    val = '0;
    sel = 2'd3;
    unique case (o.kind)
      OS_CONST: val = o.imm;
      OS_STACK: val = stack_val;
      OS_LV:    val = lv_val;
      default:  val = '0;
    endcase
    if (o.kind == OS_STACK || o.kind == OS_LV) begin
      for (int s = 2; s >= 0; s--) begin
        if (stg_valid[s] &&
            ((o.kind == OS_STACK && stg_dst[s] == DST_STACK && stg_slot[s] == o.slot) ||
             (o.kind == OS_LV    && stg_dst[s] == DST_LV    && stg_lv[s]   == o.lv))) begin
          val = stg_val[s];
          sel = 2'(s);
        end
      end
    end
  end

endmodule
