// tb_pid_forward -- random operand descriptors against random contents of
// the E, C and W latches (small slot and index ranges so that matches are
// frequent), compared with a priority model: E before C before W before the
// register files; constants pass through; stack IDs never match local
// variable destinations and vice versa.
module tb_pid_forward;
  import poc_pkg::*;

  opnd_t o;
  logic [2:0] stg_valid;
  dst_e [2:0] stg_dst;
  logic [2:0][SPW-1:0] stg_slot;
  logic [2:0][LVW-1:0] stg_lv;
  logic [2:0][31:0] stg_val;
  logic [31:0] stack_val, lv_val, val;
  logic [1:0] sel;
  int checks = 0, failures = 0;
  int hits [4] = '{0, 0, 0, 0};

  pid_forward dut (.*);

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 20000; n++) begin
      logic [31:0] ev;
      int es;
      o = '0;
      o.kind = osrc_e'($urandom_range(0, 3));
      o.slot = SPW'($urandom_range(0, 3));
      o.lv   = LVW'($urandom_range(0, 3));
      o.imm  = $urandom;
      for (int s = 0; s < 3; s++) begin
        stg_valid[s] = $urandom_range(0, 1);
        stg_dst[s]   = dst_e'($urandom_range(0, 2));
        stg_slot[s]  = SPW'($urandom_range(0, 3));
        stg_lv[s]    = LVW'($urandom_range(0, 3));
        stg_val[s]   = $urandom;
      end
      stack_val = $urandom; lv_val = $urandom;
      #1;
      // model
      es = 3;
      ev = (o.kind == OS_CONST) ? o.imm : (o.kind == OS_STACK) ? stack_val :
           (o.kind == OS_LV) ? lv_val : 32'd0;
      if (o.kind == OS_STACK || o.kind == OS_LV)
        for (int s = 0; s < 3; s++)
          if (es == 3 && stg_valid[s] &&
              ((o.kind == OS_STACK && stg_dst[s] == DST_STACK && stg_slot[s] == o.slot) ||
               (o.kind == OS_LV && stg_dst[s] == DST_LV && stg_lv[s] == o.lv))) begin
            es = s; ev = stg_val[s];
          end
      chk("value", val, ev);
      chk("source", sel, es);
      hits[es]++;
    end
    chk("E hits", hits[0] > 0, 1);
    chk("C hits", hits[1] > 0, 1);
    chk("W hits", hits[2] > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
