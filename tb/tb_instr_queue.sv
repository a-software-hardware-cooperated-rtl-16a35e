// tb_instr_queue -- drives the 7-byte instruction queue with random
// consumption and redirects over a random byte image, and checks each cycle
// against a model of the head address: the head byte and the bytes behind it
// are those of memory, the window's bytecodes are contiguous, each is marked
// valid exactly when all its bytes are inside the queue, and the queue is
// full one cycle after any consumption.
module tb_instr_queue;
  import poc_pkg::*;

  localparam int QB = 7;
  logic clk = 1'b0, rst_n, run, redirect;
  logic [3:0] consume;
  logic [PCW-1:0] redirect_pc, head_pc;
  logic [QB-1:0][PCW-1:0] mem_addr;
  logic [QB-1:0][7:0] mem_data;
  dec_t [MAX_FOLD-1:0] win;
  logic [3:0] count;
  int checks = 0, failures = 0;

  logic [7:0] mem [1024];
  for (genvar i = 0; i < QB; i++) begin : g_m
    assign mem_data[i] = mem[mem_addr[i][9:0]];
  end

  instr_queue #(.QBYTES(QB)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int pc_model, qn_model;

  initial begin
    for (int i = 0; i < 1024; i++) mem[i] = 8'($urandom);
    rst_n = 0; run = 0; redirect = 0; consume = 0; redirect_pc = 0;
    pc_model = 0; qn_model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk("empty after reset", count, 0);
    chk("no valid bytecode", win[0].valid, 0);
    run = 1; qn_model = QB;   // the next edge fills the queue
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // check the present state
      chk("head pc", head_pc, pc_model[PCW-1:0]);
      chk("count", count, qn_model);
      if (qn_model > 0) begin
        chk("head opcode", win[0].opcode, mem[pc_model % 1024]);
        chk("head pc in window", win[0].pc, pc_model[PCW-1:0]);
      end
      for (int i = 1; i < MAX_FOLD; i++) begin
        chk("contiguous", win[i].pc, win[i-1].pc + PCW'(win[i-1].len));
        if (int'(win[i].pc) - pc_model < qn_model)
          chk("window opcode", win[i].opcode, mem[win[i].pc % 1024]);
      end
      for (int i = 0; i < MAX_FOLD; i++)
        chk("valid", win[i].valid,
            (int'(win[i].pc) - pc_model + int'(win[i].len) <= qn_model) &&
            (i == 0 || win[i-1].valid));
      // next action
      redirect = ($urandom_range(0, 19) == 0);
      redirect_pc = PCW'($urandom_range(0, 900));
      consume = 4'($urandom_range(0, qn_model));
      @(posedge clk);
      if (redirect) begin
        pc_model = redirect_pc; qn_model = 0;
      end else begin
        pc_model += consume; qn_model = QB;
      end
      #1 redirect = 0; consume = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
