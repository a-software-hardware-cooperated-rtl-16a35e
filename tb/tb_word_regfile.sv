// tb_word_regfile -- random writes and reads on three read ports against an
// array model: reset clears, writes land on the clock edge, and a read of the
// word being written returns the new value in the same cycle.
module tb_word_regfile;
  localparam int DEPTH = 64, NR = 3, AW = 6;
  logic clk = 1'b0, rst_n, we;
  logic [AW-1:0] waddr;
  logic [31:0] wdata;
  logic [NR-1:0][AW-1:0] raddr;
  logic [NR-1:0][31:0] rdata;
  int checks = 0, failures = 0;
  logic [31:0] model [DEPTH];

  word_regfile #(.DEPTH(DEPTH), .NR(NR)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    rst_n = 0; we = 0; waddr = 0; wdata = 0; raddr = '0;
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < DEPTH; i++) begin
      raddr[0] = AW'(i); #1; chk("cleared", rdata[0], 0);
    end
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); waddr = AW'($urandom); wdata = $urandom;
      for (int r = 0; r < NR; r++)
        raddr[r] = ($urandom_range(0, 3) == 0) ? waddr : AW'($urandom);
      #1;
      for (int r = 0; r < NR; r++)
        chk("read", rdata[r], (we && raddr[r] == waddr) ? wdata : model[raddr[r]]);
      @(posedge clk);
      if (we) model[waddr] = wdata;
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
