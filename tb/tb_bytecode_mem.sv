// tb_bytecode_mem -- loads a random image through the write port and reads
// it back through all seven read ports at random addresses, including
// addresses that wrap past the end of the memory.
module tb_bytecode_mem;
  localparam int BYTES = 4096, NR = 7, AW = 16;
  logic clk = 1'b0, we;
  logic [AW-1:0] waddr;
  logic [7:0] wdata;
  logic [NR-1:0][AW-1:0] raddr;
  logic [NR-1:0][7:0] rdata;
  logic [7:0] model [BYTES];
  int checks = 0, failures = 0;

  bytecode_mem dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = '0;
    for (int i = 0; i < BYTES; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = 8'($urandom); model[i] = wdata;
    end
    @(negedge clk) we = 0;
    for (int n = 0; n < 2000; n++) begin
      for (int r = 0; r < NR; r++) raddr[r] = AW'($urandom);
      #1;
      for (int r = 0; r < NR; r++) chk("read", rdata[r], model[raddr[r] % BYTES]);
    end
    // overwrite one byte and read it back on every port
    @(negedge clk) we = 1; waddr = 16'd100; wdata = 8'h5a;
    @(negedge clk) we = 0;
    for (int r = 0; r < NR; r++) raddr[r] = 16'd100 + 16'(BYTES);
    #1;
    for (int r = 0; r < NR; r++) chk("rewrite", rdata[r], 8'h5a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
