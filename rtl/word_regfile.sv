// word_regfile -- 32-bit register file used for the operand stack and for
// the local variables.
//
// DEPTH words, NR asynchronous read ports and one write port that takes
// effect on the clock edge.  A read of the word being written in the same
// cycle returns the new value (write-through), so the write-back stage and
// the operand-read stage can work in the same cycle without a stall.  Reset
// clears every word.  The document gives no sizes for these structures;
// the operand stack uses the 64 entries of the stack cache of the processor
// whose pipeline it follows, and the local variables cover the 256 indices a
// one-byte operand can name.
module word_regfile #(
  parameter int DEPTH = 64,
  parameter int NR    = 2,
  parameter int AW    = $clog2(DEPTH)
)(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  we,
  input  logic [AW-1:0]         waddr,
  input  logic [31:0]           wdata,
  input  logic [NR-1:0][AW-1:0] raddr,
  output logic [NR-1:0][31:0]   rdata
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  for (genvar r = 0; r < NR; r++) begin : g_rd
    assign rdata[r] = (we && waddr == raddr[r]) ? wdata : mem[raddr[r]];
  end

endmodule
