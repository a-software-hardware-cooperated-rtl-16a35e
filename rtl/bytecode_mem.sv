// bytecode_mem -- byte-addressed memory holding the (rescheduled) bytecode
// image that the core executes.
//
// BYTES bytes, NR asynchronous read ports (one per instruction-queue byte)
// and one byte write port used to load the image before the core runs.
// Addresses wrap at the memory size.  The size is this design's choice; the
// document keeps the rescheduled class image in ordinary memory.
module bytecode_mem #(
  parameter int BYTES = 4096,
  parameter int NR    = 7,
  parameter int AW    = 16
)(
  input  logic                  clk,
  input  logic                  we,
  input  logic [AW-1:0]         waddr,
  input  logic [7:0]            wdata,
  input  logic [NR-1:0][AW-1:0] raddr,
  output logic [NR-1:0][7:0]    rdata
);

  localparam int IW = $clog2(BYTES);

  logic [7:0] mem [BYTES];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[IW-1:0]] <= wdata;
  end

  for (genvar r = 0; r < NR; r++) begin : g_rd
    assign rdata[r] = mem[raddr[r][IW-1:0]];
  end

endmodule
