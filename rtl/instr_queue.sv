// instr_queue -- byte-wide instruction queue with bytecode boundary decode.
//
// Holds QBYTES bytes of the bytecode stream (7 in the configuration the
// document evaluates).  Every cycle the decode stage removes `consume` bytes
// from the head, and the queue is refilled to full from the bytecode memory
// through QBYTES read ports (ideal instruction supply, as assumed by a
// trace-driven evaluation; the refill width is this design's choice).  A
// redirect empties the queue and restarts fetching at redirect_pc; fetching
// only starts once `run` is high.
//
// The head of the queue is split into up to MAX_FOLD consecutive bytecodes,
// each classified by a poc_classifier; a bytecode is valid only if all its
// bytes are in the queue, so the folding window never looks past the queue.
//
// Timing: the queue is registered; win and head_pc are combinational from it.
module instr_queue
  import poc_pkg::*;
#(
  parameter int QBYTES = 7
)(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        run,
  input  logic [3:0]                  consume,      // bytes taken by decode
  input  logic                        redirect,
  input  logic [PCW-1:0]              redirect_pc,
  output logic [QBYTES-1:0][PCW-1:0]  mem_addr,     // refill read ports
  input  logic [QBYTES-1:0][7:0]      mem_data,
  output dec_t [MAX_FOLD-1:0]         win,
  output logic [PCW-1:0]              head_pc,
  output logic [3:0]                  count
);

  logic [QBYTES-1:0][7:0] q;
  logic [3:0]             qn;
  logic [PCW-1:0]         hpc;

  assign head_pc = hpc;
  assign count   = qn;

  // ---- refill -------------------------------------------------------------
  logic [3:0]             keep;      // bytes left after consumption
  logic [QBYTES-1:0][7:0] q_nxt;

  assign keep = qn - consume;

  for (genvar i = 0; i < QBYTES; i++) begin : g_addr
    assign mem_addr[i] = hpc + PCW'(qn) + PCW'(i);
  end

  always_comb begin
    q_nxt = '0;
    for (int i = 0; i < QBYTES; i++) begin
      if (i < int'(keep))
        q_nxt[i] = q[i + int'(consume) < QBYTES ? i + int'(consume) : QBYTES-1];
      else
        q_nxt[i] = mem_data[i - int'(keep) >= 0 ? i - int'(keep) : 0];
    end
  end
  // Refill byte j comes from address hpc+qn+j and lands at position keep+j,
  // which is the address hpc+consume+keep+j of the new head: the same byte.

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q   <= '0;
      qn  <= '0;
      hpc <= '0;
    end else if (redirect) begin
      q   <= '0;
      qn  <= '0;
      hpc <= redirect_pc;
    end else if (run) begin
      q   <= q_nxt;
      qn  <= 4'(QBYTES);
      hpc <= hpc + PCW'(consume);
    end
  end

  // ---- bytecode boundaries and classification -----------------------------
  logic [MAX_FOLD:0][5:0] pos;
  logic [MAX_FOLD:0]      vld;       // bytecodes 0..i-1 all complete
  dec_t [MAX_FOLD-1:0]    d;

  function automatic logic [7:0] qbyte(logic [QBYTES-1:0][7:0] qq, int p);
    return (p < QBYTES) ? qq[p < QBYTES ? p : 0] : 8'h00;
  endfunction

  assign pos[0] = 6'd0;
  assign vld[0] = 1'b1;
  for (genvar i = 0; i < MAX_FOLD; i++) begin : g_win
    logic [7:0] op, b1, b2, b3, b4;
    assign op = qbyte(q, int'(pos[i]));
    assign b1 = qbyte(q, int'(pos[i]) + 1);
    assign b2 = qbyte(q, int'(pos[i]) + 2);
    assign b3 = qbyte(q, int'(pos[i]) + 3);
    assign b4 = qbyte(q, int'(pos[i]) + 4);
    poc_classifier u_cls (
      .op (op), .b1 (b1), .b2 (b2), .b3 (b3), .b4 (b4),
      .pc (hpc + PCW'(pos[i])),
      .valid (1'b1),
      .d  (d[i])
    );
    assign pos[i+1] = pos[i] + 6'(d[i].len);
    assign vld[i+1] = vld[i] && (32'(pos[i]) + 32'(d[i].len) <= 32'(qn));
    always_comb begin
      win[i]       = d[i];
      win[i].valid = vld[i+1];
    end
  end

endmodule
