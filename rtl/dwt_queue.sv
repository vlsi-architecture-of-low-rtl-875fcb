// dwt_queue: first-in first-out queue for temporary coefficient storage.
//
// A circular buffer of DEPTH words with a write and a read pointer. The word
// at the head is always visible on `dout`; `pop` advances past it. Push and
// pop may happen in the same cycle (the popped word is the old head, the
// pushed word goes to the tail), which is how the row processors use it:
// each IRSA step pops the high-pass coefficient its row produced one column
// pass earlier and pushes the one produced now. With two row processors of
// N/2 rows each the design's total storage is N words.
//
// Interface: synchronous push/pop, `clear` empties the queue. `count`, `full`
// and `empty` report the fill level. Pushing into a full queue (without a
// pop) or popping an empty one is an error and is flagged by assertions.
// The queue and its role follow the document; its FIFO organisation and
// the asynchronous head read are this design's choice.
module dwt_queue
  import dwt_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       push,
  input  coef_t                      din,
  input  logic                       pop,
  output coef_t                      dout,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       full,
  output logic                       empty
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  coef_t          mem [DEPTH];
  logic [AW-1:0]  wr_ptr, rd_ptr;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign empty = (count == '0);
  assign dout  = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else if (clear) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      if (push && !pop)      count <= count + 1'b1;
      else if (pop && !push) count <= count - 1'b1;
    end
  end

  // A write into a full queue needs a simultaneous pop; a read needs data.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n || clear)
                                  push && !pop |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n || clear)
                                   pop |-> !empty);

endmodule
