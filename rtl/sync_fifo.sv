// sync_fifo: single-clock first-in first-out buffer, the storage used on every
// DMA channel (4 KB per channel: 512 words of 64 bits).
//
// The storage is a plain array written on push and read at the read pointer,
// so it maps onto a block RAM. Pointers carry one extra bit to tell full from
// empty. `level` is the number of words held and is what the DMA channels use
// to decide when to request a transfer. push and pop may happen in the same
// cycle. A push into a full FIFO or a pop from an empty one is a protocol
// error and is flagged by assertions; the data are then left unchanged.
// Interface: push/wdata, pop/rdata (first word visible without a pop), full,
// empty, level. Timing: a pushed word can be popped the next cycle.
// Follows the document: 4 KB per channel. This design's choice: 64-bit width,
// fall-through read.
module sync_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             full,
  output logic             empty,
  output logic [AW:0]      level
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wp, rp;

  wire do_push = push && !full;
  wire do_pop  = pop && !empty;

  always_ff @(posedge clk) begin
    if (do_push) mem[wp[AW-1:0]] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
    end
  end

  assign rdata = mem[rp[AW-1:0]];
  assign level = wp - rp;
  assign empty = (wp == rp);
  assign full  = (wp[AW-1:0] == rp[AW-1:0]) && (wp[AW] != rp[AW]);

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
