// rr_arbiter: round-robin arbiter for the DMA channel requests.
//
// When `advance` is high the arbiter grants one of the requesting channels,
// searching upward from the channel after the one granted last, so every
// requester is served within N grants. The grant is a one-hot vector plus its
// index and is combinational from req and the stored pointer; the pointer
// moves only when the grant is taken (advance && any request).
// Interface: req[N], advance; gnt (one-hot), gnt_idx, gnt_valid. Timing:
// combinational grant, pointer updated at the clock edge.
// Follows the document: round-robin arbitration of the channel requests. This
// design's choice: the search order and the advance handshake.
module rr_arbiter #(
  parameter int unsigned N = 5,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,
  input  logic          advance,
  output logic [N-1:0]  gnt,
  output logic [IW-1:0] gnt_idx,
  output logic          gnt_valid
);

  logic [IW-1:0] last;

  always_comb begin
    gnt       = '0;
    gnt_idx   = '0;
    gnt_valid = 1'b0;
    for (int unsigned i = 1; i <= N; i++) begin
      int unsigned c;
      c = (int'(last) + i) % N;
      if (!gnt_valid && req[c]) begin
        gnt_valid = 1'b1;
        gnt_idx   = IW'(c);
      end
    end
    if (gnt_valid) gnt[gnt_idx] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      last <= IW'(N - 1);
    else if (advance && gnt_valid)   last <= gnt_idx;
  end

endmodule
