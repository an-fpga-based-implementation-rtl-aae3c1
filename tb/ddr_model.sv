// ddr_model: behavioural stand-in for the external DDR memory and its
// controller, used only by testbenches. Word-addressed memory of 2**AW words.
// A request is accepted when mem_ready is high (mem_ready drops at random
// cycles when STALL is set); read data return in order LAT cycles after the
// request was accepted. Requests are ignored while rst_n is low. Not synthesizable on purpose: it is a model.
// Interface: clk, rst_n, mem_valid/mem_ready/mem_we/mem_addr/mem_wdata in, mem_rvalid/
// mem_rdata out, plus array mem[] read and written by the testbenches.
// Timing: LAT cycles read latency, one request per cycle when ready.
// This is this design's test model; the document names only a DDR controller.
module ddr_model #(
  parameter int unsigned AW    = 17,
  parameter int unsigned LAT   = 6,
  parameter bit          STALL = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        mem_valid,
  output logic        mem_ready,
  input  logic        mem_we,
  input  logic [23:0] mem_addr,
  input  logic [63:0] mem_wdata,
  output logic        mem_rvalid,
  output logic [63:0] mem_rdata
);
  logic [63:0] mem [2**AW];
  logic        pv [LAT];
  logic [63:0] pd [LAT];
  int unsigned accesses;

  initial begin
    for (int i = 0; i < LAT; i++) begin pv[i] = 1'b0; pd[i] = '0; end
    mem_ready = 1'b1;
    accesses = 0;
  end

  always @(posedge clk) begin
    for (int i = LAT - 1; i > 0; i--) begin pv[i] <= pv[i-1]; pd[i] <= pd[i-1]; end
    pv[0] <= 1'b0;
    if (rst_n && mem_valid && mem_ready) begin
      accesses <= accesses + 1;
      if (mem_we) mem[mem_addr[AW-1:0]] <= mem_wdata;
      else begin
        pv[0] <= 1'b1;
        pd[0] <= mem[mem_addr[AW-1:0]];
      end
    end
    mem_ready <= STALL ? ($urandom_range(0, 7) != 0) : 1'b1;
  end

  assign mem_rvalid = pv[LAT-1];
  assign mem_rdata  = pd[LAT-1];
endmodule
