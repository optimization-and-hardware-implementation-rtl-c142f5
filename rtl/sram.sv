// sram: single-port synchronous RAM holding the frame data of the embedders.
//
// One access per clock cycle: with we high, wdata is written at addr; otherwise addr is read
// and the word appears on rdata after the clock edge (one-cycle registered read). The embedders
// keep the cover image x, the watermark w and the masked watermark u (later the watermarked
// image y) in such memories. The document only asks that one read or write fit in one system
// clock cycle and that all transactions be registered; the single port, the read latency of one
// cycle and the word width are this design's choices. The array is written as plain RTL memory.
module sram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 20,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
