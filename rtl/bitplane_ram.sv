// bitplane_ram: one-bit-per-pixel image memory organised as one word per line.
//
// A word holds a whole image line of W pixels, bit x being column x, so a
// reader gets a complete line per clock; this is what lets the edge stage
// handle a line per cycle. There is one write port with a per-bit write
// mask (the capture and the chain coder change single pixels, the edge stage
// writes whole lines) and NRD asynchronous read ports. A read of a line
// number at or beyond H returns all zeros, which gives callers a black border
// above and below the image for free (a line number of -1 wraps to a large
// value). Writes take effect at the rising clock edge; reads see the written
// data from the next cycle on. The memory is not cleared by reset.
module bitplane_ram
  import vision_pkg::*;
#(
  parameter int unsigned W   = IMG_W_DEF,
  parameter int unsigned H   = IMG_H_DEF,
  parameter int unsigned NRD = 1
) (
  input  logic           clk,
  input  logic           we,
  input  coord_t         waddr,
  input  logic [W-1:0]   wdata,
  input  logic [W-1:0]   wmask,
  input  coord_t         raddr [NRD],
  output logic [W-1:0]   rdata [NRD]
);

  localparam int unsigned AW = (H > 1) ? $clog2(H) : 1;

  logic [W-1:0] mem [H];

  always_ff @(posedge clk) begin
    if (we && (int'(waddr) < H))
      mem[AW'(waddr)] <= (mem[AW'(waddr)] & ~wmask) | (wdata & wmask);
  end

  always_comb begin
    for (int p = 0; p < NRD; p++)
      rdata[p] = (int'(raddr[p]) < H) ? mem[AW'(raddr[p])] : '0;
  end

endmodule
