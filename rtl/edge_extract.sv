// edge_extract: 2x2-mask edge operator over a binary image, one line per clock.
//
// For every pixel (x, y) the operator looks at the four pixels (x, y),
// (x+1, y), (x, y+1) and (x+1, y+1). When all four are equal (all black or
// all white) the output pixel is black; in any of the mixed configurations
// the mask sits on a black/white border and the output pixel is white.
// Pixels outside the image count as black. Since the mask only looks right
// and down, an object touching the right or bottom image edge still gets a
// closed outline, while one touching the top or left edge gets no outline
// along that edge (its outline is open there).
//
// Operation: a one-cycle pulse on start begins a pass. In cycle k
// (k = 0 .. H) the unit reads source line k; from k = 1 on it combines that
// line with the previous one (held in a register) and writes edge line k-1
// to the destination memory. A pass therefore takes H+1 cycles, and done
// pulses in the cycle after the last write. All W columns of a line are
// computed in parallel.
//
// The 2x2 mask and the line-per-cycle rate follow the vision system this is
// built for; which of the sixteen mask patterns count as border (here: the
// fourteen mixed ones) is this design's reading of it.
module edge_extract
  import vision_pkg::*;
#(
  parameter int unsigned W = IMG_W_DEF,
  parameter int unsigned H = IMG_H_DEF
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  // source (binary image) read port
  output coord_t         src_addr,
  input  logic [W-1:0]   src_data,
  // destination (edge image) write port
  output logic           dst_we,
  output coord_t         dst_addr,
  output logic [W-1:0]   dst_data
);

  coord_t       line_q;     // line being read this cycle
  logic [W-1:0] prev_q;     // line read in the previous cycle
  logic [W-1:0] cur;

  assign src_addr = line_q;
  // line H and beyond read as black
  assign cur = (int'(line_q) < H) ? src_data : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      line_q <= '0;
      prev_q <= '0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        prev_q <= cur;
        if (int'(line_q) == H) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          line_q <= line_q + 1'b1;
        end
      end else if (start) begin
        busy   <= 1'b1;
        line_q <= '0;
      end
    end
  end

  // edge line = mask applied to (prev_q, cur); column W counts as black
  always_comb begin
    logic a, b, c, d;
    for (int x = 0; x < W; x++) begin
      a = prev_q[x];
      c = cur[x];
      b = (x + 1 < W) ? prev_q[(x + 1) % W] : 1'b0;
      d = (x + 1 < W) ? cur[(x + 1) % W]    : 1'b0;
      dst_data[x] = !((a == b) && (a == c) && (a == d));
    end
  end

  assign dst_we   = busy && (line_q != '0);
  assign dst_addr = line_q - 1'b1;

endmodule
