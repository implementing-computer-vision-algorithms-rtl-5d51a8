// chain_coder: chain-code segmentation of an edge image into object records.
//
// The unit scans the edge image in raster order, one pixel per clock. When it
// meets a set pixel it starts a chain there and follows the outline: in every
// clock it looks at the eight neighbours of the current pixel (three image
// lines are read at once), moves to one that is set, and emits the Freeman
// direction of that step (0 = east, counting anticlockwise to 7 = south-east,
// image lines growing downwards). Each pixel taken into a chain is erased
// from the image, so an outline is followed once and the scan never starts
// on it again. Straight neighbours are preferred over diagonal ones (order
// E, S, W, N, SE, SW, NW, NE), which keeps a two-pixel-thick stair step from
// leaving stray pixels behind. The chain ends when no neighbour is left; it
// is then closed with a straight segment back to its first pixel.
//
// While following, the unit accumulates for the closed polygon through the
// chain pixels: twice its signed area by summing the area each vector sweeps
// against the image origin, and the first moments of area the same way. The
// area centre is moment / (3 * twice-area), computed by two sequential
// dividers and rounded to the nearest pixel; an outline that encloses no
// area (a line or a dot) uses the centre of its enclosing rectangle instead.
// The perimeter is the sum of the vector lengths (1 for a straight step, the
// square root of two, as 362/256, for a diagonal one) and the shape factor
// is area / perimeter. The record put out per object holds the centre line,
// centre column and the number of pixels in the chain (saturating at 14 bits).
//
// Interface: start (pulse) begins a pass over the image in the edge memory;
// done pulses at the end. rd_addr/rd_data are three read ports of that
// memory, we/waddr/wmask a write port used to erase: the masked bits are to
// be written with zeros.
// code_valid/code/code_first stream the chain; obj_valid is a one-cycle
// strobe with obj_rec and obj_stats.
//
// Timing: done rises W*H clocks after the clock edge that takes start (one
// clock per pixel) plus, for every object, L + 21 clocks where L is its
// number of chain steps (L + 1 follow clocks, one to close the outline, one
// to start the dividers, 17 while they work, one to put out the record).
//
// The raster scan at a pixel per clock, chain following, the area by
// integration against a reference line, centroid, perimeter, shape factor
// and the record layout follow the vision system this unit is built for.
// The neighbour order, erasing followed pixels, the closing segment, the
// rounding and the fall-back centre are this design's own choices.
module chain_coder
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
  // edge image memory
  output coord_t         rd_addr [3],
  input  logic [W-1:0]   rd_data [3],
  output logic           we,
  output coord_t         waddr,
  output logic [W-1:0]   wmask,
  // chain code stream
  output logic           code_valid,
  output freeman_t       code,
  output logic           code_first,
  // object results
  output logic           obj_valid,
  output obj_rec_t       obj_rec,
  output obj_stats_t     obj_stats
);

  typedef enum logic [2:0] {
    S_IDLE, S_SCAN, S_FOLLOW, S_CLOSE, S_DIV, S_WAIT, S_EMIT
  } state_t;

  localparam int unsigned QW_C  = COORD_W;  // centre quotient bits
  localparam int unsigned QW_S  = 16;       // shape factor quotient bits
  localparam int unsigned SQRT2_Q8 = 362;   // round(256 * sqrt(2))

  state_t state_q;

  coord_t sx_q, sy_q;        // scan position (also first pixel of a chain)
  coord_t cx_q, cy_q;        // current chain pixel

  logic signed [31:0] s2_q;          // twice the signed area
  logic signed [39:0] mx_q, my_q;    // six times the first moments of area
  logic [17:0]        n_even_q, n_odd_q;   // straight and diagonal steps
  logic [SIZE_W-1:0]  n_pix_q;       // chain pixels, saturating
  logic [17:0]        n_step_q;      // chain steps (for code_first)
  coord_t             xmin_q, xmax_q, ymin_q, ymax_q;

  logic [20:0]        a2_q;          // |twice the area| of the closed chain
  logic               flat_q;        // the chain encloses no area

  assign a2_q   = 21'(s2_q[31] ? -s2_q : s2_q);
  assign flat_q = (s2_q == '0);

  // ------------------------------------------------------------------
  // read addresses: line above / current line / line below
  // ------------------------------------------------------------------
  always_comb begin
    rd_addr[0] = (state_q == S_FOLLOW) ? cy_q - 1'b1 : sy_q;
    rd_addr[1] = cy_q;
    rd_addr[2] = cy_q + 1'b1;
  end

  function automatic logic pix_at(logic [W-1:0] row, int x);
    if (x < 0 || x >= W) return 1'b0;
    return row[x];
  endfunction

  // neighbour mask around the current pixel, index = Freeman direction
  logic [7:0] nb;
  always_comb begin
    int x;
    x = int'(cx_q);
    nb[DIR_E]  = pix_at(rd_data[1], x + 1);
    nb[DIR_NE] = pix_at(rd_data[0], x + 1);
    nb[DIR_N]  = pix_at(rd_data[0], x);
    nb[DIR_NW] = pix_at(rd_data[0], x - 1);
    nb[DIR_W]  = pix_at(rd_data[1], x - 1);
    nb[DIR_SW] = pix_at(rd_data[2], x - 1);
    nb[DIR_S]  = pix_at(rd_data[2], x);
    nb[DIR_SE] = pix_at(rd_data[2], x + 1);
  end

  // choose the next step: straight neighbours first
  logic     step_ok;
  freeman_t step_dir;
  always_comb begin
    step_ok  = 1'b1;
    step_dir = DIR_E;
    if      (nb[DIR_E])  step_dir = DIR_E;
    else if (nb[DIR_S])  step_dir = DIR_S;
    else if (nb[DIR_W])  step_dir = DIR_W;
    else if (nb[DIR_N])  step_dir = DIR_N;
    else if (nb[DIR_SE]) step_dir = DIR_SE;
    else if (nb[DIR_SW]) step_dir = DIR_SW;
    else if (nb[DIR_NW]) step_dir = DIR_NW;
    else if (nb[DIR_NE]) step_dir = DIR_NE;
    else                 step_ok  = 1'b0;
  end

  // position of the pixel stepped to, and the step's area and moment terms
  coord_t nx, ny;
  logic signed [31:0] t_c, t_mx, t_my;
  always_comb begin
    int x, y, dx, dy;
    x  = int'(cx_q);
    y  = int'(cy_q);
    dx = dir_dx(step_dir);
    dy = dir_dy(step_dir);
    nx = coord_t'(x + dx);
    ny = coord_t'(y + dy);
    t_c  = x * dy - y * dx;          // cross product of (x,y) and (x+dx,y+dy)
    t_mx = (2 * x + dx) * t_c;
    t_my = (2 * y + dy) * t_c;
  end

  // closing segment from the last pixel back to the first one
  logic signed [31:0] cl_c, cl_mx, cl_my;
  logic cl_link, cl_diag;
  always_comb begin
    int xl, yl, xs, ys, adx, ady;
    xl = int'(cx_q); yl = int'(cy_q);
    xs = int'(sx_q); ys = int'(sy_q);
    cl_c  = xl * ys - xs * yl;
    cl_mx = (xl + xs) * cl_c;
    cl_my = (yl + ys) * cl_c;
    adx = (xl > xs) ? xl - xs : xs - xl;
    ady = (yl > ys) ? yl - ys : ys - yl;
    cl_link = (adx <= 1) && (ady <= 1) && (adx + ady != 0);
    cl_diag = (adx == 1) && (ady == 1);
  end

  // next raster position after (sx, sy)
  logic   scan_last;
  coord_t scan_nx, scan_ny;
  always_comb begin
    scan_last = (int'(sx_q) == W - 1) && (int'(sy_q) == H - 1);
    if (int'(sx_q) == W - 1) begin
      scan_nx = '0;
      scan_ny = sy_q + 1'b1;
    end else begin
      scan_nx = sx_q + 1'b1;
      scan_ny = sy_q;
    end
  end

  logic scan_hit;
  assign scan_hit = pix_at(rd_data[0], int'(sx_q));

  // ------------------------------------------------------------------
  // dividers
  // ------------------------------------------------------------------
  logic        div_start;
  logic        dcx_busy, dcy_busy, dsf_busy;
  logic [QW_C-1:0] qcx, qcy;
  logic [QW_S-1:0] qsf;
  logic [39:0] num_cx, num_cy, num_sf;
  logic [23:0] den_c;
  logic [25:0] den_sf;

  always_comb begin
    logic signed [39:0] mx_abs, my_abs;
    mx_abs = s2_q[31] ? -mx_q : mx_q;
    my_abs = s2_q[31] ? -my_q : my_q;
    den_c  = 24'(3 * a2_q);
    num_cx = mx_abs[39] ? '0 : (40'(mx_abs) + 40'(den_c >> 1));
    num_cy = my_abs[39] ? '0 : (40'(my_abs) + 40'(den_c >> 1));
    num_sf = 40'(a2_q) << 15;
    den_sf = 26'(n_even_q) * 26'd256 + 26'(n_odd_q) * 26'(SQRT2_Q8);
  end

  seq_divider #(.NW(40), .DW(24), .QW(QW_C)) u_div_cx (
    .clk, .rst_n, .start(div_start), .num(num_cx), .den(den_c),
    .busy(dcx_busy), .quo(qcx));
  seq_divider #(.NW(40), .DW(24), .QW(QW_C)) u_div_cy (
    .clk, .rst_n, .start(div_start), .num(num_cy), .den(den_c),
    .busy(dcy_busy), .quo(qcy));
  seq_divider #(.NW(40), .DW(26), .QW(QW_S)) u_div_sf (
    .clk, .rst_n, .start(div_start), .num(num_sf), .den(den_sf),
    .busy(dsf_busy), .quo(qsf));

  assign div_start = (state_q == S_DIV);

  // centre: quotient clamped to the image, or rectangle centre when flat
  coord_t cen_x, cen_y;
  always_comb begin
    if (flat_q) begin
      cen_x = coord_t'((int'(xmin_q) + int'(xmax_q)) / 2);
      cen_y = coord_t'((int'(ymin_q) + int'(ymax_q)) / 2);
    end else begin
      cen_x = (int'(qcx) > W - 1) ? coord_t'(W - 1) : coord_t'(qcx);
      cen_y = (int'(qcy) > H - 1) ? coord_t'(H - 1) : coord_t'(qcy);
    end
  end

  // ------------------------------------------------------------------
  // outputs
  // ------------------------------------------------------------------
  always_comb begin
    we    = 1'b0;
    waddr = sy_q;
    wmask = '0;
    if (state_q == S_SCAN && scan_hit) begin
      we    = 1'b1;
      waddr = sy_q;
      wmask = W'(1) << sx_q;
    end else if (state_q == S_FOLLOW && step_ok) begin
      we    = 1'b1;
      waddr = ny;
      wmask = W'(1) << nx;
    end
  end

  assign code_valid = (state_q == S_FOLLOW) && step_ok;
  assign code       = step_dir;
  assign code_first = (n_step_q == '0);

  assign obj_valid         = (state_q == S_EMIT);
  assign obj_rec.line      = cen_y;
  assign obj_rec.column    = cen_x;
  assign obj_rec.size      = n_pix_q;
  assign obj_stats.area    = 18'(a2_q >> 1);
  assign obj_stats.perim_q8 = 24'(den_sf);
  assign obj_stats.shape_q8 = qsf;
  assign obj_stats.x_min   = xmin_q;
  assign obj_stats.x_max   = xmax_q;
  assign obj_stats.y_min   = ymin_q;
  assign obj_stats.y_max   = ymax_q;
  assign obj_stats.flat    = flat_q;

  assign busy = (state_q != S_IDLE);

  // ------------------------------------------------------------------
  // control
  // ------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      done     <= 1'b0;
      sx_q     <= '0;  sy_q <= '0;
      cx_q     <= '0;  cy_q <= '0;
      s2_q     <= '0;  mx_q <= '0;  my_q <= '0;
      n_even_q <= '0;  n_odd_q <= '0;
      n_pix_q  <= '0;  n_step_q <= '0;
      xmin_q   <= '0;  xmax_q <= '0;  ymin_q <= '0;  ymax_q <= '0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (start) begin
            state_q <= S_SCAN;
            sx_q    <= '0;
            sy_q    <= '0;
          end
        end

        S_SCAN: begin
          if (scan_hit) begin
            state_q  <= S_FOLLOW;
            cx_q     <= sx_q;  cy_q <= sy_q;
            s2_q     <= '0;  mx_q <= '0;  my_q <= '0;
            n_even_q <= '0;  n_odd_q <= '0;
            n_pix_q  <= SIZE_W'(1);
            n_step_q <= '0;
            xmin_q   <= sx_q; xmax_q <= sx_q;
            ymin_q   <= sy_q; ymax_q <= sy_q;
          end else if (scan_last) begin
            state_q <= S_IDLE;
            done    <= 1'b1;
          end else begin
            sx_q <= scan_nx;
            sy_q <= scan_ny;
          end
        end

        S_FOLLOW: begin
          if (step_ok) begin
            cx_q <= nx;
            cy_q <= ny;
            s2_q <= s2_q + 32'(t_c);
            mx_q <= mx_q + 40'(signed'(t_mx));
            my_q <= my_q + 40'(signed'(t_my));
            if (step_dir[0]) n_odd_q <= n_odd_q + 1'b1;
            else             n_even_q <= n_even_q + 1'b1;
            if (n_pix_q != '1) n_pix_q <= n_pix_q + 1'b1;
            n_step_q <= n_step_q + 1'b1;
            if (nx < xmin_q) xmin_q <= nx;
            if (nx > xmax_q) xmax_q <= nx;
            if (ny < ymin_q) ymin_q <= ny;
            if (ny > ymax_q) ymax_q <= ny;
          end else begin
            state_q <= S_CLOSE;
          end
        end

        S_CLOSE: begin
          s2_q <= s2_q + 32'(cl_c);
          mx_q <= mx_q + 40'(signed'(cl_mx));
          my_q <= my_q + 40'(signed'(cl_my));
          if (cl_link) begin
            if (cl_diag) n_odd_q <= n_odd_q + 1'b1;
            else         n_even_q <= n_even_q + 1'b1;
          end
          state_q <= S_DIV;
        end

        S_DIV: begin
          // dividers are started from the sums in this cycle (div_start)
          state_q <= S_WAIT;
        end

        S_WAIT: begin
          if (!dcx_busy && !dcy_busy && !dsf_busy) state_q <= S_EMIT;
        end

        S_EMIT: begin
          if (scan_last) begin
            state_q <= S_IDLE;
            done    <= 1'b1;
          end else begin
            state_q <= S_SCAN;
            sx_q    <= scan_nx;
            sy_q    <= scan_ny;
          end
        end

        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
