// vision_system_tb: end-to-end run of the whole pipeline at its default size
// (320 x 240 pixels, 64-entry object table, 100 MHz clock, 115200 baud).
//
// Frame 1 holds four filled squares and one disc in the detected colour on a
// noisy background of other colours; one square touches the image corner.
// A filled square's outline is a rectangle one pixel larger up and left, so
// its record is known exactly: centre, chain size (ring pixels) and area
// (the square's pixel count); the corner square's outline is open along
// the image edges and is checked as the triangle it closes into. The disc must come out within a pixel of its
// centre. A frame started during segmentation must be dropped. The table is
// then sent over the serial line and decoded.
// Frame 2 is first cut short and restarted, then holds 70 small squares, so
// the 64-entry table overflows: the first 64 records are kept.
// Checked as well: one pixel per clock of capture, H+1 clocks of edge
// extraction, and W*H + sum(L + 21) clocks of chain coding.
// Every mechanism (colour accept and reject, edge pass, chain following,
// object records, frame drop, capture restart, table overflow, serial
// transfer) is counted and must occur.
module vision_system_tb;
  import vision_pkg::*;
  localparam int unsigned W = IMG_W_DEF, H = IMG_H_DEF, MAX_OBJ = 64;
  localparam int unsigned DIV = 100_000_000 / 115_200;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  logic        pix_valid, pix_sof;
  rgb565_t     pix_rgb;
  thr_cfg_t    thr_cfg;
  phase_t      phase;
  logic        frame_done;
  logic [15:0] frames_dropped;
  logic [$clog2(MAX_OBJ+1)-1:0] obj_count;
  logic        obj_overflow;
  logic [$clog2(MAX_OBJ)-1:0] obj_rd_addr;
  obj_rec_t    obj_rd_data, obj_rec;
  logic        obj_valid, code_valid, code_first;
  obj_stats_t  obj_stats;
  freeman_t    code;
  logic        uart_send, uart_txd, uart_busy;

  vision_system dut (
    .clk, .rst_n, .pix_valid, .pix_sof, .pix_rgb, .thr_cfg,
    .phase, .frame_done, .frames_dropped,
    .obj_count, .obj_overflow, .obj_rd_addr, .obj_rd_data,
    .obj_valid, .obj_rec, .obj_stats, .code_valid, .code, .code_first,
    .uart_send, .uart_txd, .uart_busy);

  int checks = 0, failures = 0;
  longint cycle = 0, frame_clocks;
  always @(posedge clk) cycle++;
  // fixed clocks outside the stages proper: the registered start and done
  // pulses between stages plus the bench's own sampling of the first pixel
  // and of frame_done
  localparam int HANDOVER = 7;

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---------------- scene description ----------------
  typedef struct { int x0, y0, x1, y1; } sq_t;
  sq_t squares[$];
  int  disc_x, disc_y, disc_r;
  bit  with_disc;

  function automatic bit in_object(int x, int y);
    foreach (squares[i])
      if (x >= squares[i].x0 && x <= squares[i].x1 && y >= squares[i].y0 && y <= squares[i].y1)
        return 1;
    if (with_disc && (x - disc_x) * (x - disc_x) + (y - disc_y) * (y - disc_y) <= disc_r * disc_r)
      return 1;
    return 0;
  endfunction

  // object colour: red, inside the ranges; background: random other colours
  int n_obj_px, n_bg_px;
  function automatic rgb565_t colour(bit obj);
    rgb565_t c;
    if (obj) begin
      c.r = 5'($urandom_range(26, 31));
      c.g = 6'($urandom_range(0, 20));
      c.b = 5'($urandom_range(0, 10));
    end else begin
      c.r = 5'($urandom_range(0, 31));
      c.g = 6'($urandom_range(24, 63));   // green out of range
      c.b = 5'($urandom_range(0, 31));
    end
    return c;
  endfunction

  // ---------------- mechanism counters ----------------
  int n_accept = 0, n_reject = 0, n_edge_cycles = 0, n_chain_cycles = 0;
  int n_codes = 0, n_chains = 0, n_objs = 0, n_capture_restart = 0;
  int capture_cycles = 0;
  longint sum_steps = 0;
  obj_rec_t   recs[$];
  obj_stats_t stats[$];
  always @(posedge clk) if (rst_n) begin
    if (pix_valid && (phase == PH_CAPTURE || pix_sof && phase == PH_IDLE)) begin
      if (dut.pix_hit) n_accept++; else n_reject++;
    end
    if (pix_valid && pix_sof && phase == PH_CAPTURE) n_capture_restart++;
    if (phase == PH_CAPTURE) capture_cycles++;
    if (dut.u_edge.busy) n_edge_cycles++;
    if (dut.u_chain.busy) n_chain_cycles++;
    if (code_valid) begin
      n_codes++;
      if (code_first) n_chains++;
    end
    if (obj_valid) begin
      n_objs++;
      sum_steps += int'(obj_rec.size) - 1;
      recs.push_back(obj_rec);
      stats.push_back(obj_stats);
    end
  end

  // ---------------- pixel source ----------------
  // sends a frame at one pixel per clock; stops early after 'cut' pixels
  task automatic send_frame(int cut = -1);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        if (cut >= 0 && y * W + x == cut) begin
          @(negedge clk); pix_valid = 0; pix_sof = 0;
          return;
        end
        @(negedge clk);
        pix_valid = 1;
        pix_sof   = (x == 0 && y == 0);
        pix_rgb   = colour(in_object(x, y));
      end
    @(negedge clk); pix_valid = 0; pix_sof = 0;
  endtask

  task automatic wait_frame();
    while (!frame_done) @(posedge clk);
    @(posedge clk); #1;
  endtask

  // expected record of a filled square: its outline spans x0-1..x1, y0-1..y1
  task automatic check_square(string name, obj_rec_t r, obj_stats_t s, sq_t q);
    int ox0, oy0, w, h;
    ox0 = (q.x0 > 0) ? q.x0 - 1 : 0;   // outline clipped by the image edge
    oy0 = (q.y0 > 0) ? q.y0 - 1 : 0;
    w = q.x1 - ox0 + 1;
    h = q.y1 - oy0 + 1;
    // centre of the outline rectangle, halves rounded up
    expect_eq({name, " column"}, r.column, (ox0 + q.x1 + 1) / 2);
    expect_eq({name, " line"},   r.line,   (oy0 + q.y1 + 1) / 2);
    expect_eq({name, " size"},   r.size,   2 * (w + h) - 4);
    expect_eq({name, " area"},   s.area,   (w - 1) * (h - 1));
  endtask

  // ---------------- serial receiver ----------------
  byte unsigned rx[$];
  initial begin
    forever begin
      logic [9:0] bits;
      @(negedge uart_txd);
      for (int k = 1; k < 10 * DIV; k++) begin
        @(negedge clk);
        if (k % DIV == DIV / 2) bits[k / DIV] = uart_txd;
      end
      rx.push_back(bits[8:1]);
    end
  end

  initial begin
    repeat (2_500_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    rst_n = 0; pix_valid = 0; pix_sof = 0; pix_rgb = '0; uart_send = 0; obj_rd_addr = '0;
    thr_cfg = '{r_lo: 24, r_hi: 31, g_lo: 0, g_hi: 20, b_lo: 0, b_hi: 10};
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // ================= frame 1 =================
    squares.delete();
    squares.push_back('{x0: 0,   y0: 0,   x1: 9,   y1: 7});    // touches the corner
    squares.push_back('{x0: 40,  y0: 20,  x1: 79,  y1: 49});
    squares.push_back('{x0: 200, y0: 30,  x1: 215, y1: 45});
    squares.push_back('{x0: 100, y0: 150, x1: 130, y1: 200});
    with_disc = 1; disc_x = 260; disc_y = 120; disc_r = 25;
    recs.delete(); stats.delete(); n_objs = 0; sum_steps = 0; n_chain_cycles = 0;
    n_edge_cycles = 0; capture_cycles = 0;
    t0 = cycle;
    send_frame();
    expect_eq("capture: one pixel per clock", capture_cycles, W * H - 1);
    // a new frame starts during segmentation: dropped
    while (phase != PH_CHAIN) @(posedge clk);
    @(negedge clk); pix_valid = 1; pix_sof = 1; pix_rgb = '0;
    @(negedge clk); pix_valid = 0; pix_sof = 0;
    wait_frame();
    // whole frame at 100 MHz: 1.536 ms of stages plus the per-object cost
    frame_clocks = cycle - t0;
    $display("frame 1: %0d clocks = %0d us at 100 MHz (%0d objects, %0d chain steps)",
             frame_clocks, frame_clocks / 100, n_objs, sum_steps);
    expect_eq("frame 1 total clocks", frame_clocks,
              2 * W * H + (H + 1) + sum_steps + 21 * n_objs + HANDOVER);
    checks++;
    if (frame_clocks > 155_000) begin failures++; $display("FAIL frame slower than 1.55 ms"); end
    expect_eq("frame 1 edge cycles", n_edge_cycles, H + 1);
    expect_eq("frame 1 chain cycles", n_chain_cycles, W * H + sum_steps + 21 * n_objs);
    expect_eq("frame 1 objects", n_objs, 5);
    expect_eq("frame 1 table count", obj_count, 5);
    expect_eq("frame 1 no overflow", obj_overflow, 0);
    expect_eq("dropped frame", frames_dropped, 1);
    if (recs.size() == 5) begin
      // raster order of the outlines' top-left pixels
      // the corner square has no outline along the top and left image
      // edges: its chain is the L of column x1 and line y1, closed into the
      // triangle (x1,0), (x1,y1), (0,y1)
      expect_eq("corner column", recs[0].column, (2 * 9 + 1) / 3);
      expect_eq("corner line",   recs[0].line,   (2 * 7 + 1) / 3);
      expect_eq("corner size",   recs[0].size,   (9 + 1) + (7 + 1) - 1);
      expect_eq("corner area",   stats[0].area,  9 * 7 / 2);
      check_square("square 2", recs[1], stats[1], squares[1]);
      check_square("square 3", recs[2], stats[2], squares[2]);
      // the disc outline starts at line 94, before square 4 (line 149)
      checks++;
      if (recs[3].column < 258 || recs[3].column > 261 || recs[3].line < 118 || recs[3].line > 121) begin
        failures++;
        $display("FAIL disc centre %0d,%0d", recs[3].column, recs[3].line);
      end
      check_square("square 4", recs[4], stats[4], squares[3]);
      // the table holds the same records
      for (int i = 0; i < 5; i++) begin
        obj_rd_addr = 6'(i); #1;
        expect_eq("table entry", obj_rd_data, recs[i]);
      end
    end
    // serial transfer of the table
    rx.delete();
    @(negedge clk); uart_send = 1;
    @(negedge clk); uart_send = 0;
    while (uart_busy) @(posedge clk);
    repeat (2 * DIV) @(posedge clk);
    expect_eq("serial bytes", rx.size(), 1 + 4 * 5);
    if (rx.size() == 21 && recs.size() == 5) begin
      expect_eq("serial count", rx[0], 5);
      for (int i = 0; i < 5; i++)
        expect_eq("serial record", {rx[1 + 4 * i], rx[2 + 4 * i], rx[3 + 4 * i], rx[4 + 4 * i]}, recs[i]);
    end

    // ================= frame 2 =================
    squares.delete();
    with_disc = 0;
    for (int i = 0; i < 70; i++) begin
      int gx, gy;
      gx = 4 + (i % 14) * 22;
      gy = 4 + (i / 14) * 40;
      squares.push_back('{x0: gx, y0: gy, x1: gx + 3, y1: gy + 2});
    end
    recs.delete(); stats.delete(); n_objs = 0; sum_steps = 0; n_chain_cycles = 0;
    n_edge_cycles = 0;
    send_frame(1000);           // cut short, then restarted
    send_frame();
    wait_frame();
    expect_eq("capture restarted", n_capture_restart, 1);
    expect_eq("frame 2 objects found", n_objs, 70);
    expect_eq("frame 2 table count", obj_count, MAX_OBJ);
    expect_eq("frame 2 overflow", obj_overflow, 1);
    expect_eq("frame 2 edge cycles", n_edge_cycles, H + 1);
    expect_eq("frame 2 chain cycles", n_chain_cycles, W * H + sum_steps + 21 * n_objs);
    if (recs.size() == 70) begin
      for (int i = 0; i < 70; i++) check_square("small square", recs[i], stats[i], squares[i]);
      for (int i = 0; i < MAX_OBJ; i++) begin
        obj_rd_addr = 6'(i); #1;
        expect_eq("table entry 2", obj_rd_data, recs[i]);
      end
    end

    // ================= mechanisms =================
    $display("accepted=%0d rejected=%0d codes=%0d chains=%0d restarts=%0d dropped=%0d",
             n_accept, n_reject, n_codes, n_chains, n_capture_restart, frames_dropped);
    checks++; if (n_accept == 0) begin failures++; $display("FAIL no pixel accepted"); end
    checks++; if (n_reject == 0) begin failures++; $display("FAIL no pixel rejected"); end
    checks++; if (n_codes == 0) begin failures++; $display("FAIL no chain step"); end
    checks++; if (n_chains != 75) begin failures++; $display("FAIL chains %0d", n_chains); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
