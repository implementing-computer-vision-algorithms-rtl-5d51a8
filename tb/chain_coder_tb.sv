// chain_coder_tb: segmentation of hand-made and random edge images.
//
// The image is loaded into a bitplane_ram through its write port, then the
// chain coder runs. Everything it puts out (chain codes with their first
// flags, object records and measurements, the clocks from start to done) is
// compared with a software model of the same scan-and-follow procedure
// written here with plain arrays. Shapes with a known answer are checked
// against geometry as well: a rectangular outline must give its exact centre,
// area and pixel count, a single dot and a straight line must fall back to
// the centre of their rectangle, and a disc outline must give the disc centre.
module chain_coder_tb;
  import vision_pkg::*;
  localparam int unsigned W = 40, H = 30;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  // memory, written by the bench while the coder is idle
  logic         tb_we;
  coord_t       tb_waddr;
  logic [W-1:0] tb_wdata;
  logic         start, busy, done;
  coord_t       rd_addr [3];
  logic [W-1:0] rd_data [3];
  logic         cc_we;
  coord_t       cc_waddr;
  logic [W-1:0] cc_wmask;
  logic         code_valid, code_first, obj_valid;
  freeman_t     code;
  obj_rec_t     obj_rec;
  obj_stats_t   obj_stats;

  bitplane_ram #(.W(W), .H(H), .NRD(3)) u_ram (
    .clk, .we(tb_we | cc_we), .waddr(tb_we ? tb_waddr : cc_waddr),
    .wdata(tb_we ? tb_wdata : '0), .wmask(tb_we ? {W{1'b1}} : cc_wmask),
    .raddr(rd_addr), .rdata(rd_data));

  chain_coder #(.W(W), .H(H)) dut (
    .clk, .rst_n, .start, .busy, .done, .rd_addr, .rd_data,
    .we(cc_we), .waddr(cc_waddr), .wmask(cc_wmask),
    .code_valid, .code, .code_first, .obj_valid, .obj_rec, .obj_stats);

  int checks = 0, failures = 0;

  // ---------------- captured DUT output ----------------
  int         got_codes[$];     // code | first << 3
  obj_rec_t   got_recs[$];
  obj_stats_t got_stats[$];
  always @(posedge clk) begin
    if (code_valid) got_codes.push_back(int'(code) | (int'(code_first) << 3));
    if (obj_valid) begin
      got_recs.push_back(obj_rec);
      got_stats.push_back(obj_stats);
    end
  end

  // ---------------- reference model ----------------
  bit img [H][W];
  int         exp_codes[$];
  obj_rec_t   exp_recs[$];
  obj_stats_t exp_stats[$];
  int         exp_cycles;

  function automatic bit at(int x, int y);
    if (x < 0 || y < 0 || x >= W || y >= H) return 0;
    return img[y][x];
  endfunction

  function automatic void ref_model();
    bit     im [H][W];
    int     pdx [8] = '{1, 0, -1, 0, 1, -1, -1, 1};
    int     pdy [8] = '{0, 1, 0, -1, 1, 1, -1, -1};
    int     pcode [8] = '{0, 6, 4, 2, 7, 5, 3, 1};
    im = img;
    exp_codes.delete(); exp_recs.delete(); exp_stats.delete();
    exp_cycles = W * H;
    for (int sy = 0; sy < H; sy++)
      for (int sx = 0; sx < W; sx++) begin
        if (im[sy][sx]) begin
          int x, y, steps, npix, ne, no, xmn, xmx, ymn, ymx;
          longint s2, mx, my, c, a2, d, p8;
          obj_rec_t r; obj_stats_t st;
          bit moved;
          im[sy][sx] = 0;
          x = sx; y = sy; steps = 0; npix = 1; ne = 0; no = 0;
          s2 = 0; mx = 0; my = 0;
          xmn = sx; xmx = sx; ymn = sy; ymx = sy;
          do begin
            moved = 0;
            for (int k = 0; k < 8 && !moved; k++) begin
              int nx, ny;
              nx = x + pdx[k]; ny = y + pdy[k];
              if (nx >= 0 && ny >= 0 && nx < W && ny < H && im[ny][nx]) begin
                c  = longint'(x) * pdy[k] - longint'(y) * pdx[k];
                s2 += c;
                mx += longint'(2 * x + pdx[k]) * c;
                my += longint'(2 * y + pdy[k]) * c;
                if (pcode[k] % 2) no++; else ne++;
                exp_codes.push_back(pcode[k] | ((steps == 0) << 3));
                steps++;
                if (npix < 16383) npix++;
                im[ny][nx] = 0;
                x = nx; y = ny;
                if (x < xmn) xmn = x; if (x > xmx) xmx = x;
                if (y < ymn) ymn = y; if (y > ymx) ymx = y;
                moved = 1;
              end
            end
          end while (moved);
          // close the polygon
          c  = longint'(x) * sy - longint'(sx) * y;
          s2 += c;
          mx += longint'(x + sx) * c;
          my += longint'(y + sy) * c;
          if ((x - sx) * (x - sx) <= 1 && (y - sy) * (y - sy) <= 1 && !(x == sx && y == sy)) begin
            if (x != sx && y != sy) no++; else ne++;
          end
          if (s2 < 0) begin s2 = -s2; mx = -mx; my = -my; end
          a2 = s2;
          d  = 3 * a2;
          if (a2 == 0) begin
            r.column = coord_t'((xmn + xmx) / 2);
            r.line   = coord_t'((ymn + ymx) / 2);
          end else begin
            longint qx, qy;
            qx = (mx < 0) ? 0 : (mx + d / 2) / d;
            qy = (my < 0) ? 0 : (my + d / 2) / d;
            if (qx > W - 1) qx = W - 1;
            if (qy > H - 1) qy = H - 1;
            r.column = coord_t'(qx);
            r.line   = coord_t'(qy);
          end
          r.size = SIZE_W'(npix);
          p8 = longint'(ne) * 256 + longint'(no) * 362;
          st.area = 18'(a2 / 2);
          st.perim_q8 = 24'(p8);
          st.shape_q8 = (p8 == 0) ? 16'd0 : 16'(((a2 << 15) / p8 > 65535) ? 65535 : (a2 << 15) / p8);
          st.x_min = coord_t'(xmn); st.x_max = coord_t'(xmx);
          st.y_min = coord_t'(ymn); st.y_max = coord_t'(ymx);
          st.flat = (a2 == 0);
          exp_recs.push_back(r);
          exp_stats.push_back(st);
          exp_cycles += steps + 21;
        end
      end
  endfunction

  // ---------------- running one image ----------------
  task automatic run_image(string name);
    int cycles;
    // load
    for (int y = 0; y < H; y++) begin
      @(negedge clk);
      tb_we = 1; tb_waddr = coord_t'(y);
      for (int x = 0; x < W; x++) tb_wdata[x] = img[y][x];
    end
    @(negedge clk); tb_we = 0;
    ref_model();
    got_codes.delete(); got_recs.delete(); got_stats.delete();
    start = 1;
    @(posedge clk);
    cycles = 0;
    @(negedge clk); start = 0;
    while (!done) begin
      @(posedge clk); cycles++;
      #1;
    end
    checks++;
    if (cycles != exp_cycles) begin
      failures++;
      $display("FAIL %s: %0d cycles, expected %0d", name, cycles, exp_cycles);
    end
    checks++;
    if (got_codes.size() != exp_codes.size()) begin
      failures++;
      $display("FAIL %s: %0d codes, expected %0d", name, got_codes.size(), exp_codes.size());
    end else begin
      foreach (exp_codes[i]) begin
        checks++;
        if (got_codes[i] != exp_codes[i]) begin
          failures++;
          $display("FAIL %s: code %0d got %0d exp %0d", name, i, got_codes[i], exp_codes[i]);
        end
      end
    end
    checks++;
    if (got_recs.size() != exp_recs.size()) begin
      failures++;
      $display("FAIL %s: %0d objects, expected %0d", name, got_recs.size(), exp_recs.size());
    end else begin
      foreach (exp_recs[i]) begin
        checks++;
        if (got_recs[i] !== exp_recs[i] || got_stats[i] !== exp_stats[i]) begin
          failures++;
          $display("FAIL %s: object %0d got %h/%h exp %h/%h", name, i,
                   got_recs[i], got_stats[i], exp_recs[i], exp_stats[i]);
        end
      end
    end
    // the pass erases every set pixel
    for (int y = 0; y < H; y++) begin
      checks++;
      if (u_ram.mem[y] != '0) begin
        failures++;
        $display("FAIL %s: line %0d not erased", name, y);
      end
    end
  endtask

  task automatic clear_img();
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = 0;
  endtask

  task automatic draw_rect(int x0, int y0, int x1, int y1);
    for (int x = x0; x <= x1; x++) begin img[y0][x] = 1; img[y1][x] = 1; end
    for (int y = y0; y <= y1; y++) begin img[y][x0] = 1; img[y][x1] = 1; end
  endtask

  // fill a disc and keep its 2x2-mask outline
  task automatic draw_disc_outline(int cx, int cy, int r);
    bit fill [H][W];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        fill[y][x] = ((x - cx) * (x - cx) + (y - cy) * (y - cy) <= r * r);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        bit a, b, c, d;
        a = fill[y][x];
        b = (x + 1 < W) ? fill[y][x + 1] : 0;
        c = (y + 1 < H) ? fill[y + 1][x] : 0;
        d = (x + 1 < W && y + 1 < H) ? fill[y + 1][x + 1] : 0;
        if (!(a == b && b == c && c == d)) img[y][x] = 1;
      end
  endtask

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; start = 0; tb_we = 0; tb_waddr = '0; tb_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // empty image: scan only
    clear_img();
    run_image("empty");
    expect_eq("empty objects", got_recs.size(), 0);

    // rectangle outline 10..25 x 4..13: exact centre and area
    clear_img();
    draw_rect(10, 4, 25, 13);
    run_image("rect");
    expect_eq("rect objects", got_recs.size(), 1);
    if (got_recs.size() == 1) begin
      // centre (17.5, 8.5) rounds to (18, 9)
      expect_eq("rect column", int'(got_recs[0].column), 18);
      expect_eq("rect line", int'(got_recs[0].line), 9);
      expect_eq("rect size", int'(got_recs[0].size), 2 * (16 + 10) - 4);
      expect_eq("rect area", int'(got_stats[0].area), 15 * 9);
      expect_eq("rect perimeter", int'(got_stats[0].perim_q8), 256 * 2 * (15 + 9));
      expect_eq("rect first code east", got_codes[0], 0 | 8);
    end

    // dot and horizontal line: flat objects centred on their rectangle
    clear_img();
    img[2][3] = 1;
    for (int x = 20; x <= 30; x++) img[25][x] = 1;
    run_image("flat");
    expect_eq("flat objects", got_recs.size(), 2);
    if (got_recs.size() == 2) begin
      expect_eq("dot column", int'(got_recs[0].column), 3);
      expect_eq("dot line", int'(got_recs[0].line), 2);
      expect_eq("dot size", int'(got_recs[0].size), 1);
      expect_eq("dot flat", int'(got_stats[0].flat), 1);
      expect_eq("line column", int'(got_recs[1].column), 25);
      expect_eq("line line", int'(got_recs[1].line), 25);
      expect_eq("line size", int'(got_recs[1].size), 11);
      expect_eq("line flat", int'(got_stats[1].flat), 1);
    end

    // disc outline, plus a square touching the image corner
    clear_img();
    draw_disc_outline(20, 14, 8);
    draw_rect(0, 0, 3, 3);
    run_image("disc");
    expect_eq("disc objects", got_recs.size(), 2);
    if (got_recs.size() == 2) begin
      // the 2x2 outline sits half a pixel up-left of the disc: centre 19.5/13.5
      checks++;
      if (!(int'(got_recs[1].column) inside {19, 20}) || !(int'(got_recs[1].line) inside {13, 14})) begin
        failures++;
        $display("FAIL disc centre %0d,%0d", got_recs[1].column, got_recs[1].line);
      end
    end

    // random blobs
    for (int k = 0; k < 6; k++) begin
      clear_img();
      for (int b = 0; b < 5; b++)
        draw_disc_outline($urandom_range(0, W - 1), $urandom_range(0, H - 1), $urandom_range(1, 6));
      run_image("blobs");
    end
    // random noise (many small chains)
    clear_img();
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = ($urandom_range(0, 5) == 0);
    run_image("noise");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
