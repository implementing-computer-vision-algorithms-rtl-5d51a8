// edge_extract_tb: runs the edge operator over random and hand-drawn binary
// images held in a behavioural source memory, captures the lines it writes,
// and compares each output pixel with the 2x2 rule computed here (output
// white unless the four pixels (x,y), (x+1,y), (x,y+1), (x+1,y+1) are all
// equal, with black outside the image). Also checks that a pass takes H+1
// clocks from start to done, i.e. one line per clock.
module edge_extract_tb;
  import vision_pkg::*;
  localparam int unsigned W = 24, H = 10;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  logic         start, busy, done;
  coord_t       src_addr, dst_addr;
  logic [W-1:0] src_data, dst_data;
  logic         dst_we;

  logic [W-1:0] src [H];
  logic [W-1:0] dst [H];
  int           written [H];
  int checks = 0, failures = 0;

  assign src_data = (int'(src_addr) < H) ? src[src_addr] : {W{1'b1}};  // garbage beyond H

  edge_extract #(.W(W), .H(H)) dut (.clk, .rst_n, .start, .busy, .done,
    .src_addr, .src_data, .dst_we, .dst_addr, .dst_data);

  always @(posedge clk) if (dst_we) begin
    if (int'(dst_addr) < H) begin
      dst[dst_addr] <= dst_data;
      written[dst_addr]++;
    end else begin
      failures++;
      $display("FAIL write to line %0d", dst_addr);
    end
  end

  function automatic logic px(int x, int y);
    if (x < 0 || y < 0 || x >= W || y >= H) return 1'b0;
    return src[y][x];
  endfunction

  task automatic run_and_check(string name);
    int cycles;
    for (int y = 0; y < H; y++) written[y] = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    // count the clocks the unit is busy
    cycles = 0;
    while (!done) begin
      if (busy) cycles++;
      @(negedge clk);
    end
    checks++;
    if (cycles != H + 1) begin
      failures++;
      $display("FAIL %s: pass took %0d cycles, expected %0d", name, cycles, H + 1);
    end
    for (int y = 0; y < H; y++) begin
      checks++;
      if (written[y] != 1) begin
        failures++;
        $display("FAIL %s: line %0d written %0d times", name, y, written[y]);
      end
      for (int x = 0; x < W; x++) begin
        logic a, b, c, d, e;
        a = px(x, y); b = px(x + 1, y); c = px(x, y + 1); d = px(x + 1, y + 1);
        e = !(a == b && b == c && c == d);
        checks++;
        if (dst[y][x] !== e) begin
          failures++;
          $display("FAIL %s: (%0d,%0d) got %b exp %b", name, x, y, dst[y][x], e);
        end
      end
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int edge_px;
    rst_n = 0; start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // all black: no edges
    for (int y = 0; y < H; y++) src[y] = '0;
    run_and_check("black");
    edge_px = 0;
    for (int y = 0; y < H; y++) edge_px += $countones(dst[y]);
    checks++;
    if (edge_px != 0) failures++;
    // filled square in the middle: a closed one-pixel outline
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        src[y][x] = (x >= 5 && x <= 12 && y >= 2 && y <= 6);
    run_and_check("square");
    edge_px = 0;
    for (int y = 0; y < H; y++) edge_px += $countones(dst[y]);
    checks++;
    // outline of a 8x5 square seen through the 2x2 mask: 9x6 ring = 26 pixels
    if (edge_px != 26) begin
      failures++;
      $display("FAIL square outline has %0d pixels", edge_px);
    end
    // all white: only the right column and bottom line touch the border
    for (int y = 0; y < H; y++) src[y] = '1;
    run_and_check("white");
    // random images
    for (int k = 0; k < 20; k++) begin
      for (int y = 0; y < H; y++) src[y] = W'({$urandom, $urandom}) & W'({$urandom, $urandom});
      run_and_check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
