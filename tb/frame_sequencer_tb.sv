// frame_sequencer_tb: feeds pixel streams (with gaps, a restarted frame and
// frames arriving while the later stages are busy) into the sequencer,
// stands in for the edge and chain stages with fixed delays, and checks the
// binary-image writes, the order and timing of the stage starts, the table
// clear, frame_done and the dropped-frame count.
module frame_sequencer_tb;
  import vision_pkg::*;
  localparam int unsigned W = 8, H = 4;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  logic pix_valid, pix_sof, pix_hit;
  logic bin_we;
  coord_t bin_waddr;
  logic [W-1:0] bin_wdata, bin_wmask;
  logic edge_start, edge_done, chain_start, chain_done, table_clear, frame_done;
  phase_t phase;
  logic [15:0] frames_dropped;
  int checks = 0, failures = 0;

  frame_sequencer #(.W(W), .H(H)) dut (.clk, .rst_n, .pix_valid, .pix_sof, .pix_hit,
    .bin_we, .bin_waddr, .bin_wdata, .bin_wmask, .edge_start, .edge_done,
    .chain_start, .chain_done, .table_clear, .phase, .frame_done, .frames_dropped);

  // binary image as written
  logic [W-1:0] img [H];
  always @(posedge clk) if (bin_we && int'(bin_waddr) < H)
    img[bin_waddr] <= (img[bin_waddr] & ~bin_wmask) | (bin_wdata & bin_wmask);

  // stand-ins for the stages: done 5 / 9 clocks after start
  int edge_cnt = 0, chain_cnt = 0, n_edge = 0, n_chain = 0, n_clear = 0, n_done = 0;
  always @(posedge clk) if (rst_n) begin
    edge_done  <= (edge_cnt == 1);
    chain_done <= (chain_cnt == 1);
    if (edge_start) begin edge_cnt <= 5; n_edge++; end
    else if (edge_cnt > 0) edge_cnt <= edge_cnt - 1;
    if (chain_start) begin chain_cnt <= 9; n_chain++; end
    else if (chain_cnt > 0) chain_cnt <= chain_cnt - 1;
    if (table_clear) begin
      n_clear++;
      if (!chain_start) begin failures++; $display("FAIL clear without chain start"); end
    end
    if (frame_done) n_done++;
    if (chain_start && phase != PH_CHAIN) begin failures++; $display("FAIL chain start outside chain phase"); end
  end

  logic ref_img [H][W];

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // send one frame; gaps between pixels when gappy
  task automatic send_frame(bit gappy, int stop_after = -1);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        if (stop_after >= 0 && y * W + x == stop_after) return;
        @(negedge clk);
        pix_valid = 1;
        pix_sof   = (x == 0 && y == 0);
        pix_hit   = 1'($urandom);
        ref_img[y][x] = pix_hit;
        @(posedge clk); #1;
        pix_valid = 0; pix_sof = 0;
        if (gappy) repeat ($urandom_range(0, 2)) @(posedge clk);
      end
  endtask

  task automatic check_img(string name);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        checks++;
        if (img[y][x] !== ref_img[y][x]) begin
          failures++;
          $display("FAIL %s pixel (%0d,%0d)", name, x, y);
        end
      end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1;
    rst_n = 0; pix_valid = 0; pix_sof = 0; pix_hit = 0;
    edge_done = 0; chain_done = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // pixels before any frame start are ignored
    @(negedge clk); pix_valid = 1; pix_hit = 1;
    @(negedge clk); pix_valid = 0;
    expect_eq("ignored stray pixel", int'(phase), int'(PH_IDLE));
    // frame 1, back to back
    send_frame(0);
    @(posedge clk); #1;
    expect_eq("edge started", n_edge, 1);
    expect_eq("phase edge", int'(phase), int'(PH_EDGE));
    check_img("frame 1");
    wait (frame_done);
    @(posedge clk); #1;
    expect_eq("chain started", n_chain, 1);
    expect_eq("table cleared", n_clear, 1);
    expect_eq("idle after frame", int'(phase), int'(PH_IDLE));
    // frame 2 with gaps, cut short and restarted
    send_frame(1, 13);
    expect_eq("partial frame capturing", int'(phase), int'(PH_CAPTURE));
    send_frame(1);
    check_img("frame 2");
    // a frame arriving during the edge/chain stages is dropped
    @(negedge clk); pix_valid = 1; pix_sof = 1; pix_hit = 1;
    @(negedge clk); pix_valid = 0; pix_sof = 0;
    expect_eq("dropped", frames_dropped, 1);
    wait (frame_done);
    @(posedge clk); #1;
    expect_eq("frames done", n_done, 2);
    expect_eq("edge starts", n_edge, 2);
    expect_eq("chain starts", n_chain, 2);
    check_img("frame 2 kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
