// rs232_tx_tb: sends small object tables and decodes the serial line with a
// receiver model that samples the middle of every bit. Checks the message
// (count byte, then four bytes per record, most significant first), the
// start and stop bits, the bit length of CLK_HZ/BAUD clocks, that the line
// idles high, and that an empty table sends only the count byte.
module rs232_tx_tb;
  import vision_pkg::*;
  localparam int unsigned CLK_HZ = 1_000_000, BAUD = 100_000, DEPTH = 8;
  localparam int unsigned DIV = CLK_HZ / BAUD;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, send, txd, busy;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [$clog2(DEPTH)-1:0] rd_addr;
  obj_rec_t rd_data;
  obj_rec_t table_m [DEPTH];
  int checks = 0, failures = 0;

  assign rd_data = table_m[rd_addr];

  rs232_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .send, .count, .rd_addr, .rd_data, .txd, .busy);

  // receiver model: after the falling start edge, txd is sampled on every
  // falling clock edge; k counts those edges, so the edge of clock m after
  // the start edge is seen at k = m + 1. Every change of txd inside the
  // character must fall on a bit boundary (m a multiple of DIV), and the
  // bits are read in the middle of their bit times.
  byte unsigned rx[$];
  int           bad_edges = 0;
  initial begin
    forever begin
      logic [9:0] bits;
      logic       prev;
      @(negedge txd);
      prev = 1'b0;
      for (int k = 1; k < 10 * DIV; k++) begin
        @(negedge clk);
        if (txd !== prev && ((k - 1) % DIV) != 0) bad_edges++;
        prev = txd;
        if (k % DIV == DIV / 2) bits[k / DIV] = txd;
      end
      checks++;
      if (bits[0] !== 1'b0 || bits[9] !== 1'b1) begin
        failures++;
        $display("FAIL framing %b", bits);
      end
      rx.push_back(bits[8:1]);
    end
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic message(int n);
    int t;
    rx.delete(); bad_edges = 0;
    for (int i = 0; i < DEPTH; i++) table_m[i] = obj_rec_t'($urandom);
    count = ($clog2(DEPTH+1))'(n);
    @(negedge clk); send = 1;
    @(negedge clk); send = 0;
    checks++;
    if (!busy) begin failures++; $display("FAIL not busy after send"); end
    // a second send while busy is ignored
    @(negedge clk); send = 1;
    @(negedge clk); send = 0;
    t = 0;
    while (busy) begin @(posedge clk); t++; end
    repeat (3 * DIV) @(posedge clk);
    expect_eq("bytes", rx.size(), 1 + 4 * n);
    if (rx.size() == 1 + 4 * n) begin
      expect_eq("count byte", rx[0], n);
      for (int r = 0; r < n; r++)
        for (int k = 0; k < 4; k++)
          expect_eq("record byte", rx[1 + 4 * r + k], int'(table_m[r][31 - 8 * k -: 8]));
    end
    expect_eq("edges off the bit grid", bad_edges, 0);
    // message length: 10 bits per character plus at most 2 clocks between
    checks++;
    if (t < (1 + 4 * n) * 10 * DIV - 4 || t > (1 + 4 * n) * (10 * DIV + 2) + 2) begin
      failures++;
      $display("FAIL message took %0d clocks", t);
    end
    expect_eq("idle high", txd, 1);
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; send = 0; count = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    expect_eq("idle high after reset", txd, 1);
    message(3);
    message(0);
    message(DEPTH);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
