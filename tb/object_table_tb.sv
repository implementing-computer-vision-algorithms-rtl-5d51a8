// object_table_tb: appends records, reads them back on both ports, fills the
// table past its depth (records beyond it must be dropped and overflow set),
// and checks that clear empties it and resets overflow.
module object_table_tb;
  import vision_pkg::*;
  localparam int unsigned DEPTH = 8;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, clear, wr_valid;
  obj_rec_t wr_rec, rd_data_a, rd_data_b;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic overflow;
  logic [$clog2(DEPTH)-1:0] rd_addr_a, rd_addr_b;
  obj_rec_t model [DEPTH];
  int checks = 0, failures = 0;

  object_table #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .clear, .wr_valid, .wr_rec,
    .count, .overflow, .rd_addr_a, .rd_data_a, .rd_addr_b, .rd_data_b);

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
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
    rst_n = 0; clear = 0; wr_valid = 0; wr_rec = '0; rd_addr_a = '0; rd_addr_b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      int n;
      n = (round == 1) ? DEPTH + 3 : 5 + round;
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      expect_eq("count after clear", count, 0);
      expect_eq("overflow after clear", overflow, 0);
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        wr_valid = 1;
        wr_rec = obj_rec_t'($urandom);
        if (i < DEPTH) model[i] = wr_rec;
        @(negedge clk);
        wr_valid = 0;
        expect_eq("count", count, (i + 1 < DEPTH) ? i + 1 : DEPTH);
        expect_eq("overflow", overflow, (i >= DEPTH));
      end
      for (int i = 0; i < ((n < DEPTH) ? n : DEPTH); i++) begin
        rd_addr_a = ($clog2(DEPTH))'(i);
        rd_addr_b = ($clog2(DEPTH))'(((n < DEPTH) ? n : DEPTH) - 1 - i);
        #1;
        expect_eq("port a", rd_data_a, model[i]);
        expect_eq("port b", rd_data_b, model[((n < DEPTH) ? n : DEPTH) - 1 - i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
