// bitplane_ram_tb: random masked line writes and multi-port reads against a
// behavioural copy of the memory, plus reads of out-of-range line numbers,
// which must return zeros.
module bitplane_ram_tb;
  import vision_pkg::*;
  localparam int unsigned W = 40, H = 12, NRD = 3;

  logic clk = 0;
  always #5 clk = ~clk;

  logic         we;
  coord_t       waddr;
  logic [W-1:0] wdata, wmask;
  coord_t       raddr [NRD];
  logic [W-1:0] rdata [NRD];
  logic [W-1:0] model [H];
  int checks = 0, failures = 0;

  bitplane_ram #(.W(W), .H(H), .NRD(NRD)) dut (.clk, .we, .waddr, .wdata, .wmask, .raddr, .rdata);

  function automatic logic [W-1:0] rnd_line();
    return {$urandom, $urandom};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = '0; wdata = '0; wmask = '0;
    for (int p = 0; p < NRD; p++) raddr[p] = '0;
    // fill every line with known data
    for (int y = 0; y < H; y++) begin
      @(negedge clk);
      we = 1; waddr = coord_t'(y); wdata = rnd_line(); wmask = '1;
      model[y] = wdata;
    end
    @(negedge clk); we = 0;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      // check the reads of the current state
      for (int p = 0; p < NRD; p++) begin
        int a;
        a = (k % 7 == 0 && p == 2) ? H + int'($urandom_range(0, 5)) : int'($urandom_range(0, H - 1));
        if (k % 11 == 0 && p == 1) a = 511;  // line -1
        raddr[p] = coord_t'(a);
      end
      #1;
      for (int p = 0; p < NRD; p++) begin
        logic [W-1:0] exp;
        exp = (int'(raddr[p]) < H) ? model[raddr[p]] : '0;
        checks++;
        if (rdata[p] !== exp) begin
          failures++;
          $display("FAIL port %0d line %0d got %h exp %h", p, raddr[p], rdata[p], exp);
        end
      end
      // random masked write (sometimes out of range, which must be ignored)
      we    = ($urandom_range(0, 3) != 0);
      waddr = coord_t'((k % 13 == 0) ? H + 1 : $urandom_range(0, H - 1));
      wdata = rnd_line();
      wmask = (k % 2) ? (W'(1) << $urandom_range(0, W - 1)) : rnd_line();
      @(posedge clk);
      if (we && int'(waddr) < H) model[waddr] = (model[waddr] & ~wmask) | (wdata & wmask);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
