// threshold_tb: checks the colour-range test against an independent model.
//
// Drives random pixels through several range settings, including the
// "below half scale" setting and ranges that hug a single value, and compares
// the hit bit with a reference computed from the unpacked components.
module threshold_tb;
  import vision_pkg::*;

  rgb565_t  pix;
  thr_cfg_t cfg;
  logic     hit;
  int       checks = 0, failures = 0;

  threshold dut (.pix, .cfg, .hit);

  function automatic logic ref_hit(logic [15:0] p, thr_cfg_t c);
    int r, g, b;
    r = int'(p[15:11]);
    g = int'(p[10:5]);
    b = int'(p[4:0]);
    return (r >= c.r_lo && r <= c.r_hi && g >= c.g_lo && g <= c.g_hi &&
            b >= c.b_lo && b <= c.b_hi);
  endfunction

  task automatic check_one(logic [15:0] p);
    pix = rgb565_t'(p);
    #1;
    checks++;
    if (hit !== ref_hit(p, cfg)) begin
      failures++;
      $display("FAIL pix=%h cfg=%h hit=%b", p, cfg, hit);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hits;
    // half-scale setting: every colour with no component MSB set
    cfg = '{r_lo: 0, r_hi: 15, g_lo: 0, g_hi: 31, b_lo: 0, b_hi: 15};
    for (int p = 0; p < 65536; p += 7) check_one(16'(p));
    // the half-scale setting equals "no MSB set"
    for (int p = 0; p < 65536; p += 13) begin
      pix = rgb565_t'(16'(p));
      #1;
      checks++;
      if (hit !== !(p[15] || p[10] || p[4])) failures++;
    end
    // random ranges, random pixels
    hits = 0;
    for (int k = 0; k < 200; k++) begin
      cfg.r_lo = 5'($urandom); cfg.r_hi = cfg.r_lo + 5'($urandom_range(0, 12));
      cfg.g_lo = 6'($urandom); cfg.g_hi = cfg.g_lo + 6'($urandom_range(0, 25));
      cfg.b_lo = 5'($urandom); cfg.b_hi = cfg.b_lo + 5'($urandom_range(0, 12));
      for (int j = 0; j < 100; j++) begin
        logic [15:0] p;
        // half the pixels are drawn inside the range
        if (j % 2 == 0)
          p = {5'(cfg.r_lo + $urandom_range(0, 12)), 6'(cfg.g_lo + $urandom_range(0, 25)),
               5'(cfg.b_lo + $urandom_range(0, 12))};
        else
          p = 16'($urandom);
        check_one(p);
        if (hit) hits++;
      end
    end
    checks++;
    if (hits < 100) begin
      failures++;
      $display("FAIL too few accepted pixels: %0d", hits);
    end
    // exact single-colour range
    cfg = '{r_lo: 20, r_hi: 20, g_lo: 40, g_hi: 40, b_lo: 3, b_hi: 3};
    check_one({5'd20, 6'd40, 5'd3});
    check_one({5'd21, 6'd40, 5'd3});
    check_one({5'd20, 6'd39, 5'd3});
    check_one({5'd20, 6'd40, 5'd4});
    checks++;
    pix = rgb565_t'({5'd20, 6'd40, 5'd3}); #1;
    if (hit !== 1'b1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
