// threshold: colour detection that turns one 16-bit RGB pixel into one bit.
//
// The output is 1 when the red, green and blue components all lie inside
// their configured inclusive ranges, else 0. The unit is purely
// combinational: the caller registers the bit when it stores it, so the whole
// stage processes one pixel per clock.
//
// Interface: pix (5-6-5 RGB), cfg (six range limits), hit (the binary pixel).
// The range test itself is the one the vision system is built on. Making the
// six limits run-time inputs, rather than fixed constants, is this design's
// choice; the simplest setting, accepting only components below half of
// their full scale, is r 0..15, g 0..31, b 0..15.
module threshold
  import vision_pkg::*;
(
  input  rgb565_t  pix,
  input  thr_cfg_t cfg,
  output logic     hit
);

  logic r_ok, g_ok, b_ok;

  always_comb begin
    r_ok = (pix.r >= cfg.r_lo) && (pix.r <= cfg.r_hi);
    g_ok = (pix.g >= cfg.g_lo) && (pix.g <= cfg.g_hi);
    b_ok = (pix.b >= cfg.b_lo) && (pix.b <= cfg.b_hi);
    hit  = r_ok && g_ok && b_ok;
  end

endmodule
