// frame_sequencer: runs the stages of the vision pipeline one after another.
//
// In PH_IDLE it waits for a pixel marked as the first of a frame. From then
// on (PH_CAPTURE) every valid pixel's threshold bit is written into the
// binary image at the next raster position, one pixel per clock at most.
// After pixel (W-1, H-1) it starts the edge extraction (PH_EDGE), when that
// reports done it starts the chain coder (PH_CHAIN) and, at the same time,
// clears the object table; when the chain coder reports done, frame_done
// pulses and the sequencer returns to PH_IDLE.
//
// A first-of-frame pixel during capture restarts the capture at (0, 0).
// Frames that begin while the edge or chain stage is busy are not taken:
// their pixels are ignored and frames_dropped counts them.
//
// Strictly sequential operation of the stages follows the vision system this
// is built for; the restart and frame-dropping rules are this design's.
module frame_sequencer
  import vision_pkg::*;
#(
  parameter int unsigned W = IMG_W_DEF,
  parameter int unsigned H = IMG_H_DEF
) (
  input  logic           clk,
  input  logic           rst_n,
  // pixel stream (threshold already applied)
  input  logic           pix_valid,
  input  logic           pix_sof,
  input  logic           pix_hit,
  // binary image write port
  output logic           bin_we,
  output coord_t         bin_waddr,
  output logic [W-1:0]   bin_wdata,
  output logic [W-1:0]   bin_wmask,
  // stage control
  output logic           edge_start,
  input  logic           edge_done,
  output logic           chain_start,
  input  logic           chain_done,
  output logic           table_clear,
  // status
  output phase_t         phase,
  output logic           frame_done,
  output logic [15:0]    frames_dropped
);

  phase_t phase_q;
  coord_t x_q, y_q;

  // position of the pixel on the input now
  logic   take;
  coord_t px, py;
  logic   last_px;
  always_comb begin
    take = pix_valid && (pix_sof ? (phase_q == PH_IDLE || phase_q == PH_CAPTURE)
                                 : (phase_q == PH_CAPTURE));
    px   = pix_sof ? '0 : x_q;
    py   = pix_sof ? '0 : y_q;
    last_px = (int'(px) == W - 1) && (int'(py) == H - 1);
  end

  assign bin_we    = take;
  assign bin_waddr = py;
  assign bin_wmask = W'(1) << px;
  assign bin_wdata = pix_hit ? (W'(1) << px) : '0;

  assign phase = phase_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q        <= PH_IDLE;
      x_q            <= '0;
      y_q            <= '0;
      edge_start     <= 1'b0;
      chain_start    <= 1'b0;
      table_clear    <= 1'b0;
      frame_done     <= 1'b0;
      frames_dropped <= '0;
    end else begin
      edge_start  <= 1'b0;
      chain_start <= 1'b0;
      table_clear <= 1'b0;
      frame_done  <= 1'b0;
      if (pix_valid && pix_sof && (phase_q == PH_EDGE || phase_q == PH_CHAIN)
          && frames_dropped != '1)
        frames_dropped <= frames_dropped + 1'b1;
      unique case (phase_q)
        PH_IDLE, PH_CAPTURE: begin
          if (take) begin
            if (last_px) begin
              phase_q    <= PH_EDGE;
              edge_start <= 1'b1;
            end else begin
              phase_q <= PH_CAPTURE;
            end
            if (int'(px) == W - 1) begin
              x_q <= '0;
              y_q <= py + 1'b1;
            end else begin
              x_q <= px + 1'b1;
              y_q <= py;
            end
          end
        end
        PH_EDGE: begin
          if (edge_done) begin
            phase_q     <= PH_CHAIN;
            chain_start <= 1'b1;
            table_clear <= 1'b1;
          end
        end
        PH_CHAIN: begin
          if (chain_done) begin
            phase_q    <= PH_IDLE;
            frame_done <= 1'b1;
          end
        end
        default: phase_q <= PH_IDLE;
      endcase
    end
  end

endmodule
