// vision_system: FPGA vision pipeline that finds coloured objects in a frame.
//
// Pixels from a video decoder (16-bit RGB, one per clock at most) pass a
// colour threshold and are stored as a one-bit image. When the frame is
// complete, a 2x2 edge operator turns the binary image into an outline image
// at one line per clock, and a chain coder then scans the outline image at
// one pixel per clock, follows every outline it meets and writes a 32-bit
// record per object (centre line, centre column, chain size) into the object
// table. The stages run strictly one after another under frame_sequencer.
// The table can be read directly (for a strategy unit) and sent out on an
// RS-232 line.
//
// Ports: pix_valid/pix_sof/pix_rgb is the decoder's pixel stream, pix_sof
// marking the first pixel of a frame; thr_cfg sets the colour ranges;
// obj_rd_addr/obj_rd_data read the table, obj_count and obj_overflow describe
// it; obj_valid/obj_stats and code_valid/code/code_first stream each
// object's measurements and chain as they are found; uart_send starts a
// serial transfer of the table on uart_txd.
//
// Timing at the default 320 x 240: W*H clocks of capture at a pixel per
// clock, H+1 clocks of edge extraction, W*H clocks of scan plus L + 21
// per object of L chain steps, and a few clocks of hand-over between stages.
module vision_system
  import vision_pkg::*;
#(
  parameter int unsigned W       = IMG_W_DEF,
  parameter int unsigned H       = IMG_H_DEF,
  parameter int unsigned MAX_OBJ = 64,
  parameter int unsigned CLK_HZ  = 100_000_000,
  parameter int unsigned BAUD    = 115_200
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // video decoder pixel stream
  input  logic                           pix_valid,
  input  logic                           pix_sof,
  input  rgb565_t                        pix_rgb,
  input  thr_cfg_t                       thr_cfg,
  // status
  output phase_t                         phase,
  output logic                           frame_done,
  output logic [15:0]                    frames_dropped,
  // object table
  output logic [$clog2(MAX_OBJ+1)-1:0]   obj_count,
  output logic                           obj_overflow,
  input  logic [$clog2(MAX_OBJ)-1:0]     obj_rd_addr,
  output obj_rec_t                       obj_rd_data,
  // per-object stream
  output logic                           obj_valid,
  output obj_rec_t                       obj_rec,
  output obj_stats_t                     obj_stats,
  output logic                           code_valid,
  output freeman_t                       code,
  output logic                           code_first,
  // serial output
  input  logic                           uart_send,
  output logic                           uart_txd,
  output logic                           uart_busy
);

  // ---------------- threshold and capture ----------------
  logic pix_hit;
  threshold u_threshold (.pix(pix_rgb), .cfg(thr_cfg), .hit(pix_hit));

  logic         bin_we;
  coord_t       bin_waddr;
  logic [W-1:0] bin_wdata, bin_wmask;
  coord_t       bin_raddr [1];
  logic [W-1:0] bin_rdata [1];

  logic edge_start, edge_done, edge_busy;
  logic chain_start, chain_done, chain_busy;
  logic table_clear;

  frame_sequencer #(.W(W), .H(H)) u_seq (
    .clk, .rst_n,
    .pix_valid, .pix_sof, .pix_hit,
    .bin_we, .bin_waddr, .bin_wdata, .bin_wmask,
    .edge_start, .edge_done, .chain_start, .chain_done, .table_clear,
    .phase, .frame_done, .frames_dropped
  );

  bitplane_ram #(.W(W), .H(H), .NRD(1)) u_bin_ram (
    .clk, .we(bin_we), .waddr(bin_waddr), .wdata(bin_wdata), .wmask(bin_wmask),
    .raddr(bin_raddr), .rdata(bin_rdata)
  );

  // ---------------- edge extraction ----------------
  logic         ee_we;
  coord_t       ee_addr, ee_src_addr;
  logic [W-1:0] ee_data;

  edge_extract #(.W(W), .H(H)) u_edge (
    .clk, .rst_n, .start(edge_start), .busy(edge_busy), .done(edge_done),
    .src_addr(ee_src_addr), .src_data(bin_rdata[0]),
    .dst_we(ee_we), .dst_addr(ee_addr), .dst_data(ee_data)
  );
  assign bin_raddr[0] = ee_src_addr;

  // ---------------- edge image, shared by edge stage and chain coder -----
  logic         cc_we;
  coord_t       cc_waddr;
  logic [W-1:0] cc_wmask;
  coord_t       edge_raddr [3];
  logic [W-1:0] edge_rdata [3];

  logic         edg_we;
  coord_t       edg_waddr;
  logic [W-1:0] edg_wdata, edg_wmask;

  always_comb begin
    if (ee_we) begin
      edg_we    = 1'b1;
      edg_waddr = ee_addr;
      edg_wdata = ee_data;
      edg_wmask = '1;
    end else begin
      edg_we    = cc_we;
      edg_waddr = cc_waddr;
      edg_wdata = '0;          // the chain coder only erases
      edg_wmask = cc_wmask;
    end
  end

  bitplane_ram #(.W(W), .H(H), .NRD(3)) u_edge_ram (
    .clk, .we(edg_we), .waddr(edg_waddr), .wdata(edg_wdata), .wmask(edg_wmask),
    .raddr(edge_raddr), .rdata(edge_rdata)
  );

  // ---------------- chain-code segmentation ----------------
  chain_coder #(.W(W), .H(H)) u_chain (
    .clk, .rst_n, .start(chain_start), .busy(chain_busy), .done(chain_done),
    .rd_addr(edge_raddr), .rd_data(edge_rdata),
    .we(cc_we), .waddr(cc_waddr), .wmask(cc_wmask),
    .code_valid, .code, .code_first,
    .obj_valid, .obj_rec, .obj_stats
  );

  // ---------------- data output ----------------
  logic [$clog2(MAX_OBJ)-1:0] uart_rd_addr;
  obj_rec_t                   uart_rd_data;

  object_table #(.DEPTH(MAX_OBJ)) u_table (
    .clk, .rst_n, .clear(table_clear),
    .wr_valid(obj_valid), .wr_rec(obj_rec),
    .count(obj_count), .overflow(obj_overflow),
    .rd_addr_a(obj_rd_addr), .rd_data_a(obj_rd_data),
    .rd_addr_b(uart_rd_addr), .rd_data_b(uart_rd_data)
  );

  rs232_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .DEPTH(MAX_OBJ)) u_uart (
    .clk, .rst_n, .send(uart_send), .count(obj_count),
    .rd_addr(uart_rd_addr), .rd_data(uart_rd_data),
    .txd(uart_txd), .busy(uart_busy)
  );

  // the two writers of the edge image never overlap
  assert property (@(posedge clk) disable iff (!rst_n) !(ee_we && cc_we))
    else $error("edge image written by both stages at once");

  // the stages run one at a time
  assert property (@(posedge clk) disable iff (!rst_n) !(edge_busy && chain_busy))
    else $error("edge and chain stages busy at once");

endmodule
