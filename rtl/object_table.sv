// object_table: the array of 32-bit object records produced for one frame.
//
// Each record holds the line (9 bits) and column (9 bits) of an object's
// area centre and the 14-bit size of its chain. Records are appended in the
// order the objects are found. clear empties the table (the pipeline pulses
// it when segmentation of a new frame starts). When the table is full,
// further records are dropped and overflow is set until the next clear.
// Two asynchronous read ports let two consumers (for example a strategy
// unit and a serial transmitter) read the table at the same time.
//
// The record layout and the idea of an array of records are the vision
// system's; the depth (64 by default), the overflow flag and the two read
// ports are this design's choices.
module object_table
  import vision_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear,
  input  logic                         wr_valid,
  input  obj_rec_t                     wr_rec,
  output logic [$clog2(DEPTH+1)-1:0]   count,
  output logic                         overflow,
  input  logic [$clog2(DEPTH)-1:0]     rd_addr_a,
  output obj_rec_t                     rd_data_a,
  input  logic [$clog2(DEPTH)-1:0]     rd_addr_b,
  output obj_rec_t                     rd_data_b
);

  logic [REC_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_valid && !clear && (int'(count) < DEPTH))
      mem[count[$clog2(DEPTH)-1:0]] <= wr_rec;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= '0;
      overflow <= 1'b0;
    end else if (clear) begin
      count    <= '0;
      overflow <= 1'b0;
    end else if (wr_valid) begin
      if (int'(count) < DEPTH) count <= count + 1'b1;
      else                     overflow <= 1'b1;
    end
  end

  assign rd_data_a = obj_rec_t'(mem[rd_addr_a]);
  assign rd_data_b = obj_rec_t'(mem[rd_addr_b]);

endmodule
