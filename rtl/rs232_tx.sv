// rs232_tx: sends the object table of the last frame over an RS-232 line.
//
// A pulse on send (ignored while busy) starts a message: one byte holding
// the number of records, then each record as four bytes, most significant
// byte first (line, column, size as packed in the 32-bit record). Every byte
// goes out as a standard asynchronous character: a low start bit, eight data
// bits least significant first, and a high stop bit, each bit lasting
// CLK_HZ / BAUD clocks (rounded down). txd idles high; consecutive
// characters are separated by one or two extra clocks of idle line.
//
// The record is read from the table through rd_addr/rd_data (asynchronous
// read) while the byte before it is being sent. The table must not change
// during a message; the pipeline only rewrites it during segmentation.
//
// Sending the object information to a serial link is an option of the vision
// system; the message format, the baud rate (115200) and the character
// format are this design's choices.
module rs232_tx
  import vision_pkg::*;
#(
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned BAUD   = 115_200,
  parameter int unsigned DEPTH  = 64
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         send,
  input  logic [$clog2(DEPTH+1)-1:0]   count,
  output logic [$clog2(DEPTH)-1:0]     rd_addr,
  input  obj_rec_t                     rd_data,
  output logic                         txd,
  output logic                         busy
);

  localparam int unsigned DIV = (CLK_HZ / BAUD < 1) ? 1 : CLK_HZ / BAUD;
  localparam int unsigned CW  = $clog2(DIV + 1);
  localparam int unsigned NW  = $clog2(DEPTH + 1);

  // message position: byte index 0 is the count, then 4 per record
  logic [NW-1:0]    n_rec_q;     // records in this message
  logic [NW-1:0]    rec_q;       // record being sent
  logic [1:0]       byte_q;      // byte of the record, 0 = most significant
  logic             hdr_q;       // the count byte is being sent
  logic             pend_q;      // load the byte the pointer selects
  // character serializer
  logic [9:0]       shift_q;     // stop, data[7:0], start (LSB first)
  logic [3:0]       bit_q;       // bits of the character still to send
  logic [CW-1:0]    tick_q;

  logic [7:0] next_byte;
  always_comb begin
    logic [REC_W-1:0] r;
    r = rd_data;
    unique case (byte_q)
      2'd0: next_byte = r[31:24];
      2'd1: next_byte = r[23:16];
      2'd2: next_byte = r[15:8];
      default: next_byte = r[7:0];
    endcase
  end

  assign rd_addr = rec_q[$clog2(DEPTH)-1:0];
  assign txd     = (bit_q != '0) ? shift_q[0] : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      n_rec_q <= '0;
      rec_q   <= '0;
      byte_q  <= '0;
      hdr_q   <= 1'b0;
      pend_q  <= 1'b0;
      shift_q <= '1;
      bit_q   <= '0;
      tick_q  <= '0;
    end else if (!busy) begin
      if (send) begin
        busy    <= 1'b1;
        n_rec_q <= count;
        rec_q   <= '0;
        byte_q  <= '0;
        hdr_q   <= 1'b1;
        pend_q  <= 1'b0;
        shift_q <= {1'b1, 8'(count), 1'b0};
        bit_q   <= 4'd10;
        tick_q  <= CW'(DIV - 1);
      end
    end else if (bit_q != '0) begin
      // a character is on the line
      if (tick_q != '0) begin
        tick_q <= tick_q - 1'b1;
      end else begin
        tick_q  <= CW'(DIV - 1);
        shift_q <= {1'b1, shift_q[9:1]};
        bit_q   <= bit_q - 1'b1;
      end
    end else if (pend_q) begin
      // the pointer has settled: load the byte it points at
      pend_q  <= 1'b0;
      shift_q <= {1'b1, next_byte, 1'b0};
      bit_q   <= 4'd10;
      tick_q  <= CW'(DIV - 1);
    end else if (hdr_q) begin
      hdr_q <= 1'b0;
      if (n_rec_q == '0) busy <= 1'b0;
      else               pend_q <= 1'b1;
    end else if (byte_q == 2'd3 && rec_q + 1'b1 == n_rec_q) begin
      busy <= 1'b0;
    end else begin
      if (byte_q == 2'd3) begin
        rec_q  <= rec_q + 1'b1;
        byte_q <= 2'd0;
      end else begin
        byte_q <= byte_q + 1'b1;
      end
      pend_q <= 1'b1;
    end
  end

endmodule
