// seq_divider: unsigned restoring divider producing a QW-bit quotient.
//
// A pulse on start loads num and den; the quotient floor(num / den) is then
// built one bit per clock, most significant first, and is ready when busy
// falls, QW cycles after start. The cycle count does not depend on the
// operands. A quotient that would not fit in QW bits saturates to all ones;
// a zero divisor gives zero. quo holds its value until the next start.
module seq_divider #(
  parameter int unsigned NW = 40,   // dividend width
  parameter int unsigned DW = 24,   // divisor width
  parameter int unsigned QW = 9     // quotient width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  output logic          busy,
  output logic [QW-1:0] quo
);

  localparam int unsigned XW = ((NW > DW + QW) ? NW : DW + QW) + 1;

  logic [XW-1:0]         rem_q, dsh_q;
  logic [QW-1:0]         q_q;
  logic [$clog2(QW+1)-1:0] cnt_q;
  logic                  sat_q, zero_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      rem_q  <= '0;
      dsh_q  <= '0;
      q_q    <= '0;
      cnt_q  <= '0;
      sat_q  <= 1'b0;
      zero_q <= 1'b0;
    end else if (start) begin
      busy   <= 1'b1;
      rem_q  <= XW'(num);
      dsh_q  <= XW'(den) << (QW - 1);
      q_q    <= '0;
      cnt_q  <= ($clog2(QW+1))'(QW);
      zero_q <= (den == '0);
      sat_q  <= (XW'(num) >= (XW'(den) << QW));
    end else if (busy) begin
      if (rem_q >= dsh_q) begin
        rem_q <= rem_q - dsh_q;
        q_q   <= {q_q[QW-2:0], 1'b1};
      end else begin
        q_q   <= {q_q[QW-2:0], 1'b0};
      end
      dsh_q <= dsh_q >> 1;
      cnt_q <= cnt_q - 1'b1;
      if (cnt_q == 1) busy <= 1'b0;
    end
  end

  assign quo = zero_q ? '0 : (sat_q ? '1 : q_q);

endmodule
