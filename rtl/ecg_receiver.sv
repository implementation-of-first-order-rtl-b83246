// ECG sample receiver: serial line in, 16-bit samples out.
//
// A UART receiver delivers bytes (`sig`). Each sample is sent as two bytes,
// high byte first. `head` is high while the high byte has been received and
// the low byte is awaited; the completed word is held in `buff` and given
// out on `ecg_in` with a one-cycle `ecg_valid`. A framing error, or a gap of
// more than GAP_BITS bit times between the two bytes of a sample, drops the
// half-received sample so that the byte order re-aligns.
//
// The block and its signal names (sig, vld, head, buff, ecg_in) follow the
// source design's receiver; the two-byte high-first framing and the
// re-alignment rule are this design's choice.
module ecg_receiver #(
  parameter int CLKS_PER_BIT = 1736,
  parameter int GAP_BITS     = 40
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rx_i,
  output logic [15:0] ecg_in,
  output logic        ecg_valid,
  output logic        head
);
  localparam int GAP_CLKS = CLKS_PER_BIT * GAP_BITS;
  localparam int GW       = $clog2(GAP_CLKS + 1);

  logic [7:0]    sig;
  logic          vld, ferr;
  logic [15:0]   buff;
  logic [GW-1:0] gap_q;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk, .rst_n, .rx_i, .data(sig), .valid(vld), .frame_err(ferr));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head      <= 1'b0;
      buff      <= '0;
      gap_q     <= '0;
      ecg_valid <= 1'b0;
    end else begin
      ecg_valid <= 1'b0;
      if (ferr) begin
        head <= 1'b0;
      end else if (vld) begin
        gap_q <= '0;
        if (!head) begin
          buff[15:8] <= sig;
          head       <= 1'b1;
        end else begin
          buff[7:0]  <= sig;
          head       <= 1'b0;
          ecg_valid  <= 1'b1;
        end
      end else if (head) begin
        if (gap_q == GW'(GAP_CLKS)) head <= 1'b0;
        else                        gap_q <= gap_q + GW'(1);
      end
    end
  end

  assign ecg_in = buff;
endmodule
