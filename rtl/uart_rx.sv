// UART receiver, 8 data bits, no parity, one stop bit, LSB first.
//
// The line is synchronised through two flip-flops. A falling edge starts a
// frame; the start bit is re-checked at its middle (a glitch returns to
// idle), then each data bit is sampled CLKS_PER_BIT clocks apart at its
// middle, and finally the stop bit. A frame whose stop bit is low is
// reported on `frame_err` instead of `valid`; the receiver then waits for
// the line to return high before it looks for the next start bit.
//
// Interface: `valid` pulses for one cycle with the byte on `data`, in the
// middle of the stop bit. CLKS_PER_BIT = clock frequency / baud rate; the
// default is 200 MHz / 115200 baud. Frame format and baud rate are this
// design's choice: the source design only says samples arrive over UART.
module uart_rx #(
  parameter int CLKS_PER_BIT = 1736
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx_i,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);
  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [2:0] {S_IDLE, S_START, S_DATA, S_STOP, S_BREAK} state_t;
  state_t state_q;

  logic [1:0]    sync_q;
  logic [CW-1:0] clk_cnt_q;
  logic [2:0]    bit_idx_q;
  logic [7:0]    shift_q;
  logic          rx_s;
  assign rx_s = sync_q[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_q    <= 2'b11;
      state_q   <= S_IDLE;
      clk_cnt_q <= '0;
      bit_idx_q <= '0;
      shift_q   <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync_q    <= {sync_q[0], rx_i};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          clk_cnt_q <= '0;
          bit_idx_q <= '0;
          if (!rx_s) state_q <= S_START;
        end
        S_START: begin
          if (clk_cnt_q == CW'((CLKS_PER_BIT - 1) / 2)) begin
            clk_cnt_q <= '0;
            state_q   <= rx_s ? S_IDLE : S_DATA;
          end else
            clk_cnt_q <= clk_cnt_q + CW'(1);
        end
        S_DATA: begin
          if (clk_cnt_q == CW'(CLKS_PER_BIT - 1)) begin
            clk_cnt_q <= '0;
            shift_q   <= {rx_s, shift_q[7:1]};
            bit_idx_q <= bit_idx_q + 3'd1;
            if (bit_idx_q == 3'd7) state_q <= S_STOP;
          end else
            clk_cnt_q <= clk_cnt_q + CW'(1);
        end
        S_STOP: begin
          if (clk_cnt_q == CW'(CLKS_PER_BIT - 1)) begin
            clk_cnt_q <= '0;
            if (rx_s) begin
              data    <= shift_q;
              valid   <= 1'b1;
              state_q <= S_IDLE;
            end else begin
              frame_err <= 1'b1;
              state_q   <= S_BREAK;
            end
          end else
            clk_cnt_q <= clk_cnt_q + CW'(1);
        end
        S_BREAK: if (rx_s) state_q <= S_IDLE;   // wait for the line to idle
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
