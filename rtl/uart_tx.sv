// uart_tx: UART transmitter, 8 data bits, 1 start bit, odd parity, 1 stop bit.
//
// A byte is accepted on s_tvalid/s_tdata while s_tready ("axiready") is high,
// i.e. once the previous frame, stop bit included, has left the pin. The frame
// is: start (0), d0..d7 LSB first, parity, stop (1). The parity bit makes the
// number of ones in data + parity odd. Each bit lasts CLKS_PER_BIT cycles;
// the default 868 gives 115 207 baud from a 100 MHz clock (115200 nominal).
// One frame therefore takes 11*CLKS_PER_BIT cycles. The frame format and baud
// rate follow the document; the handshake is this design's own.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       s_tvalid,
  input  logic [7:0] s_tdata,
  output logic       s_tready,
  output logic       txd
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [10:0]   frame;     // bits still to send, LSB first
  logic [3:0]    bits_left;
  logic [CW-1:0] cnt;
  logic          busy;

  assign s_tready = !busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      txd       <= 1'b1;
      frame     <= '1;
      bits_left <= '0;
      cnt       <= '0;
    end else if (!busy) begin
      txd <= 1'b1;
      if (s_tvalid) begin
        // {stop, parity, data, start}; transmitted from bit 0 upward
        frame     <= {1'b1, ~(^s_tdata), s_tdata, 1'b0};
        txd       <= 1'b0;
        bits_left <= 4'd11;
        cnt       <= '0;
        busy      <= 1'b1;
      end
    end else begin
      if (cnt == CW'(CLKS_PER_BIT - 1)) begin
        cnt       <= '0;
        bits_left <= bits_left - 4'd1;
        frame     <= {1'b1, frame[10:1]};
        if (bits_left == 4'd1) begin
          busy <= 1'b0;
          txd  <= 1'b1;
        end else begin
          txd <= frame[1];
        end
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
