// uart_reporter: exports each classification and its recorded capture over
// the UART so that a computer can store and plot keyup signatures.
//
// On a `start` pulse (the classification result) it sends, through uart_tx:
//   0xA5 (frame marker), the identified radio's index, then the N capture
//   samples as two bytes each: {6'b0, sample[9:8]} then sample[7:0].
// It reads the capture buffer through its own address/data pair (data one
// cycle after the address), so it must own the buffer's read port while
// `busy`. When the last frame has left the UART pin it raises `done`,
// which stays high until the next start; the capture buffer can then be
// released. With the defaults one export is 2 + 2*2048 bytes, 11 bits each at
// 868 clocks per bit: about 39 M cycles (0.39 s at 100 MHz). Sending the
// capture and the result over the UART follows the document; the framing
// (marker byte, byte order) is this design's own.
module uart_reporter #(
  parameter int unsigned N            = 2048,
  parameter int unsigned SW           = 10,
  parameter int unsigned CLKS_PER_BIT = 868,
  parameter logic [7:0]  MARKER       = 8'hA5
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  logic [7:0]           result,
  output logic [$clog2(N)-1:0] cap_rd_addr,
  input  logic [SW-1:0]        cap_rd_data,
  output logic                 busy,
  output logic                 done,
  output logic                 txd
);

  localparam int unsigned NA = $clog2(N);

  typedef enum logic [2:0] {R_IDLE, R_MARK, R_RES, R_READ, R_HI, R_LO, R_FLUSH} state_t;
  state_t state;

  logic          u_valid, u_ready;
  logic [7:0]    u_data;
  logic [NA-1:0] idx;
  logic [SW-1:0] sample;
  logic          rd_wait;

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk, .rst,
    .s_tvalid(u_valid), .s_tdata(u_data), .s_tready(u_ready),
    .txd
  );

  assign busy = (state != R_IDLE);

  always_comb begin
    u_valid = 1'b0;
    u_data  = 8'h00;
    case (state)
      R_MARK: begin u_valid = 1'b1; u_data = MARKER; end
      R_RES:  begin u_valid = 1'b1; u_data = result; end
      R_HI:   begin u_valid = 1'b1; u_data = 8'(sample >> 8); end
      R_LO:   begin u_valid = 1'b1; u_data = sample[7:0]; end
      R_FLUSH: u_data = 8'h00;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= R_IDLE;
      done        <= 1'b0;
      idx         <= '0;
      cap_rd_addr <= '0;
      sample      <= '0;
      rd_wait     <= 1'b0;
    end else begin
      case (state)
        R_IDLE: if (start) begin
          done  <= 1'b0;
          idx   <= '0;
          state <= R_MARK;
        end
        R_MARK: if (u_ready) state <= R_RES;
        R_RES:  if (u_ready) begin
          cap_rd_addr <= idx;
          rd_wait     <= 1'b1;
          state       <= R_READ;
        end
        R_READ: begin
          // address was set last cycle; data valid now+1
          if (rd_wait) rd_wait <= 1'b0;
          else begin
            sample <= cap_rd_data;
            state  <= R_HI;
          end
        end
        R_HI: if (u_ready) state <= R_LO;
        R_LO: if (u_ready) begin
          if (idx == NA'(N - 1)) begin
            state <= R_FLUSH;
          end else begin
            idx         <= idx + 1'b1;
            cap_rd_addr <= idx + 1'b1;
            rd_wait     <= 1'b1;
            state       <= R_READ;
          end
        end
        // wait until the last frame has left the pin
        R_FLUSH: if (u_ready) begin
          done  <= 1'b1;
          state <= R_IDLE;
        end
        default: state <= R_IDLE;
      endcase
    end
  end

endmodule
