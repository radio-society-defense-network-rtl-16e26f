// spi_controller: SPI master (mode 0) that shifts one WIDTH-bit word out on
// MOSI while shifting WIDTH bits in from MISO.
//
// A word is accepted from the input stream (s_tvalid/s_tdata) whenever
// s_tready is high; s_tready is the "axiready" flag: high while the controller
// is idle, i.e. once the previous word has been fully shifted. MOSI is updated
// on the falling edge of SCLK (and before the first rising edge), so the line
// has half a clock period to settle before the slave samples it on the rising
// edge; MISO is sampled on the rising edge. Bits go MSB first. When the last
// falling edge has been produced the received word is presented for one
// cycle on m_tvalid/m_tdata (there is no back-pressure on the output).
//
// SCLK runs at clk / (2*half_period); half_period is an input so that one
// instance can change speed at run time (the SD card needs a slow clock while
// it is initialised). Chip select is left to the user of the controller,
// because the ADC and the SD card handle it differently.
//
// Timing: a word takes 2*half_period*WIDTH cycles from acceptance to m_tvalid.
// The choice of SPI mode 0 and the stream interface follow the description of
// a shift-out/shift-in FSM on an AXI-style bus; the exact handshake is this
// design's own.
module spi_controller #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [15:0]      half_period,   // SCLK half period in clk cycles (>= 1)
  // word to send
  input  logic             s_tvalid,
  input  logic [WIDTH-1:0] s_tdata,
  output logic             s_tready,
  // word received
  output logic             m_tvalid,
  output logic [WIDTH-1:0] m_tdata,
  // SPI pins
  output logic             sclk,
  output logic             mosi,
  input  logic             miso
);

  typedef enum logic [1:0] {S_IDLE, S_LOW, S_HIGH} state_t;
  state_t state;

  logic [WIDTH-1:0] tx_sr, rx_sr;
  logic [15:0]      timer;
  logic [$clog2(WIDTH+1)-1:0] bitcnt;

  assign s_tready = (state == S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      sclk     <= 1'b0;
      mosi     <= 1'b1;
      tx_sr    <= '0;
      rx_sr    <= '0;
      timer    <= '0;
      bitcnt   <= '0;
      m_tvalid <= 1'b0;
      m_tdata  <= '0;
    end else begin
      m_tvalid <= 1'b0;
      case (state)
        S_IDLE: begin
          sclk <= 1'b0;
          if (s_tvalid) begin
            tx_sr  <= s_tdata;
            mosi   <= s_tdata[WIDTH-1];
            bitcnt <= '0;
            timer  <= 16'd1;
            state  <= S_LOW;
          end
        end
        S_LOW: begin
          if (timer >= half_period) begin
            timer <= 16'd1;
            sclk  <= 1'b1;                      // rising edge: sample MISO
            rx_sr <= {rx_sr[WIDTH-2:0], miso};
            state <= S_HIGH;
          end else begin
            timer <= timer + 16'd1;
          end
        end
        S_HIGH: begin
          if (timer >= half_period) begin
            timer <= 16'd1;
            sclk  <= 1'b0;                      // falling edge: next MOSI bit
            if (bitcnt == $bits(bitcnt)'(WIDTH - 1)) begin
              m_tvalid <= 1'b1;
              m_tdata  <= rx_sr;
              mosi     <= 1'b1;
              state    <= S_IDLE;
            end else begin
              bitcnt <= bitcnt + 1'b1;
              tx_sr  <= {tx_sr[WIDTH-2:0], 1'b0};
              mosi   <= tx_sr[WIDTH-2];
              state  <= S_LOW;
            end
          end else begin
            timer <= timer + 16'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial assert (WIDTH >= 2) else $error("spi_controller: WIDTH must be at least 2");

endmodule
