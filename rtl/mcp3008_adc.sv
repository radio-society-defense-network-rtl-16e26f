// mcp3008_adc: periodic sampler for an MCP3008 10-bit SPI ADC.
//
// Every SAMPLE_PERIOD clock cycles the module pulls CS low and runs one
// 17-bit SPI transaction through spi_controller: a leading 0, the start bit,
// the single-ended/differential bit and the 3-bit channel number, then
// eleven don't-care bits during which the converter returns a null bit and
// the 10-bit result, MSB first. The last ten bits received are the sample,
// which leaves on m_tvalid/m_tdata for one cycle (no back-pressure).
//
// With the defaults (100 MHz clock, SCLK half period of 5 cycles = 10 MHz,
// SAMPLE_PERIOD = 1900) a transaction lasts 170 cycles and samples leave at
// 100 MHz / 1900 = 52.63 kSps. The 17-bit transaction, the 10 MHz SPI clock
// and the sampling rate follow the document; fixing the rate with a separate
// sample timer, the channel and CS timing are this design's own choices.
module mcp3008_adc #(
  parameter int unsigned SAMPLE_PERIOD = 1900,  // clk cycles per sample
  parameter int unsigned SPI_HALF      = 5,     // SCLK half period, clk cycles
  parameter int unsigned CS_SETUP      = 5,     // cycles from CS low to first SCLK
  parameter logic [2:0]  CHANNEL       = 3'd0,
  parameter bit          SINGLE_ENDED  = 1'b1
) (
  input  logic       clk,
  input  logic       rst,
  output logic       m_tvalid,
  output logic [9:0] m_tdata,
  // SPI pins to the ADC
  output logic       adc_sclk,
  output logic       adc_mosi,
  input  logic       adc_miso,
  output logic       adc_cs_n
);

  localparam int unsigned XFER_BITS = 17;
  localparam int unsigned TW = $clog2(SAMPLE_PERIOD + 1);

  typedef enum logic [1:0] {A_WAIT, A_SETUP, A_XFER} state_t;
  state_t state;

  logic [TW-1:0]        period_cnt;
  logic [15:0]          setup_cnt;
  logic                 spi_valid, spi_ready, rx_valid;
  logic [XFER_BITS-1:0] rx_word;

  // 0, start, SGL/DIFF, D2..D0, then 11 don't-care bits
  localparam logic [XFER_BITS-1:0] CMD_WORD =
      {1'b0, 1'b1, SINGLE_ENDED, CHANNEL, 11'b0};

  spi_controller #(.WIDTH(XFER_BITS)) u_spi (
    .clk, .rst,
    .half_period(16'(SPI_HALF)),
    .s_tvalid(spi_valid), .s_tdata(CMD_WORD), .s_tready(spi_ready),
    .m_tvalid(rx_valid), .m_tdata(rx_word),
    .sclk(adc_sclk), .mosi(adc_mosi), .miso(adc_miso)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      period_cnt <= '0;
      state      <= A_WAIT;
      setup_cnt  <= '0;
      adc_cs_n   <= 1'b1;
      spi_valid  <= 1'b0;
      m_tvalid   <= 1'b0;
      m_tdata    <= '0;
    end else begin
      m_tvalid  <= 1'b0;
      spi_valid <= 1'b0;
      period_cnt <= (period_cnt == TW'(SAMPLE_PERIOD - 1)) ? '0 : period_cnt + 1'b1;
      case (state)
        A_WAIT: if (period_cnt == '0) begin
          adc_cs_n  <= 1'b0;
          setup_cnt <= '0;
          state     <= A_SETUP;
        end
        A_SETUP: begin
          setup_cnt <= setup_cnt + 16'd1;
          if (setup_cnt == 16'(CS_SETUP - 1) && spi_ready) begin
            spi_valid <= 1'b1;
            state     <= A_XFER;
          end
        end
        A_XFER: if (rx_valid) begin
          adc_cs_n <= 1'b1;
          m_tvalid <= 1'b1;
          m_tdata  <= rx_word[9:0];
          state    <= A_WAIT;
        end
        default: state <= A_WAIT;
      endcase
    end
  end

  initial assert (SAMPLE_PERIOD > CS_SETUP + 2 * SPI_HALF * XFER_BITS + 4)
    else $error("mcp3008_adc: SAMPLE_PERIOD too short for one transaction");

endmodule
