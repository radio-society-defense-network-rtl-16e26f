// rsdn_top: real-time FM transceiver fingerprinting system for an amateur
// radio repeater.
//
// Data path: the MCP3008 ADC is sampled at 52.63 kSps (mcp3008_adc). Every
// sample enters the trigger detector, which recognises the onset of a
// transmission from the collapse of receiver noise, and the capture buffer,
// which records the N samples that follow a trigger. When the capture is
// complete the filter manager broadcasts it to NF matched filters in
// parallel, each holding one radio's fingerprint; each filter returns a
// similarity score and the lowest score names the radio. The result drives
// tx_enable (low for a banned radio), a one-hot LED display and a debug SPI
// dump of all scores; the UART reporter then sends the result and the raw
// capture to a computer, after which the capture buffer is re-armed.
//
// Boot: after reset the SD controller CPU (sd_cpu running the firmware in
// sd_rom) initialises the microSD card and reads NF*M*2 bytes from card
// address 0, which the filter manager distributes to the filters as 16-bit
// fingerprint samples. Classification waits until this has finished.
//
// The capture buffer has one read port: the filter manager owns it during
// its passes (cap_reading), the UART reporter otherwise. The buffer is
// released when the manager has finished (hold) and the reporter is done.
//
// The SD card's four SPI lines are also copied to sd_mirror so that a logic
// analyser can decode the card traffic, as the document did while bringing
// the controller up.
//
// Defaults: 10 filters, 2048-sample captures, 512-sample fingerprints, a
// 100 MHz clock. The filter count and the sampling, SPI and UART rates follow
// the document; the capture and fingerprint lengths, BANNED and all framing
// are this design's own choices.
module rsdn_top
  import rsdn_pkg::*;
#(
  parameter int unsigned   NF            = 10,
  parameter int unsigned   N             = 2048,
  parameter int unsigned   M             = 512,
  parameter logic [NF-1:0] BANNED        = NF'(1),
  parameter int unsigned   SAMPLE_PERIOD = 1900,
  parameter int unsigned   ADC_SPI_HALF  = 5,
  parameter int unsigned   CLKS_PER_BIT  = 868,
  parameter int unsigned   LOW_THRESH    = 64,
  parameter int unsigned   HIGH_THRESH   = 256,
  parameter bit            SD_BLOCK_ADDR = 1'b0,
  parameter int unsigned   SD_SLOW_HALF  = 125,
  parameter int unsigned   SD_FAST_HALF  = 2
) (
  input  logic                clk,
  input  logic                rst,
  // MCP3008 ADC
  output logic                adc_sclk,
  output logic                adc_mosi,
  input  logic                adc_miso,
  output logic                adc_cs_n,
  // microSD card (SPI mode)
  output logic                sd_sclk,
  output logic                sd_mosi,
  input  logic                sd_miso,
  output logic                sd_cs_n,
  output logic [3:0]          sd_mirror,     // {cs_n, sclk, mosi, miso} to a header
  // UART to a computer
  output logic                uart_txd,
  // debug SPI score port
  output logic                dbg_sclk,
  output logic                dbg_mosi,
  output logic                dbg_cs_n,
  // repeater controller and indicators
  output logic                tx_enable,
  output logic                trigger_out,
  output logic [NF-1:0]       led_id,
  output logic [7:0]          led_sd,
  output logic                fingerprints_loaded,
  output logic                result_valid,
  output logic [7:0]          best_idx,
  output logic [SCORE_W-1:0]  best_score
);

  localparam int unsigned SW = 10;
  localparam int unsigned FW = 16;
  localparam int unsigned NUM_BLOCKS = (NF * M * 2 + 511) / 512;

  // ADC samples
  logic          smp_valid;
  logic [SW-1:0] smp;

  mcp3008_adc #(.SAMPLE_PERIOD(SAMPLE_PERIOD), .SPI_HALF(ADC_SPI_HALF)) u_adc (
    .clk, .rst,
    .m_tvalid(smp_valid), .m_tdata(smp),
    .adc_sclk, .adc_mosi, .adc_miso, .adc_cs_n
  );

  // trigger
  logic          trig, noisy, rng_valid;
  logic [SW-1:0] rng;

  trigger_detector #(.SW(SW), .DEPTH(50), .LOW_THRESH(LOW_THRESH),
                     .HIGH_THRESH(HIGH_THRESH)) u_trig (
    .clk, .rst,
    .s_tvalid(smp_valid), .s_tdata(smp),
    .trigger(trig), .noisy, .range_valid(rng_valid), .range_out(rng)
  );

  assign trigger_out = trig;

  // capture buffer
  logic                 cap_full, cap_recording, cap_release;
  logic [$clog2(N)-1:0] cap_addr, mgr_addr, rep_addr;
  logic [SW-1:0]        cap_data;
  logic                 mgr_reading, mgr_hold;

  capture_buffer #(.SW(SW), .N(N)) u_cap (
    .clk, .rst,
    .s_tvalid(smp_valid), .s_tdata(smp), .trigger(trig),
    .release_buf(cap_release), .recording(cap_recording), .full(cap_full),
    .rd_addr(cap_addr), .rd_data(cap_data)
  );

  assign cap_addr = mgr_reading ? mgr_addr : rep_addr;

  // SD card controller
  logic [7:0]  rom_addr;
  logic [31:0] rom_data;
  logic        sd_valid, sd_ready, sd_done;
  logic [7:0]  sd_byte;

  sd_rom #(.NUM_BLOCKS(NUM_BLOCKS), .BLOCK_ADDR(SD_BLOCK_ADDR)) u_rom (
    .clk, .rom_addr, .rom_data
  );

  sd_cpu #(.SLOW_HALF(SD_SLOW_HALF), .FAST_HALF(SD_FAST_HALF)) u_sd (
    .clk, .rst, .rom_addr, .rom_data,
    .sd_sclk, .sd_mosi, .sd_miso, .sd_cs_n,
    .m_tvalid(sd_valid), .m_tdata(sd_byte), .m_tready(sd_ready),
    .led(led_sd), .done(sd_done)
  );

  // copy of the card's SPI lines for a logic analyser
  assign sd_mirror = {sd_cs_n, sd_sclk, sd_mosi, sd_miso};

  // filter manager and filters
  logic [NF-1:0]               fp_we;
  logic [$clog2(M)-1:0]        fp_waddr;
  logic signed [FW-1:0]        fp_wdata;
  logic                        filt_start, st_valid, st_last;
  logic [SW-1:0]               st_sample;
  phase_t                      st_phase;
  logic [NF-1:0]               score_valid;
  logic [NF-1:0][SCORE_W-1:0]  scores;

  filter_manager #(.NF(NF), .N(N), .M(M), .SW(SW), .FW(FW), .BANNED(BANNED)) u_mgr (
    .clk, .rst,
    .s_tvalid(sd_valid), .s_tdata(sd_byte), .s_tready(sd_ready),
    .fp_we, .fp_waddr, .fp_wdata, .loaded(fingerprints_loaded),
    .cap_full(cap_full && fingerprints_loaded), .cap_rd_addr(mgr_addr),
    .cap_rd_data(cap_data), .cap_reading(mgr_reading), .hold(mgr_hold),
    .filt_start, .st_valid, .st_sample, .st_phase, .st_last,
    .score_valid, .scores,
    .result_valid, .best_idx, .best_score, .tx_enable, .led_id,
    .dbg_sclk, .dbg_mosi, .dbg_cs_n
  );

  for (genvar f = 0; f < NF; f++) begin : g_filt
    logic signed [SCORE_W-1:0]       dot;
    logic [$clog2(N-M+1)-1:0]        lag;
    logic [SW-1:0]                   mean;
    matched_filter #(.N(N), .M(M), .SW(SW), .FW(FW)) u_mf (
      .clk, .rst,
      .fp_we(fp_we[f]), .fp_waddr, .fp_wdata,
      .start(filt_start), .st_valid, .st_sample, .st_phase, .st_last,
      .score_valid(score_valid[f]), .score(scores[f]),
      .best_dot(dot), .best_lag(lag), .mean_out(mean)
    );
  end

  // UART export
  logic rep_busy, rep_done;

  uart_reporter #(.N(N), .SW(SW), .CLKS_PER_BIT(CLKS_PER_BIT)) u_rep (
    .clk, .rst,
    .start(result_valid), .result(best_idx),
    .cap_rd_addr(rep_addr), .cap_rd_data(cap_data),
    .busy(rep_busy), .done(rep_done), .txd(uart_txd)
  );

  assign cap_release = mgr_hold && rep_done && !rep_busy;

endmodule
