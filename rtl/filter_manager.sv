// filter_manager: control FSM around the bank of matched filters.
//
// Boot: the bytes read from the SD card arrive on s_tvalid/s_tdata. Pairs of
// bytes (high byte first) form signed 16-bit fingerprint samples; sample w
// goes to filter w / M at address w % M over the shared fp_* write bus, with
// fp_we one-hot. After NF*M samples `loaded` rises; further bytes are dropped.
//
// Classification: when the capture buffer is full (and the fingerprints are
// loaded) the manager pulses filt_start and reads the capture buffer to
// broadcast it to every filter in three passes (PH_MEAN: all N samples;
// PH_CORR: for each lag k = 0..N-M the window capture[k..k+M-1]; PH_ALIGN: all
// N samples), one sample per clock. The read address is registered and the
// capture buffer's data arrive one cycle after it, so a sample leaves on the
// stream two cycles after its address was formed. It then waits until every filter's score_valid is high, scans the
// scores for the lowest one (lowest index on a tie), and pulses result_valid
// with best_idx and best_score. tx_enable goes low while the last identified
// radio is marked in BANNED, and led_id shows the identified radio one-hot.
//
// Debug port: after each classification all NF scores are sent MSB first,
// SCORE_W/8 bytes each, over a write-only SPI port with dbg_cs_n low for the
// whole dump. The manager then holds (hold = 1) until the capture buffer is
// released, and re-arms when `full` drops.
//
// Timing with the defaults: N + (N-M+1)*M + N + about 8 cycles of passes
// (790 k cycles, 7.9 ms at 100 MHz) plus NF cycles for the minimum search.
// The lowest-score rule, the transmit-enable output, the LEDs and the debug
// SPI port follow the document; the byte order, the pass structure, the
// tie rule and the dump format are this design's own.
module filter_manager
  import rsdn_pkg::*;
#(
  parameter int unsigned NF       = 10,     // number of matched filters
  parameter int unsigned N        = 2048,   // capture length
  parameter int unsigned M        = 512,    // fingerprint length
  parameter int unsigned SW       = 10,     // capture sample width
  parameter int unsigned FW       = 16,     // fingerprint sample width
  parameter logic [NF-1:0] BANNED = '0,     // radios denied the repeater
  parameter int unsigned DBG_HALF = 5       // debug SPI SCLK half period
) (
  input  logic                        clk,
  input  logic                        rst,
  // fingerprint bytes from the SD card controller
  input  logic                        s_tvalid,
  input  logic [7:0]                  s_tdata,
  output logic                        s_tready,
  // fingerprint write bus to the filters
  output logic [NF-1:0]               fp_we,
  output logic [$clog2(M)-1:0]        fp_waddr,
  output logic signed [FW-1:0]        fp_wdata,
  output logic                        loaded,
  // capture buffer
  input  logic                        cap_full,
  output logic [$clog2(N)-1:0]        cap_rd_addr,
  input  logic [SW-1:0]               cap_rd_data,
  output logic                        cap_reading,  // manager owns the read port
  output logic                        hold,         // done, waiting for release
  // stream to the filters
  output logic                        filt_start,
  output logic                        st_valid,
  output logic [SW-1:0]               st_sample,
  output phase_t                      st_phase,
  output logic                        st_last,
  // results from the filters
  input  logic [NF-1:0]               score_valid,
  input  logic [NF-1:0][SCORE_W-1:0]  scores,
  // classification
  output logic                        result_valid,
  output logic [7:0]                  best_idx,
  output logic [SCORE_W-1:0]          best_score,
  output logic                        tx_enable,
  output logic [NF-1:0]               led_id,
  // debug SPI score port
  output logic                        dbg_sclk,
  output logic                        dbg_mosi,
  output logic                        dbg_cs_n
);

  localparam int unsigned MA  = $clog2(M);
  localparam int unsigned NA  = $clog2(N);
  localparam int unsigned LW  = $clog2(N - M + 2);
  localparam int unsigned FI  = clog2_min1(NF);
  localparam int unsigned SB  = SCORE_W / 8;          // bytes per score
  localparam int unsigned BW  = $clog2(SB + 1);

  typedef enum logic [3:0] {
    M_LOAD, M_IDLE, M_MEAN, M_CORR, M_ALIGN, M_WAIT, M_PICK, M_DBG, M_HOLD
  } state_t;
  state_t state;

  // ---------------------------------------------------------- loading
  logic          byte_phase;   // 0: expecting high byte
  logic [7:0]    hi_byte;
  logic [FI-1:0] ld_filt;
  logic [MA-1:0] ld_addr;

  assign s_tready = 1'b1;

  // ---------------------------------------------------------- streaming
  logic [NA-1:0] k;            // capture address within pass / window
  logic [LW-1:0] lag;
  logic          a_valid, a_last, b_valid, b_last;
  phase_t        a_phase, b_phase;

  // ---------------------------------------------------------- picking
  logic [FI-1:0]        pick_i;
  logic [SCORE_W-1:0]   min_score;
  logic [FI-1:0]        min_idx;

  // ---------------------------------------------------------- debug SPI
  logic          dbg_valid, dbg_ready, dbg_rx_valid;
  logic [7:0]    dbg_byte, dbg_rx;
  logic [FI-1:0] dbg_filt;
  logic [BW-1:0] dbg_b;
  logic          dbg_wait;

  spi_controller #(.WIDTH(8)) u_dbg_spi (
    .clk, .rst,
    .half_period(16'(DBG_HALF)),
    .s_tvalid(dbg_valid), .s_tdata(dbg_byte), .s_tready(dbg_ready),
    .m_tvalid(dbg_rx_valid), .m_tdata(dbg_rx),
    .sclk(dbg_sclk), .mosi(dbg_mosi), .miso(1'b0)
  );

  always_comb begin
    logic [SCORE_W-1:0] s;
    s        = scores[dbg_filt];
    dbg_byte = s[SCORE_W - 8*dbg_b - 1 -: 8];
  end

  assign cap_reading = (state == M_MEAN) || (state == M_CORR) || (state == M_ALIGN);
  assign hold        = (state == M_HOLD);

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= M_LOAD;
      byte_phase   <= 1'b0;
      hi_byte      <= '0;
      ld_filt      <= '0;
      ld_addr      <= '0;
      fp_we        <= '0;
      fp_waddr     <= '0;
      fp_wdata     <= '0;
      loaded       <= 1'b0;
      k            <= '0;
      lag          <= '0;
      a_valid      <= 1'b0;
      a_last       <= 1'b0;
      a_phase      <= PH_MEAN;
      b_valid      <= 1'b0;
      b_last       <= 1'b0;
      b_phase      <= PH_MEAN;
      st_valid     <= 1'b0;
      st_sample    <= '0;
      st_phase     <= PH_MEAN;
      st_last      <= 1'b0;
      cap_rd_addr  <= '0;
      filt_start   <= 1'b0;
      pick_i       <= '0;
      min_score    <= '0;
      min_idx      <= '0;
      result_valid <= 1'b0;
      best_idx     <= '0;
      best_score   <= '0;
      tx_enable    <= 1'b1;
      led_id       <= '0;
      dbg_valid    <= 1'b0;
      dbg_filt     <= '0;
      dbg_b        <= '0;
      dbg_wait     <= 1'b0;
      dbg_cs_n     <= 1'b1;
    end else begin
      fp_we        <= '0;
      filt_start   <= 1'b0;
      result_valid <= 1'b0;
      dbg_valid    <= 1'b0;
      a_valid      <= 1'b0;
      a_last       <= 1'b0;

      // the address is registered (a_*) and the capture buffer's read data
      // arrive one cycle after it (b_*): the tags follow two cycles behind
      b_valid   <= a_valid;
      b_last    <= a_last;
      b_phase   <= a_phase;
      st_valid  <= b_valid;
      st_last   <= b_last;
      st_phase  <= b_phase;
      st_sample <= cap_rd_data;

      case (state)
        M_LOAD: if (s_tvalid) begin
          byte_phase <= !byte_phase;
          if (!byte_phase) begin
            hi_byte <= s_tdata;
          end else begin
            fp_we[ld_filt] <= 1'b1;
            fp_waddr       <= ld_addr;
            fp_wdata       <= FW'($signed({hi_byte, s_tdata}));
            ld_addr        <= ld_addr + 1'b1;
            if (ld_addr == MA'(M - 1)) begin
              ld_addr <= '0;
              if (ld_filt == FI'(NF - 1)) begin
                loaded <= 1'b1;
                state  <= M_IDLE;
              end else begin
                ld_filt <= ld_filt + 1'b1;
              end
            end
          end
        end

        M_IDLE: if (cap_full) begin
          filt_start  <= 1'b1;
          k           <= '0;
          cap_rd_addr <= '0;
          state       <= M_MEAN;
        end

        M_MEAN: begin
          a_valid     <= 1'b1;
          a_phase     <= PH_MEAN;
          cap_rd_addr <= k;
          if (k == NA'(N - 1)) begin
            a_last <= 1'b1;
            k      <= '0;
            lag    <= '0;
            state  <= M_CORR;
          end else begin
            k <= k + 1'b1;
          end
        end

        M_CORR: begin
          a_valid     <= 1'b1;
          a_phase     <= PH_CORR;
          cap_rd_addr <= NA'(lag) + k;
          if (k == NA'(M - 1)) begin
            a_last <= 1'b1;
            k      <= '0;
            if (lag == LW'(N - M)) state <= M_ALIGN;
            else                   lag   <= lag + 1'b1;
          end else begin
            k <= k + 1'b1;
          end
        end

        M_ALIGN: begin
          a_valid     <= 1'b1;
          a_phase     <= PH_ALIGN;
          cap_rd_addr <= k;
          if (k == NA'(N - 1)) begin
            a_last <= 1'b1;
            k      <= '0;
            state  <= M_WAIT;
          end else begin
            k <= k + 1'b1;
          end
        end

        M_WAIT: if (&score_valid) begin
          pick_i    <= '0;
          min_score <= '1;
          min_idx   <= '0;
          state     <= M_PICK;
        end

        M_PICK: begin
          logic [FI-1:0] idx;
          idx = min_idx;
          if (pick_i == '0 || scores[pick_i] < min_score) begin
            idx       = pick_i;
            min_score <= scores[pick_i];
            min_idx   <= pick_i;
          end
          if (pick_i == FI'(NF - 1)) begin
            result_valid <= 1'b1;
            best_idx     <= 8'(idx);
            best_score   <= (pick_i == '0 || scores[pick_i] < min_score) ? scores[pick_i] : min_score;
            tx_enable    <= !BANNED[idx];
            led_id       <= NF'(1) << idx;
            dbg_filt     <= '0;
            dbg_b        <= '0;
            dbg_wait     <= 1'b0;
            dbg_cs_n     <= 1'b0;
            state        <= M_DBG;
          end else begin
            pick_i <= pick_i + 1'b1;
          end
        end

        M_DBG: begin
          if (!dbg_wait && dbg_ready) begin
            dbg_valid <= 1'b1;
            dbg_wait  <= 1'b1;
          end else if (dbg_wait && dbg_rx_valid) begin
            dbg_wait <= 1'b0;
            if (dbg_b == BW'(SB - 1)) begin
              dbg_b <= '0;
              if (dbg_filt == FI'(NF - 1)) begin
                dbg_cs_n <= 1'b1;
                state    <= M_HOLD;
              end else begin
                dbg_filt <= dbg_filt + 1'b1;
              end
            end else begin
              dbg_b <= dbg_b + 1'b1;
            end
          end
        end

        M_HOLD: if (!cap_full) state <= M_IDLE;

        default: state <= M_IDLE;
      endcase
    end
  end

  initial begin
    assert (M < N) else $error("filter_manager: M must be below N");
    assert (SCORE_W % 8 == 0) else $error("filter_manager: score width must be whole bytes");
  end

endmodule
