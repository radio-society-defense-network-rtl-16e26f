// trigger_detector: detects the start of an FM transmission from the ADC
// sample stream.
//
// The last DEPTH samples are kept in a ring buffer (a block RAM with one
// write and one registered read port). After each new sample the whole ring
// is read back, one entry per cycle, to find its minimum and maximum. Their
// difference is a crude envelope of the demodulated audio: on an idle channel
// the discriminator outputs loud noise, and when a carrier captures the
// receiver the noise collapses ("FM quieting"), so the range drops sharply.
// A Schmitt trigger on the range turns this into a one-cycle trigger pulse:
// the detector becomes "noisy" when range > HIGH_THRESH and, once noisy,
// fires when range < LOW_THRESH and becomes "quiet" again.
//
// Timing: the scan takes DEPTH + 2 cycles after a sample (52 with the
// default), far less than the 1900-cycle sample period; range_valid and a
// possible trigger come at the end of the scan. Nothing is evaluated until
// DEPTH samples have been written after reset, and the detector starts in
// the quiet state, so a transmission already present at reset is not
// reported. The ring depth of 50 and the min/max + Schmitt method follow the
// document; the thresholds, the start-up behaviour and the serial scan are
// this design's own choices.
module trigger_detector #(
  parameter int unsigned SW          = 10,   // sample width
  parameter int unsigned DEPTH       = 50,   // ring buffer length (samples)
  parameter int unsigned LOW_THRESH  = 64,   // range below this: carrier present
  parameter int unsigned HIGH_THRESH = 256   // range above this: channel noisy
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          s_tvalid,
  input  logic [SW-1:0] s_tdata,
  output logic          trigger,       // one-cycle pulse
  output logic          noisy,         // Schmitt trigger state
  output logic          range_valid,   // one-cycle pulse after each scan
  output logic [SW-1:0] range_out      // max - min of the ring
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [SW-1:0] ring [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic [SW-1:0] rd_data;
  logic          scanning, rd_valid;
  logic          last_rd, last_q;
  logic [SW-1:0] mn, mx;
  logic [AW:0]   fill;      // samples written since reset, saturating at DEPTH

  // ring buffer RAM
  always_ff @(posedge clk) begin
    if (s_tvalid) ring[wr_ptr] <= s_tdata;
    rd_data <= ring[rd_ptr];
  end

  assign last_rd = (rd_ptr == AW'(DEPTH - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr      <= '0;
      rd_ptr      <= '0;
      fill        <= '0;
      scanning    <= 1'b0;
      rd_valid    <= 1'b0;
      last_q      <= 1'b0;
      mn          <= '1;
      mx          <= '0;
      noisy       <= 1'b0;
      trigger     <= 1'b0;
      range_valid <= 1'b0;
      range_out   <= '0;
    end else begin
      trigger     <= 1'b0;
      range_valid <= 1'b0;
      rd_valid    <= 1'b0;
      last_q      <= 1'b0;

      if (s_tvalid) begin
        wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
        if (fill != (AW + 1)'(DEPTH)) fill <= fill + 1'b1;
        // start (or restart) a scan once the new sample has been written
        scanning <= 1'b1;
        rd_ptr   <= '0;
        mn       <= '1;
        mx       <= '0;
      end else if (scanning) begin
        rd_valid <= 1'b1;
        last_q   <= last_rd;
        if (last_rd) scanning <= 1'b0;
        else         rd_ptr   <= rd_ptr + 1'b1;
      end

      // min / max over the data coming out of the RAM
      if (rd_valid && !s_tvalid) begin
        if (rd_data < mn) mn <= rd_data;
        if (rd_data > mx) mx <= rd_data;
      end

      // end of scan: range and Schmitt trigger
      if (rd_valid && last_q && !s_tvalid && fill == (AW + 1)'(DEPTH)) begin
        logic [SW-1:0] fmin, fmax, rng;
        fmin = (rd_data < mn) ? rd_data : mn;
        fmax = (rd_data > mx) ? rd_data : mx;
        rng  = fmax - fmin;
        range_out   <= rng;
        range_valid <= 1'b1;
        if (!noisy && rng > SW'(HIGH_THRESH)) begin
          noisy <= 1'b1;
        end else if (noisy && rng < SW'(LOW_THRESH)) begin
          noisy   <= 1'b0;
          trigger <= 1'b1;
        end
      end
    end
  end

  initial assert (LOW_THRESH < HIGH_THRESH)
    else $error("trigger_detector: LOW_THRESH must be below HIGH_THRESH");

endmodule
