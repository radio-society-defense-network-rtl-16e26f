// tb_rsdn_top: end-to-end test of the whole fingerprinting system at reduced sizes (4 filters, 256-sample captures, 128-sample fingerprints, fast UART and sampling).
//
// The testbench provides the outside world: an MCP3008 model whose input is a
// synthetic receiver output, a microSD card model holding one fingerprint per
// filter (16-bit big-endian samples from address 0), a UART receiver and a
// debug SPI receiver. Radio r's keyup is modelled as decaying oscillations
// with its own period and decay; its fingerprint is the same waveform with
// its mean removed. The receiver output is loud noise while the channel is
// idle; a keyup is quiet carrier for 70 samples, then the radio's waveform,
// then quiet carrier, all with a little noise.
//
// For every keyup the test checks: the identified radio, tx_enable (low only
// for a banned radio), the one-hot LEDs, the UART export (marker, result and
// a capture equal to N consecutive samples sent to the ADC shortly after the
// keyup), and every filter's score in the debug SPI dump against a reference
// computed here from the exported capture and the fingerprints. It counts how
// often each mechanism happened (SD card busy retries, fingerprint loading,
// Schmitt trigger arming, triggers, completed captures, classifications,
// banned and allowed radios, UART exports, debug dumps, buffer re-arming)
// and counts a failure for any that never happened.
module tb_rsdn_top;
  import rsdn_pkg::*;
  localparam int NF = 4, N = 256, M = 128, CPB = 8;
  localparam logic [NF-1:0] BANNED = 4'b0001;
  localparam int KEYUPS = 3;
  localparam int RADIOS [KEYUPS] = '{0, 2, 3};

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic adc_sclk, adc_mosi, adc_miso, adc_cs_n;
  logic sd_sclk, sd_mosi, sd_miso, sd_cs_n;
  logic [3:0] sd_mirror;
  logic uart_txd, dbg_sclk, dbg_mosi, dbg_cs_n;
  logic tx_enable, trigger_out, fingerprints_loaded, result_valid;
  logic [NF-1:0] led_id;
  logic [7:0]    led_sd, best_idx;
  logic [SCORE_W-1:0] best_score;

  rsdn_top #(.NF(NF), .N(N), .M(M), .BANNED(BANNED), .SAMPLE_PERIOD(400), .CLKS_PER_BIT(CPB),
             .SD_SLOW_HALF(4), .SD_FAST_HALF(2)) dut (
    .clk, .rst, .adc_sclk, .adc_mosi, .adc_miso, .adc_cs_n,
    .sd_sclk, .sd_mosi, .sd_miso, .sd_cs_n, .sd_mirror, .uart_txd, .dbg_sclk, .dbg_mosi, .dbg_cs_n,
    .tx_enable, .trigger_out, .led_id, .led_sd, .fingerprints_loaded, .result_valid,
    .best_idx, .best_score);

  // ------------------------------------------------------------ outside world
  logic [9:0] code;
  int         conv;
  logic [3:0] cfg;
  mcp3008_model adc (.sclk(adc_sclk), .din(adc_mosi), .cs_n(adc_cs_n), .dout(adc_miso),
                     .code, .conversions(conv), .last_cfg(cfg));

  localparam int CARD_BYTES = ((NF * M * 2 + 511) / 512) * 512;
  sd_card_model #(.MEM_BYTES(CARD_BYTES)) card (.sclk(sd_sclk), .mosi(sd_mosi),
                                              .cs_n(sd_cs_n), .miso(sd_miso));

  // fingerprints
  int fp [NF][M];
  task automatic make_fingerprints();
    for (int r = 0; r < NF; r++) begin
      real p, tau;
      int  sum;
      p   = 14.0 + 7.0 * r;
      tau = M / 5.0 + 4.0 * r;
      sum = 0;
      for (int i = 0; i < M; i++) begin
        fp[r][i] = int'(300.0 * $exp(-i / tau) * $sin(2.0 * 3.14159265 * i / p));
        sum += fp[r][i];
      end
      for (int i = 0; i < M; i++) begin
        fp[r][i] -= sum / M;
        card.mem[2 * (r * M + i)]     = 8'(fp[r][i] >> 8);
        card.mem[2 * (r * M + i) + 1] = 8'(fp[r][i]);
      end
    end
  endtask

  // receiver output: chosen when the ADC's CS falls, logged per sample
  int mode_radio = -1;     // -1: idle channel noise
  int keyup_start = 0;
  int nsent = 0;
  int sent [$];
  always @(negedge adc_cs_n) if (!rst) begin
    int v, rel;
    if (mode_radio < 0) v = $urandom_range(0, 1023);
    else begin
      rel = nsent - keyup_start;
      v = 512 + $urandom_range(0, 3);
      if (rel >= 70 && rel < 70 + M) v += fp[mode_radio][rel - 70];
    end
    code = 10'(v);
    sent.push_back(v);
    nsent++;
  end

  // UART receiver
  logic [7:0] uart_q [$];
  int         uart_bad = 0;
  initial begin
    wait (!rst);
    forever begin
      logic [10:0] f;
      while (uart_txd) @(posedge clk);
      repeat (CPB / 2) @(posedge clk);
      for (int b = 0; b < 11; b++) begin
        f[b] = uart_txd;
        if (b < 10) repeat (CPB) @(posedge clk);
      end
      if (^f[9:1] !== 1'b1 || f[0] !== 1'b0 || f[10] !== 1'b1) uart_bad++;
      uart_q.push_back(f[8:1]);
    end
  end

  // debug SPI receiver
  logic [7:0] dbg_q [$];
  logic [7:0] dsr = 0;
  int         dbits = 0;
  always @(posedge dbg_sclk) if (!dbg_cs_n) begin
    dsr = {dsr[6:0], dbg_mosi}; dbits++;
    if (dbits == 8) begin dbg_q.push_back(dsr); dbits = 0; end
  end

  // ------------------------------------------------------------ mechanisms
  int n_trig = 0, n_arm = 0, n_full = 0, n_result = 0, n_banned = 0, n_allowed = 0;
  int n_export = 0, n_dump = 0, n_rearm = 0, n_loaded = 0;
  logic noisy_q = 0, full_q = 0, loaded_q = 0;
  always @(posedge clk) if (!rst) begin
    if (trigger_out) n_trig++;
    if (dut.u_trig.noisy && !noisy_q) n_arm++;
    if (dut.u_cap.full && !full_q) n_full++;
    if (!dut.u_cap.full && full_q) n_rearm++;
    if (fingerprints_loaded && !loaded_q) n_loaded++;
    if (result_valid) n_result++;
    noisy_q  <= dut.u_trig.noisy;
    full_q   <= dut.u_cap.full;
    loaded_q <= fingerprints_loaded;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic keyup(input int radio);
    int     cap [N];
    int     off, start_n;
    longint ref_score [NF];
    uart_q.delete();
    dbg_q.delete();
    // idle channel noise for 80 samples, then the keyup
    mode_radio = -1;
    start_n = nsent;
    wait (nsent >= start_n + 80);
    keyup_start = nsent;
    mode_radio = radio;
    wait (result_valid);
        @(negedge clk);
    check($sformatf("radio %0d identified as %0d", radio, best_idx), best_idx == 8'(radio));
    check("tx_enable", tx_enable == !BANNED[radio]);
    check("led_id", led_id == NF'(1 << radio));
    if (BANNED[radio]) n_banned++; else n_allowed++;
    // wait for the UART export and the buffer release
    wait (uart_q.size() == 2 + 2 * N);
    n_export++;
    wait (!dut.u_cap.full);
    check("debug dump length", dbg_q.size() == NF * SCORE_W / 8);
    if (dbg_q.size() == NF * SCORE_W / 8) n_dump++;
    check("UART marker", uart_q[0] == 8'hA5);
    check("UART result", uart_q[1] == 8'(radio));
    for (int i = 0; i < N; i++) cap[i] = int'({uart_q[2 + 2 * i], uart_q[3 + 2 * i]});
    // the capture is N consecutive ADC samples starting shortly after the keyup
    off = -1;
    for (int s = keyup_start; s < keyup_start + 70 && off < 0; s++) begin
      bit same = 1;
      for (int i = 0; i < N; i++) if (s + i >= sent.size() || sent[s + i] != cap[i]) same = 0;
      if (same) off = s - keyup_start;
    end
    // (50 quiet samples fill the trigger's ring; one noise sample that
    // happens to lie near the carrier level can advance this a little)
    check("capture matches ADC samples after the keyup", off >= 45 && off <= 50);
    // reference scores
    begin
      int     sum, mean, bl;
      longint d, bd, sc;
      sum = 0;
      for (int i = 0; i < N; i++) sum += cap[i];
      mean = sum / N;
      for (int f = 0; f < NF; f++) begin
        bd = 0; bl = 0;
        for (int lag = 0; lag <= N - M; lag++) begin
          d = 0;
          for (int i = 0; i < M; i++) d += longint'(fp[f][i]) * (longint'(cap[lag + i]) - longint'(mean));
          if (lag == 0 || d > bd) begin bd = d; bl = lag; end
        end
        sc = 0;
        for (int i = 0; i < M; i++) sc += (longint'(fp[f][i]) - (longint'(cap[bl + i]) - longint'(mean))) ** 2;
        ref_score[f] = sc;
      end
    end
    for (int f = 0; f < NF; f++) begin
      logic [SCORE_W-1:0] got;
      got = '0;
      for (int b = 0; b < SCORE_W / 8; b++) got = {got[SCORE_W-9:0], dbg_q[f * SCORE_W / 8 + b]};
      check($sformatf("filter %0d score %0d, reference %0d", f, got, ref_score[f]),
            got == SCORE_W'(ref_score[f]));
      if (f != radio) check("matching radio scores lowest", ref_score[f] > ref_score[radio]);
    end
    check("best_score", best_score == SCORE_W'(ref_score[radio]));
    $display("keyup of radio %0d: score %0d, capture offset %0d", radio, best_score, off);
  endtask

  initial begin
    code = 10'd512;
    make_fingerprints();
    repeat (5) @(posedge clk);
    rst = 0;
    wait (fingerprints_loaded);
    repeat (200) @(posedge clk);
    check("SD success code", led_sd == 8'h80);
    check("no CRC errors at the card", card.crc_errors == 0);
    check("SD lines mirrored", sd_mirror == {sd_cs_n, sd_sclk, sd_mosi, sd_miso});
    for (int k = 0; k < KEYUPS; k++) keyup(RADIOS[k]);
    repeat (10) @(posedge clk);
    check("no UART framing errors", uart_bad == 0);
    // every mechanism must have happened
    check("SD card busy retries", card.cmds_seen[41] > 1);
    check("fingerprints loaded", n_loaded == 1);
    check("Schmitt trigger armed by noise", n_arm >= KEYUPS);
    check("trigger fired", n_trig >= KEYUPS);
    check("capture completed", n_full == KEYUPS);
    check("classification", n_result == KEYUPS);
    check("banned radio blocked", n_banned >= 1);
    check("allowed radio passed", n_allowed >= 1);
    check("UART export", n_export == KEYUPS);
    check("debug SPI dump", n_dump == KEYUPS);
    check("capture buffer re-armed", n_rearm == KEYUPS);
    $display("mechanisms: arm=%0d trig=%0d full=%0d result=%0d banned=%0d allowed=%0d export=%0d dump=%0d rearm=%0d acmd41=%0d",
             n_arm, n_trig, n_full, n_result, n_banned, n_allowed, n_export, n_dump, n_rearm, card.cmds_seen[41]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
