// tb_filter_manager: drives the filter manager as the SD controller, the
// capture buffer and the filters would. Checks that fingerprint bytes land
// in the right filter and address, the exact broadcast sequence of the three
// passes with no gaps, the choice of the lowest score, tx_enable for a banned
// and an allowed radio, the one-hot LEDs, the debug SPI dump of all scores,
// and the hold/re-arm hand-shake with the capture buffer.
module tb_filter_manager;
  import rsdn_pkg::*;
  localparam int NF = 3, N = 32, M = 8;
  localparam logic [NF-1:0] BANNED = 3'b010;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic                       s_tvalid, s_tready, loaded, cap_full, cap_reading, hold;
  logic [7:0]                 s_tdata, best_idx;
  logic [NF-1:0]              fp_we, score_valid, led_id;
  logic [2:0]                 fp_waddr;
  logic signed [15:0]         fp_wdata;
  logic [4:0]                 cap_rd_addr;
  logic [9:0]                 cap_rd_data, st_sample;
  logic                       filt_start, st_valid, st_last, result_valid, tx_enable;
  phase_t                     st_phase;
  logic [NF-1:0][SCORE_W-1:0] scores;
  logic [SCORE_W-1:0]         best_score;
  logic                       dbg_sclk, dbg_mosi, dbg_cs_n;
  int checks = 0, failures = 0;

  filter_manager #(.NF(NF), .N(N), .M(M), .BANNED(BANNED), .DBG_HALF(1)) dut (
    .clk, .rst, .s_tvalid, .s_tdata, .s_tready, .fp_we, .fp_waddr, .fp_wdata, .loaded,
    .cap_full, .cap_rd_addr, .cap_rd_data, .cap_reading, .hold,
    .filt_start, .st_valid, .st_sample, .st_phase, .st_last,
    .score_valid, .scores, .result_valid, .best_idx, .best_score, .tx_enable, .led_id,
    .dbg_sclk, .dbg_mosi, .dbg_cs_n);

  logic [9:0] mem [N];
  always_ff @(posedge clk) cap_rd_data <= mem[cap_rd_addr];

  // fingerprint writes seen
  int fpw [NF][M];
  int nwrites = 0;
  always @(posedge clk) if (!rst && fp_we != 0) begin
    for (int f = 0; f < NF; f++) if (fp_we[f]) fpw[f][fp_waddr] = int'(fp_wdata);
    nwrites++;
    checks++;
    if ($countones(fp_we) != 1) begin failures++; $display("FAIL: fp_we not one-hot"); end
  end

  // debug SPI slave
  logic [7:0] dbg_q [$];
  logic [7:0] dsr;
  int         dbits = 0;
  always @(posedge dbg_sclk) if (!dbg_cs_n) begin
    dsr = {dsr[6:0], dbg_mosi}; dbits++;
    if (dbits == 8) begin dbg_q.push_back(dsr); dbits = 0; end
  end

  // stream monitor
  typedef struct { phase_t ph; int v; bit last; } beat_t;
  beat_t got [$];
  int    first_t = -1, last_t = -1, t = 0, starts = 0;
  always @(posedge clk) begin
    t++;
    if (!rst && filt_start) starts++;
    if (!rst && st_valid) begin
      beat_t b;
      b.ph = st_phase; b.v = int'(st_sample); b.last = st_last;
      got.push_back(b);
      if (first_t < 0) first_t = t;
      last_t = t;
      checks++;
      if (!cap_reading && got.size() == 1) begin failures++; $display("FAIL: cap_reading low"); end
    end
  end

  task automatic classify(input logic [SCORE_W-1:0] s0, s1, s2, input int want);
    beat_t e [$];
    int    k;
    for (int i = 0; i < N; i++) mem[i] = 10'($urandom);
    got.delete(); first_t = -1; starts = 0; dbg_q.delete();
    score_valid = '0;
    @(negedge clk); cap_full = 1;
    // expected sequence
    for (int i = 0; i < N; i++) e.push_back('{PH_MEAN, int'(mem[i]), i == N - 1});
    for (int l = 0; l <= N - M; l++)
      for (int i = 0; i < M; i++) e.push_back('{PH_CORR, int'(mem[l + i]), i == M - 1});
    for (int i = 0; i < N; i++) e.push_back('{PH_ALIGN, int'(mem[i]), i == N - 1});
    wait (got.size() == e.size());
    repeat (5) @(negedge clk);
    checks += 3;
    if (got.size() != e.size()) begin failures++; $display("FAIL: %0d beats want %0d", got.size(), e.size()); end
    if (last_t - first_t + 1 != e.size()) begin failures++; $display("FAIL: stream has gaps"); end
    if (starts != 1) begin failures++; $display("FAIL: %0d start pulses", starts); end
    k = 0;
    foreach (e[i]) begin
      if (got[i].ph != e[i].ph || got[i].v != e[i].v || got[i].last != e[i].last) k++;
    end
    checks++;
    if (k != 0) begin failures++; $display("FAIL: %0d beats differ", k); end
    // scores arrive
    scores[0] = s0; scores[1] = s1; scores[2] = s2;
    score_valid = 3'b011;
    repeat (5) @(negedge clk);
    checks++;
    if (result_valid || hold) begin failures++; $display("FAIL: result before all scores"); end
    score_valid = 3'b111;
    while (!result_valid) @(negedge clk);
    checks += 4;
    if (best_idx != 8'(want)) begin failures++; $display("FAIL: best %0d want %0d", best_idx, want); end
    if (best_score != scores[want]) begin failures++; $display("FAIL: best score"); end
    if (tx_enable !== !BANNED[want]) begin failures++; $display("FAIL: tx_enable %b", tx_enable); end
    if (led_id !== NF'(1 << want)) begin failures++; $display("FAIL: led %b", led_id); end
    while (!hold) @(negedge clk);
    checks += 1 + NF * (SCORE_W / 8);
    if (dbg_q.size() != NF * (SCORE_W / 8)) begin failures++; $display("FAIL: %0d debug bytes", dbg_q.size()); end
    for (int f = 0; f < NF; f++)
      for (int b = 0; b < SCORE_W / 8; b++)
        if (dbg_q[f * (SCORE_W / 8) + b] !== scores[f][SCORE_W - 8 * b - 1 -: 8]) begin
          failures++; $display("FAIL: debug byte %0d of filter %0d", b, f);
        end
    // release
    cap_full = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (hold) begin failures++; $display("FAIL: still holding"); end
  endtask

  initial begin
    int v [NF][M];
    s_tvalid = 0; s_tdata = 0; cap_full = 0; score_valid = 0; scores = '0; dsr = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    // load fingerprints, with idle gaps between bytes
    for (int f = 0; f < NF; f++)
      for (int a = 0; a < M; a++) begin
        v[f][a] = int'($signed(16'($urandom)));
        for (int h = 0; h < 2; h++) begin
          @(negedge clk); s_tvalid = 1; s_tdata = h == 0 ? 8'(v[f][a] >> 8) : 8'(v[f][a]);
          @(negedge clk); s_tvalid = 0;
          repeat ($urandom_range(0, 3)) @(negedge clk);
        end
      end
    // bytes beyond the fingerprints are ignored
    for (int i = 0; i < 6; i++) begin @(negedge clk); s_tvalid = 1; s_tdata = 8'hEE; end
    @(negedge clk); s_tvalid = 0;
    repeat (3) @(negedge clk);
    checks += 2;
    if (!loaded) begin failures++; $display("FAIL: not loaded"); end
    if (nwrites != NF * M) begin failures++; $display("FAIL: %0d writes", nwrites); end
    for (int f = 0; f < NF; f++)
      for (int a = 0; a < M; a++) begin
        checks++;
        if (fpw[f][a] != v[f][a]) begin failures++; $display("FAIL: fp %0d/%0d", f, a); end
      end
    classify(48'd90000, 48'd120000, 48'd4000, 2);      // allowed radio
    classify(48'd70000, 48'd5000, 48'd5000, 1);        // banned radio, tie -> lower index
    classify(48'd300, 48'hFFFF_FFFF_FFFF, 48'd301, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
