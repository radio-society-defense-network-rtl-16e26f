// tb_matched_filter: loads a random zero-mean fingerprint, builds captures
// that contain a scaled copy of it at a known offset plus noise, streams the
// three passes exactly as the filter manager does (one sample per clock),
// and compares mean, best dot product, best lag and similarity score with a
// reference computed here. Also checks that the score is ready a fixed 3
// cycles after the last sample, and that a non-matching capture scores far
// higher than a matching one.
module tb_matched_filter;
  import rsdn_pkg::*;
  localparam int N = 64, M = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic                fp_we, start, st_valid, st_last, score_valid;
  logic [3:0]          fp_waddr;
  logic signed [15:0]  fp_wdata;
  logic [9:0]          st_sample, mean_out;
  phase_t              st_phase;
  logic [47:0]         score;
  logic signed [47:0]  best_dot;
  logic [5:0]          best_lag;
  int checks = 0, failures = 0;

  matched_filter #(.N(N), .M(M)) dut (.clk, .rst, .fp_we, .fp_waddr, .fp_wdata,
    .start, .st_valid, .st_sample, .st_phase, .st_last,
    .score_valid, .score, .best_dot, .best_lag, .mean_out);

  int fp [M];
  int cap [N];

  task automatic send(input phase_t ph, input int v, input bit last);
    st_valid = 1; st_phase = ph; st_sample = 10'(v); st_last = last;
    @(negedge clk);
  endtask

  task automatic run(output longint sc);
    int     mean, sum, lag, bl;
    longint d, bd, s;
    // reference
    sum = 0; foreach (cap[i]) sum += cap[i];
    mean = sum / N;
    bd = 0; bl = 0;
    for (lag = 0; lag <= N - M; lag++) begin
      d = 0;
      for (int i = 0; i < M; i++) d += longint'(fp[i]) * (longint'(cap[lag + i]) - longint'(mean));
      if (lag == 0 || d > bd) begin bd = d; bl = lag; end
    end
    s = 0;
    for (int i = 0; i < M; i++) s += (longint'(fp[i]) - (longint'(cap[bl + i]) - longint'(mean))) ** 2;
    // stimulus
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int i = 0; i < N; i++) send(PH_MEAN, cap[i], i == N - 1);
    for (lag = 0; lag <= N - M; lag++)
      for (int i = 0; i < M; i++) send(PH_CORR, cap[lag + i], i == M - 1);
    for (int i = 0; i < N; i++) send(PH_ALIGN, cap[i], i == N - 1);
    st_valid = 0; st_last = 0;
    // pipeline: RAM read, multiply, accumulate
    repeat (2) begin
      checks++;
      if (score_valid) begin failures++; $display("FAIL: score early"); end
      @(negedge clk);
    end
    checks += 5;
    if (!score_valid) begin failures++; $display("FAIL: score not valid after 3 cycles"); end
    if (mean_out !== 10'(mean)) begin failures++; $display("FAIL: mean %0d want %0d", mean_out, mean); end
    if (best_dot !== 48'(bd)) begin failures++; $display("FAIL: dot %0d want %0d", best_dot, bd); end
    if (best_lag !== 6'(bl)) begin failures++; $display("FAIL: lag %0d want %0d", best_lag, bl); end
    if (score !== 48'(s)) begin failures++; $display("FAIL: score %0d want %0d", score, s); end
    sc = s;
  endtask

  initial begin
    longint s_match, s_other;
    int sum;
    fp_we = 0; fp_waddr = 0; fp_wdata = 0; start = 0; st_valid = 0; st_last = 0;
    st_sample = 0; st_phase = PH_MEAN;
    repeat (3) @(posedge clk);
    rst = 0;
    // zero-mean fingerprint with a decaying oscillation
    sum = 0;
    for (int i = 0; i < M; i++) begin
      fp[i] = int'(300.0 * $exp(-i / 6.0) * $sin(2.0 * 3.14159 * i / 5.0));
      sum += fp[i];
    end
    for (int i = 0; i < M; i++) fp[i] -= sum / M;
    for (int i = 0; i < M; i++) begin
      @(negedge clk); fp_we = 1; fp_waddr = 4'(i); fp_wdata = 16'(fp[i]);
    end
    @(negedge clk); fp_we = 0;
    // 1: matching capture at offset 21
    for (int i = 0; i < N; i++) cap[i] = 512 + $urandom_range(0, 6);
    for (int i = 0; i < M; i++) cap[21 + i] += fp[i];
    run(s_match);
    // 2: a different waveform
    for (int i = 0; i < N; i++) cap[i] = 480 + $urandom_range(0, 6);
    for (int i = 0; i < M; i++) cap[30 + i] += int'(250.0 * $cos(2.0 * 3.14159 * i / 11.0));
    run(s_other);
    checks++;
    if (!(s_other > 4 * s_match)) begin failures++; $display("FAIL: no separation %0d vs %0d", s_match, s_other); end
    // 3: random captures
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < N; i++) cap[i] = $urandom_range(0, 1023);
      run(s_other);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
