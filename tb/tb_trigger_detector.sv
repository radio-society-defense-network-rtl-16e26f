// tb_trigger_detector: feeds quiet and noisy stretches of samples and
// compares every range the detector reports, and every trigger, with an
// independent model (a queue of the last 50 samples and a Schmitt trigger).
// Also checks that a scan ends DEPTH + 1 cycles after the sample arrived and
// that exactly the expected two triggers occur.
module tb_trigger_detector;
  localparam int DEPTH = 50, LOW = 64, HIGH = 256;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic       s_tvalid, trigger, noisy, range_valid;
  logic [9:0] s_tdata, range_out;
  int checks = 0, failures = 0;

  trigger_detector #(.SW(10), .DEPTH(DEPTH), .LOW_THRESH(LOW), .HIGH_THRESH(HIGH)) dut (
    .clk, .rst, .s_tvalid, .s_tdata, .trigger, .noisy, .range_valid, .range_out);

  int  hist [$];
  bit  m_noisy = 0;
  int  triggers = 0, exp_triggers = 0;

  task automatic put(input int v);
    int mn, mx, lat;
    bit exp_trig;
    @(negedge clk);
    s_tvalid = 1; s_tdata = 10'(v);
    @(negedge clk);
    s_tvalid = 0;
    hist.push_back(v);
    if (hist.size() > DEPTH) void'(hist.pop_front());
    lat = 1;
    if (hist.size() == DEPTH) begin
      mn = 1023; mx = 0;
      foreach (hist[i]) begin
        if (hist[i] < mn) mn = hist[i];
        if (hist[i] > mx) mx = hist[i];
      end
      exp_trig = 0;
      if (!m_noisy && mx - mn > HIGH) m_noisy = 1;
      else if (m_noisy && mx - mn < LOW) begin m_noisy = 0; exp_trig = 1; exp_triggers++; end
      while (!range_valid && lat < 200) begin @(negedge clk); lat++; end
      checks += 4;
      if (range_out !== 10'(mx - mn)) begin failures++; $display("FAIL: range %0d want %0d", range_out, mx - mn); end
      if (trigger !== exp_trig) begin failures++; $display("FAIL: trigger %b want %b", trigger, exp_trig); end
      if (noisy !== m_noisy) begin failures++; $display("FAIL: noisy %b", noisy); end
      if (lat - 1 != DEPTH + 1) begin failures++; $display("FAIL: scan latency %0d", lat - 1); end
    end
    repeat (70) @(negedge clk);
  endtask

  always @(posedge clk) if (trigger && !rst) triggers++;

  initial begin
    s_tvalid = 0; s_tdata = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 80; i++) put(500 + $urandom_range(0, 6));     // quiet at start: no trigger
    for (int i = 0; i < 80; i++) put($urandom_range(0, 1023));        // idle channel noise
    for (int i = 0; i < 30; i++) put(500 + $urandom_range(0, 100));   // between thresholds
    for (int i = 0; i < 80; i++) put(600 + $urandom_range(0, 10));    // carrier: quieting
    for (int i = 0; i < 60; i++) put($urandom_range(0, 1023));
    for (int i = 0; i < 80; i++) put(300 + $urandom_range(0, 20));
    checks += 2;
    if (triggers != exp_triggers) begin failures++; $display("FAIL: %0d triggers, model %0d", triggers, exp_triggers); end
    if (triggers != 2) begin failures++; $display("FAIL: %0d triggers, want 2", triggers); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
