// tb_capture_buffer: streams numbered samples, triggers a capture, and reads
// the buffer back. Checks that exactly the N samples after the trigger were
// stored, that `full` rises after the N-th one, that triggers are ignored
// while full, and that a release re-arms the buffer for a second capture.
module tb_capture_buffer;
  localparam int N = 32;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic       s_tvalid, trigger, release_buf, recording, full;
  logic [9:0] s_tdata, rd_data;
  logic [4:0] rd_addr;
  int checks = 0, failures = 0;
  int sample_no = 0;

  capture_buffer #(.SW(10), .N(N)) dut (.clk, .rst, .s_tvalid, .s_tdata, .trigger,
    .release_buf, .recording, .full, .rd_addr, .rd_data);

  task automatic put();
    @(negedge clk); s_tvalid = 1; s_tdata = 10'(sample_no * 7 + 3); sample_no++;
    @(negedge clk); s_tvalid = 0;
    @(negedge clk);
  endtask

  task automatic pulse_trigger();
    @(negedge clk); trigger = 1; @(negedge clk); trigger = 0;
  endtask

  task automatic capture_and_check();
    int first;
    pulse_trigger();
    first = sample_no;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (full) begin failures++; $display("FAIL: full too early at %0d", i); end
      put();
    end
    checks++;
    if (!full) begin failures++; $display("FAIL: not full after N samples"); end
    pulse_trigger();                 // must be ignored
    for (int i = 0; i < 5; i++) put(); // must not be stored
    for (int i = 0; i < N; i++) begin
      @(negedge clk); rd_addr = 5'(i);
      @(negedge clk);
      checks++;
      if (rd_data !== 10'((first + i) * 7 + 3)) begin
        failures++; $display("FAIL: addr %0d holds %0d want %0d", i, rd_data, (first + i) * 7 + 3);
      end
    end
    @(negedge clk); release_buf = 1; @(negedge clk); release_buf = 0;
    checks++;
    if (full || recording) begin failures++; $display("FAIL: not re-armed"); end
  endtask

  initial begin
    s_tvalid = 0; s_tdata = 0; trigger = 0; release_buf = 0; rd_addr = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 10; i++) put();      // not recorded: no trigger yet
    checks++;
    if (full || recording) begin failures++; $display("FAIL: recording without trigger"); end
    capture_and_check();
    for (int i = 0; i < 7; i++) put();
    capture_and_check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
