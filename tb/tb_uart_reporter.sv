// tb_uart_reporter: gives the reporter a small capture memory (read data one
// cycle after the address), starts an export and decodes the UART line with
// an independent receiver. Checks the marker byte, the result byte, every
// sample as a high/low byte pair, odd parity, `done`, and the total export
// time of (2 + 2N) frames of 11 bits.
module tb_uart_reporter;
  localparam int N = 8, CPB = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic       start, busy, done, txd;
  logic [7:0] result;
  logic [2:0] cap_rd_addr;
  logic [9:0] cap_rd_data;
  logic [9:0] mem [N];
  int checks = 0, failures = 0;

  uart_reporter #(.N(N), .SW(10), .CLKS_PER_BIT(CPB)) dut (.clk, .rst, .start, .result,
    .cap_rd_addr, .cap_rd_data, .busy, .done, .txd);

  always_ff @(posedge clk) cap_rd_data <= mem[cap_rd_addr];

  // UART receiver
  logic [7:0] rx_q [$];
  initial begin
    wait (!rst);
    forever begin
      logic [10:0] f;
      while (txd) @(posedge clk);
      repeat (CPB / 2) @(posedge clk);
      for (int b = 0; b < 11; b++) begin
        f[b] = txd;
        if (b < 10) repeat (CPB) @(posedge clk);
      end
      checks += 2;
      if (^f[9:1] !== 1'b1) begin failures++; $display("FAIL: parity"); end
      if (f[10] !== 1'b1 || f[0] !== 1'b0) begin failures++; $display("FAIL: framing"); end
      rx_q.push_back(f[8:1]);
    end
  end

  task automatic export_and_check(input logic [7:0] res);
    int t;
    for (int i = 0; i < N; i++) mem[i] = 10'($urandom);
    rx_q.delete();
    @(negedge clk); start = 1; result = res; @(negedge clk); start = 0;
    t = 1;
    while (!done) begin @(negedge clk); t++; end
    repeat (4) @(negedge clk);
    checks += 3;
    if (rx_q.size() != 2 + 2 * N) begin failures++; $display("FAIL: %0d bytes", rx_q.size()); end
        // 2 + 2N frames back to back, each 11*CPB cycles plus at most a few
    // cycles of hand-over and capture reading
    if (t < (2 + 2 * N) * 11 * CPB || t > (2 + 2 * N) * (11 * CPB + 5)) begin
      failures++; $display("FAIL: export took %0d cycles", t);
    end
    if (rx_q.size() == 2 + 2 * N) begin
      checks += 2 + 2 * N;
      if (rx_q[0] !== 8'hA5) begin failures++; $display("FAIL: marker %h", rx_q[0]); end
      if (rx_q[1] !== res) begin failures++; $display("FAIL: result %h", rx_q[1]); end
      for (int i = 0; i < N; i++) begin
        if (rx_q[2 + 2 * i] !== {6'b0, mem[i][9:8]}) begin failures++; $display("FAIL: hi %0d", i); end
        if (rx_q[3 + 2 * i] !== mem[i][7:0]) begin failures++; $display("FAIL: lo %0d", i); end
      end
    end
  endtask

  initial begin
    start = 0; result = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    export_and_check(8'd3);
    export_and_check(8'd7);
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
