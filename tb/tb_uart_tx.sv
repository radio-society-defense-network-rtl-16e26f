// tb_uart_tx: sends bytes through the UART transmitter and decodes the line
// with an independent receiver that samples each bit in its middle. Checks
// the start bit, data, odd parity, stop bit, the frame length of
// 11*CLKS_PER_BIT cycles and that s_tready only rises after the stop bit.
module tb_uart_tx;
  localparam int CPB = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic       s_tvalid, s_tready, txd;
  logic [7:0] s_tdata;
  int checks = 0, failures = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .s_tvalid, .s_tdata, .s_tready, .txd);

  task automatic send_and_check(input logic [7:0] d);
    logic [10:0] bits;
    int          cyc;
    @(negedge clk);
    while (!s_tready) @(negedge clk);
    s_tvalid = 1; s_tdata = d;
    @(negedge clk); s_tvalid = 0;
    // now half a cycle after the start bit began; sample in bit middles
    repeat (CPB / 2 - 1) @(negedge clk);
    for (int b = 0; b < 11; b++) begin
      bits[b] = txd;
      if (b < 10) repeat (CPB) @(negedge clk);
    end
    checks += 4;
    if (bits[0] !== 1'b0) begin failures++; $display("FAIL: start bit"); end
    if (bits[8:1] !== d) begin failures++; $display("FAIL: data %h want %h", bits[8:1], d); end
    if (^bits[9:1] !== 1'b1) begin failures++; $display("FAIL: parity not odd for %h", d); end
    if (bits[10] !== 1'b1) begin failures++; $display("FAIL: stop bit"); end
    // ready must come back at 11*CPB cycles after acceptance
    cyc = CPB / 2 + 10 * CPB;
    while (!s_tready) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc - 1 != 11 * CPB) begin failures++; $display("FAIL: frame took %0d cycles, want %0d", cyc - 1, 11*CPB); end
  endtask

  initial begin
    s_tvalid = 0; s_tdata = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk);
    checks++;
    if (txd !== 1'b1) begin failures++; $display("FAIL: idle line not high"); end
    send_and_check(8'h00);
    send_and_check(8'hFF);
    send_and_check(8'hA5);
    for (int i = 0; i < 12; i++) send_and_check(8'($urandom));
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
