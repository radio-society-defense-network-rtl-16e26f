// tb_mcp3008_adc: runs the ADC sampler against the MCP3008 model. The model
// is fed a new random 10-bit code before every conversion; the test checks
// each sample delivered, the channel configuration sent to the converter,
// the sample period and that CS stays high between conversions.
module tb_mcp3008_adc;
  localparam int PERIOD = 400;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic       m_tvalid, sclk, mosi, miso, cs_n;
  logic [9:0] m_tdata, code;
  int         conv;
  logic [3:0] cfg;
  int checks = 0, failures = 0;

  mcp3008_adc #(.SAMPLE_PERIOD(PERIOD), .SPI_HALF(5), .CHANNEL(3'd5)) dut (
    .clk, .rst, .m_tvalid, .m_tdata,
    .adc_sclk(sclk), .adc_mosi(mosi), .adc_miso(miso), .adc_cs_n(cs_n));

  mcp3008_model adc (.sclk, .din(mosi), .cs_n, .dout(miso), .code,
                     .conversions(conv), .last_cfg(cfg));

  // a new code for every conversion, chosen when CS falls
  logic [9:0] expect_q [$];
  always @(negedge cs_n) begin
    code = 10'($urandom);
    expect_q.push_back(code);
  end

  int last_t = -1, t = 0, nsamp = 0;
  always @(posedge clk) begin
    t++;
    if (m_tvalid && !rst) begin
      logic [9:0] e;
      e = expect_q.pop_front();
      checks += 2;
      if (m_tdata !== e) begin failures++; $display("FAIL: sample %h want %h", m_tdata, e); end
      if (cfg !== 4'b1101) begin failures++; $display("FAIL: cfg %b", cfg); end
      if (last_t >= 0) begin
        checks++;
        if (t - last_t != PERIOD) begin failures++; $display("FAIL: period %0d", t - last_t); end
      end
      last_t = t;
      nsamp++;
    end
  end

  initial begin
    code = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    wait (nsamp == 25);
    checks++;
    if (conv != 25) begin failures++; $display("FAIL: model saw %0d conversions", conv); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30 * PERIOD) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
