// tb_spi_controller: checks the SPI master against a mode-0 slave model.
// Random words are exchanged at two SCLK speeds; the test checks the word
// the slave received, the word the master received, that MOSI only changes
// while SCLK is low, and that a word takes exactly 2*half_period*WIDTH cycles.
module tb_spi_controller;
  localparam int W = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [15:0]  half;
  logic         s_tvalid, s_tready, m_tvalid;
  logic [W-1:0] s_tdata, m_tdata;
  logic         sclk, mosi, miso;
  int checks = 0, failures = 0;

  spi_controller #(.WIDTH(W)) dut (.clk, .rst, .half_period(half),
    .s_tvalid, .s_tdata, .s_tready, .m_tvalid, .m_tdata, .sclk, .mosi, .miso);

  // slave: sample MOSI on rising, shift out on falling
  logic [W-1:0] slv_rx, slv_tx;
  int           slv_bits;
  always @(posedge sclk) begin slv_rx = {slv_rx[W-2:0], mosi}; slv_bits++; end
  always @(negedge sclk) begin slv_tx = {slv_tx[W-2:0], 1'b0}; end
  assign miso = slv_tx[W-1];

  // MOSI must be stable while SCLK is high
  logic mosi_q, sclk_q;
  always @(posedge clk) begin
    if (sclk_q && sclk && mosi !== mosi_q) begin
      failures++; $display("FAIL: MOSI changed while SCLK high");
    end
    sclk_q <= sclk; mosi_q <= mosi;
  end

  task automatic xfer(input logic [W-1:0] d, input logic [W-1:0] sd, input int h);
    int t0, cyc;
    half = 16'(h);
    slv_tx = sd; slv_bits = 0;
    @(negedge clk);
    while (!s_tready) @(negedge clk);
    s_tvalid = 1; s_tdata = d;
    @(posedge clk); t0 = 0;
    @(negedge clk); s_tvalid = 0;
    cyc = 1;
    while (!m_tvalid) begin @(negedge clk); cyc++; end
    checks += 4;
    if (m_tdata !== sd) begin failures++; $display("FAIL: master got %h want %h", m_tdata, sd); end
    if (slv_rx !== d) begin failures++; $display("FAIL: slave got %h want %h", slv_rx, d); end
    if (slv_bits != W) begin failures++; $display("FAIL: %0d clocks", slv_bits); end
    if (cyc - 1 != 2 * h * W) begin failures++; $display("FAIL: %0d cycles want %0d", cyc - 1, 2*h*W); end
  endtask

  initial begin
    s_tvalid = 0; s_tdata = '0; half = 16'd2; slv_tx = '0; slv_rx = '0; slv_bits = 0;
    sclk_q = 0; mosi_q = 1;
    repeat (3) @(posedge clk);
    rst = 0;
    xfer(8'hA5, 8'h3C, 1);
    xfer(8'h01, 8'h80, 3);
    for (int i = 0; i < 20; i++) xfer(W'($urandom), W'($urandom), 1 + i % 4);
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
