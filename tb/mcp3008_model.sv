// mcp3008_model: behavioural model of an MCP3008 SPI ADC, for testbenches
// only (not synthesizable logic).
//
// SPI mode 0. While CS is low, DIN is sampled on rising SCLK edges; leading
// zeros are ignored until the start bit (1). The next four bits are
// SGL/DIFF and the channel number D2..D0. On the falling edge after D0 the
// model latches `code` (the analog input already converted to 10 bits by the
// testbench) and drives the null bit (0), then B9..B0 on the following
// falling edges. DOUT is 1 while idle. `conversions` counts completed
// conversions; `last_cfg` holds {SGL, D2, D1, D0} of the last request.
module mcp3008_model (
  input  logic       sclk,
  input  logic       din,
  input  logic       cs_n,
  output logic       dout,
  input  logic [9:0] code,
  output int         conversions,
  output logic [3:0] last_cfg
);
  int         nrise;        // rising edges since the start bit (0 = no start yet)
  logic [9:0] held;
  int         nfall;

  initial begin
    dout        = 1'b1;
    nrise       = 0;
    nfall       = 0;
    conversions = 0;
    last_cfg    = '0;
    held        = '0;
  end

  always @(negedge cs_n) begin
    nrise = 0;
    nfall = 0;
    dout  = 1'b1;
  end

  always @(posedge cs_n) dout = 1'b1;

  always @(posedge sclk) if (!cs_n) begin
    if (nrise == 0) begin
      if (din) nrise = 1;
    end else if (nrise <= 4) begin
      last_cfg = {last_cfg[2:0], din};
      nrise++;
    end else begin
      nrise++;
    end
  end

  // falling edges after the 4 configuration bits
  always @(negedge sclk) if (!cs_n && nrise >= 5) begin
    if (nfall == 0) begin
      held = code;
      dout = 1'b0;              // null bit
    end else if (nfall <= 10) begin
      dout = held[10 - nfall];
      if (nfall == 10) conversions++;
    end else begin
      dout = 1'b0;
    end
    nfall++;
  end
endmodule
