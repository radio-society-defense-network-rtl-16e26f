// tb_sd_cpu: runs the SD controller CPU with its firmware ROM against the
// SD card model in three set-ups: a byte-addressed card that accepts ACMD41
// after a few busy answers; a block-addressed (high capacity) card read with
// the block-addressing firmware; and a card that rejects ACMD41, which must
// be initialised through the CMD1 fallback. For each it checks every byte
// handed out against the card contents, the byte count, no CRC errors seen
// by the card, the success code on the LEDs and `done`. It also checks the
// card saw the initialisation clocks with CS high before the first command.
module tb_sd_cpu;
  localparam int NB = 2;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0]  ra [3];
  logic [31:0] rd [3];
  logic [2:0]  sclk, mosi, miso, cs_n, tv, done;
  logic [7:0]  td [3];
  logic [7:0]  led [3];
  int          nout [3];
  int          bad [3];
  int          pre_clocks [3];

  // card 0: SDSC, byte addresses; card 1: SDHC, block addresses;
  // card 2: SDSC that only knows CMD1
  sd_rom #(.NUM_BLOCKS(NB), .BLOCK_ADDR(1'b0), .INIT_RETRIES(20)) rom0 (.clk, .rom_addr(ra[0]), .rom_data(rd[0]));
  sd_rom #(.NUM_BLOCKS(NB), .BLOCK_ADDR(1'b1), .INIT_RETRIES(20)) rom1 (.clk, .rom_addr(ra[1]), .rom_data(rd[1]));
  sd_rom #(.NUM_BLOCKS(NB), .BLOCK_ADDR(1'b0), .INIT_RETRIES(4))  rom2 (.clk, .rom_addr(ra[2]), .rom_data(rd[2]));

  sd_card_model #(.MEM_BYTES(2048), .HIGH_CAPACITY(1'b0)) card0 (.sclk(sclk[0]), .mosi(mosi[0]), .cs_n(cs_n[0]), .miso(miso[0]));
  sd_card_model #(.MEM_BYTES(2048), .HIGH_CAPACITY(1'b1)) card1 (.sclk(sclk[1]), .mosi(mosi[1]), .cs_n(cs_n[1]), .miso(miso[1]));
  sd_card_model #(.MEM_BYTES(2048), .HIGH_CAPACITY(1'b0), .ACCEPT_ACMD41(1'b0)) card2 (.sclk(sclk[2]), .mosi(mosi[2]), .cs_n(cs_n[2]), .miso(miso[2]));

  for (genvar i = 0; i < 3; i++) begin : g
    sd_cpu #(.SLOW_HALF(4), .FAST_HALF(2)) cpu (.clk, .rst, .rom_addr(ra[i]), .rom_data(rd[i]),
      .sd_sclk(sclk[i]), .sd_mosi(mosi[i]), .sd_miso(miso[i]), .sd_cs_n(cs_n[i]),
      .m_tvalid(tv[i]), .m_tdata(td[i]), .m_tready(1'b1), .led(led[i]), .done(done[i]));
  end

  function automatic logic [7:0] content(int card, int a);
    return 8'((a * 13 + card * 7 + (a >> 8)) ^ 8'h5A);
  endfunction

  // check the stream of every CPU
  for (genvar i = 0; i < 3; i++) begin : g_mon
    always @(posedge clk) if (!rst && tv[i]) begin
      if (td[i] !== content(i, nout[i])) bad[i]++;
      nout[i]++;
    end
    // SCLK edges with CS high before any command (power-up clocks)
    always @(posedge sclk[i]) if (cs_n[i] && nout[i] == 0 && !done[i]) pre_clocks[i]++;
  end

  initial begin
    for (int i = 0; i < 3; i++) begin nout[i] = 0; bad[i] = 0; pre_clocks[i] = 0; end
    for (int a = 0; a < 2048; a++) begin
      card0.mem[a] = content(0, a);
      card1.mem[a] = content(1, a);
      card2.mem[a] = content(2, a);
    end
    repeat (3) @(posedge clk);
    rst = 0;
    wait (done == 3'b111);
    repeat (10) @(posedge clk);
    for (int i = 0; i < 3; i++) begin
      checks += 4;
      if (nout[i] != NB * 512) begin failures++; $display("FAIL: cpu %0d gave %0d bytes", i, nout[i]); end
      if (bad[i] != 0) begin failures++; $display("FAIL: cpu %0d: %0d wrong bytes", i, bad[i]); end
      if (led[i] != 8'h80) begin failures++; $display("FAIL: cpu %0d led %h", i, led[i]); end
      if (pre_clocks[i] < 74) begin failures++; $display("FAIL: cpu %0d only %0d power-up clocks", i, pre_clocks[i]); end
    end
    checks += 8;
    if (card0.crc_errors + card1.crc_errors + card2.crc_errors != 0) begin failures++; $display("FAIL: CRC errors"); end
    if (card0.cmds_seen[41] < 2) begin failures++; $display("FAIL: ACMD41 not retried"); end
    if (card0.cmds_seen[16] != 1) begin failures++; $display("FAIL: CMD16 missing on SDSC"); end
    if (card1.cmds_seen[16] != 0) begin failures++; $display("FAIL: CMD16 sent to SDHC"); end
    if (card2.cmds_seen[1] < 1) begin failures++; $display("FAIL: CMD1 fallback not used"); end
    if (card2.cmds_seen[41] != 4) begin failures++; $display("FAIL: %0d ACMD41 on card 2", card2.cmds_seen[41]); end
    if (card0.blocks_read != NB || card1.blocks_read != NB) begin failures++; $display("FAIL: block count"); end
    if (card0.cmds_seen[0] != 1 || card0.cmds_seen[8] != 1) begin failures++; $display("FAIL: CMD0/CMD8"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, led %h %h %h", led[0], led[1], led[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
