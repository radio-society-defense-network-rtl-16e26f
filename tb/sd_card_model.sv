// sd_card_model: behavioural model of a microSD card in SPI mode, for
// testbenches only (not synthesizable logic).
//
// SPI mode 0: MOSI is sampled on rising SCLK edges, MISO changes on falling
// edges, 8-bit bytes MSB first while CS is low. A byte 01xxxxxx starts a
// 6-byte command frame; its CRC7 is checked (a bad CRC answers R1 = 0x09
// and is counted in crc_errors). Responses are queued and sent from the next
// byte slot on, after one 0xFF byte (NCR = 1):
//   CMD0  -> 0x01 (idle)          CMD8  -> R7 0x01 00 00 01 AA (or 0x05 if V1)
//   CMD55 -> R1                   ACMD41-> 0x01 for the first BUSY_POLLS tries,
//   CMD1  -> like ACMD41 (only if ACCEPT_CMD1, else 0x05)       then 0x00
//   CMD16 -> 0x00                 CMD17 -> 0x00, two 0xFF, 0xFE, 512 data
//                                          bytes, 2 CRC bytes
// With HIGH_CAPACITY the CMD17 argument is a block number, otherwise a byte
// address. `mem` holds the card contents and is filled by the testbench.
module sd_card_model #(
  parameter int unsigned MEM_BYTES     = 16384,
  parameter bit          HIGH_CAPACITY = 1'b0,
  parameter int unsigned BUSY_POLLS    = 3,
  parameter bit          ACCEPT_ACMD41 = 1'b1,
  parameter bit          ACCEPT_CMD1   = 1'b1
) (
  input  logic sclk,
  input  logic mosi,
  input  logic cs_n,
  output logic miso
);
  logic [7:0] mem [MEM_BYTES];

  logic [7:0] rx, tx;
  int         bitcnt;
  logic [7:0] q [$];
  logic [7:0] cmd [6];
  int         cmd_n;
  logic       app_cmd;
  int         polls;

  // statistics
  int cmds_seen [64];
  int crc_errors;
  int blocks_read;

  function automatic logic [6:0] crc7_calc(input logic [39:0] bits);
    logic [6:0] c;
    logic       fb;
    c = '0;
    for (int i = 39; i >= 0; i--) begin
      fb = c[6] ^ bits[i];
      c  = {c[5:0], 1'b0};
      if (fb) c = c ^ 7'h09;
    end
    return c;
  endfunction

  initial begin
    miso        = 1'b1;
    tx          = 8'hFF;
    bitcnt      = 0;
    cmd_n       = 0;
    app_cmd     = 1'b0;
    polls       = 0;
    crc_errors  = 0;
    blocks_read = 0;
    foreach (cmds_seen[i]) cmds_seen[i] = 0;
  end

  task automatic handle_cmd();
    logic [5:0]  idx;
    logic [31:0] arg;
    logic [6:0]  crc;
    int          base;
    idx = cmd[0][5:0];
    arg = {cmd[1], cmd[2], cmd[3], cmd[4]};
    crc = crc7_calc({cmd[0], cmd[1], cmd[2], cmd[3], cmd[4]});
    cmds_seen[idx]++;
    q.push_back(8'hFF);
    if (crc != cmd[5][7:1] || !cmd[5][0]) begin
      crc_errors++;
      q.push_back(8'h09);
      app_cmd = 1'b0;
      return;
    end
    case (idx)
      6'd0:  q.push_back(8'h01);
      6'd8:  begin q.push_back(8'h01); q.push_back(8'h00); q.push_back(8'h00);
                   q.push_back(8'h01); q.push_back(arg[7:0]); end
      6'd55: q.push_back(polls >= BUSY_POLLS ? 8'h00 : 8'h01);
      6'd41, 6'd1: begin
        if ((idx == 41 && app_cmd && ACCEPT_ACMD41) || (idx == 1 && ACCEPT_CMD1)) begin
          q.push_back(polls >= BUSY_POLLS ? 8'h00 : 8'h01);
          polls++;
        end else begin
          q.push_back(8'h05);
        end
      end
      6'd16: q.push_back(8'h00);
      6'd17: begin
        base = HIGH_CAPACITY ? int'(arg) * 512 : int'(arg);
        q.push_back(8'h00);
        q.push_back(8'hFF); q.push_back(8'hFF);
        q.push_back(8'hFE);
        for (int i = 0; i < 512; i++)
          q.push_back((base + i < MEM_BYTES) ? mem[base + i] : 8'h00);
        q.push_back(8'h12); q.push_back(8'h34);
        blocks_read++;
      end
      default: q.push_back(8'h05);
    endcase
    app_cmd = (idx == 55);
  endtask

  always @(negedge cs_n) begin
    bitcnt = 0;
    tx     = 8'hFF;
    miso   = 1'b1;
  end
  always @(posedge cs_n) miso = 1'b1;

  always @(posedge sclk) if (!cs_n) begin
    rx = {rx[6:0], mosi};
    bitcnt++;
    if (bitcnt == 8) begin
      bitcnt = 0;
      if (cmd_n > 0 || rx[7:6] == 2'b01) begin
        cmd[cmd_n] = rx;
        cmd_n++;
        if (cmd_n == 6) begin
          cmd_n = 0;
          q.delete();
          handle_cmd();
        end
      end
      tx = (q.size() > 0) ? q.pop_front() : 8'hFF;
    end
  end

  always @(negedge sclk) if (!cs_n) miso = tx[7 - bitcnt];
endmodule
