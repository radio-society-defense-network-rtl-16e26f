// sd_rom: instruction ROM of the SD card controller, holding its firmware.
//
// The firmware is assembled at elaboration time by the function `assemble`
// below, which plays the role of a small assembler: each line emits one
// 32-bit instruction (encoding in sd_isa_pkg) and two passes resolve the
// forward branch targets. The program:
//   1. With CS high and the slow clock, sends 10 bytes of 0xFF (80 clocks)
//      so the card enters its native mode; then pulls CS low.
//   2. CMD0 (go idle) until the card answers 0x01, up to 100 tries.
//   3. CMD8 (interface condition, argument 0x1AA); on an 0x01 answer reads
//      the four remaining R7 bytes.
//   4. Repeats CMD55 + ACMD41 (HCS set) until the card answers 0x00; if that
//      times out, repeats CMD1 instead, since some cards only accept one of
//      the two sequences.
//   5. For byte-addressed cards, CMD16 sets the block length to 512.
//   6. Switches to the fast SPI clock and reads NUM_BLOCKS blocks starting at
//      card address 0 with CMD17: waits for the 0xFE start token, hands the
//      512 data bytes to the output stream, discards the two CRC bytes.
//   7. Raises CS, shows 0x80 on the LEDs and halts.
// Errors show a code on the LEDs and stop the program in a self loop:
// 0x01 CMD0, 0x03 ACMD41 and CMD1 both timed out, 0x04 CMD16, 0x05 CMD17,
// 0x06 no data token.
// BLOCK_ADDR selects block addressing (cards above 2 GB) instead of byte
// addressing; like the number of blocks it is a firmware setting, as in the
// document. The command sequence follows the document's description; the
// encoding, the retry counts and the error codes are this design's own.
//
// Read port: rom_data is registered, one cycle after rom_addr.
module sd_rom
  import sd_isa_pkg::*;
#(
  parameter int unsigned NUM_BLOCKS   = 20,    // 512-byte blocks to read
  parameter bit          BLOCK_ADDR   = 1'b0,  // 1: SDHC block addressing
  parameter int unsigned INIT_RETRIES = 4000,  // ACMD41 / CMD1 tries
  parameter int unsigned DEPTH        = 256
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] rom_addr,
  output logic [31:0]              rom_data
);

  typedef logic [31:0] rom_t [DEPTH];

  // register names used by the firmware
  localparam int ZERO = 0, RSP = 1, FF = 2, CNT = 3, ARG = 4, EXP = 5,
                 BLK = 6, NBLK = 7, BYT = 8, TMO = 9, TMP = 10;

  // labels
  typedef enum int {
    L_DUMMY, L_CMD0, L_CMD8, L_R7, L_V1, L_A41, L_C1, L_READY, L_FAST, L_BLK,
    L_TOK, L_DATA, L_BYTE, L_E1, L_E3, L_E4, L_E5, L_E6, L_NUM
  } label_t;

`define EMIT(w) begin r[pc] = (w); pc = pc + 1; end
`define LABEL(l) lbl[l] = pc;

  function automatic rom_t assemble(int nblocks, bit block_addr, int retries);
    rom_t r;
    int   lbl [L_NUM];
    int   pc;
    for (int i = 0; i < DEPTH; i++) r[i] = enc(OP_HALT, 0, 0, 0, 0);
    for (int i = 0; i < L_NUM; i++) lbl[i] = 0;
    for (int pass = 0; pass < 2; pass++) begin
      pc = 0;
      // 1. power-up clocks
      `EMIT(enc(OP_LDI,  ZERO, 0, 0, 0))
      `EMIT(enc(OP_LDI,  FF,   0, 0, 'hFF))
      `EMIT(enc(OP_CS,   0,    0, 0, 1))          // CS high, slow clock
      `EMIT(enc(OP_LDI,  CNT,  0, 0, 10))
      `LABEL(L_DUMMY)
      `EMIT(enc(OP_SPI,  RSP,  FF, 0, 0))
      `EMIT(enc(OP_ADDI, CNT,  CNT, 0, -1))
      `EMIT(enc(OP_BNE,  0,    CNT, ZERO, lbl[L_DUMMY]))
      `EMIT(enc(OP_CS,   0,    0, 0, 0))          // CS low, slow clock
      // 2. CMD0
      `EMIT(enc(OP_LDI,  TMO,  0, 0, 100))
      `EMIT(enc(OP_LDI,  EXP,  0, 0, 1))
      `EMIT(enc(OP_LDI,  ARG,  0, 0, 0))
      `LABEL(L_CMD0)
      `EMIT(enc(OP_CMD,  RSP,  ARG, 0, 0))
      `EMIT(enc(OP_BEQ,  0,    RSP, EXP, lbl[L_CMD8]))
      `EMIT(enc(OP_ADDI, TMO,  TMO, 0, -1))
      `EMIT(enc(OP_BNE,  0,    TMO, ZERO, lbl[L_CMD0]))
      `EMIT(enc(OP_JMP,  0,    0, 0, lbl[L_E1]))
      // 3. CMD8
      `LABEL(L_CMD8)
      `EMIT(enc(OP_LDI,  ARG,  0, 0, 'h1AA))
      `EMIT(enc(OP_CMD,  RSP,  ARG, 0, 8))
      `EMIT(enc(OP_BNE,  0,    RSP, EXP, lbl[L_V1]))
      `EMIT(enc(OP_LDI,  CNT,  0, 0, 4))
      `LABEL(L_R7)
      `EMIT(enc(OP_SPI,  TMP,  FF, 0, 0))
      `EMIT(enc(OP_ADDI, CNT,  CNT, 0, -1))
      `EMIT(enc(OP_BNE,  0,    CNT, ZERO, lbl[L_R7]))
      // 4. ACMD41 loop, then CMD1 loop
      `LABEL(L_V1)
      `EMIT(enc(OP_LDI,  TMO,  0, 0, retries))
      `LABEL(L_A41)
      `EMIT(enc(OP_LDI,  ARG,  0, 0, 0))
      `EMIT(enc(OP_CMD,  RSP,  ARG, 0, 55))
      `EMIT(enc(OP_LDI,  ARG,  0, 0, 1))
      `EMIT(enc(OP_SHF,  ARG,  ARG, 0, 30))
      `EMIT(enc(OP_CMD,  RSP,  ARG, 0, 41))
      `EMIT(enc(OP_BEQ,  0,    RSP, ZERO, lbl[L_READY]))
      `EMIT(enc(OP_ADDI, TMO,  TMO, 0, -1))
      `EMIT(enc(OP_BNE,  0,    TMO, ZERO, lbl[L_A41]))
      `EMIT(enc(OP_LDI,  TMO,  0, 0, retries))
      `LABEL(L_C1)
      `EMIT(enc(OP_LDI,  ARG,  0, 0, 0))
      `EMIT(enc(OP_CMD,  RSP,  ARG, 0, 1))
      `EMIT(enc(OP_BEQ,  0,    RSP, ZERO, lbl[L_READY]))
      `EMIT(enc(OP_ADDI, TMO,  TMO, 0, -1))
      `EMIT(enc(OP_BNE,  0,    TMO, ZERO, lbl[L_C1]))
      `EMIT(enc(OP_JMP,  0,    0, 0, lbl[L_E3]))
      // 5. block length for byte-addressed cards
      `LABEL(L_READY)
      if (!block_addr) begin
        `EMIT(enc(OP_LDI,  ARG,  0, 0, 512))
        `EMIT(enc(OP_CMD,  RSP,  ARG, 0, 16))
        `EMIT(enc(OP_BNE,  0,    RSP, ZERO, lbl[L_E4]))
      end
      // 6. read blocks
      `LABEL(L_FAST)
      `EMIT(enc(OP_CS,   0,    0, 0, 2))          // CS low, fast clock
      `EMIT(enc(OP_LDI,  BLK,  0, 0, 0))
      `EMIT(enc(OP_LDI,  NBLK, 0, 0, nblocks))
      `EMIT(enc(OP_LDI,  EXP,  0, 0, 'hFE))
      `LABEL(L_BLK)
      if (block_addr) begin
        `EMIT(enc(OP_ADD,  ARG,  BLK, ZERO, 0))
      end else begin
        `EMIT(enc(OP_SHF,  ARG,  BLK, 0, 9))
      end
      `EMIT(enc(OP_CMD,  RSP,  ARG, 0, 17))
      `EMIT(enc(OP_BNE,  0,    RSP, ZERO, lbl[L_E5]))
      `EMIT(enc(OP_LDI,  TMO,  0, 0, 'hFFFF))
      `LABEL(L_TOK)
      `EMIT(enc(OP_SPI,  RSP,  FF, 0, 0))
      `EMIT(enc(OP_BEQ,  0,    RSP, EXP, lbl[L_DATA]))
      `EMIT(enc(OP_ADDI, TMO,  TMO, 0, -1))
      `EMIT(enc(OP_BNE,  0,    TMO, ZERO, lbl[L_TOK]))
      `EMIT(enc(OP_JMP,  0,    0, 0, lbl[L_E6]))
      `LABEL(L_DATA)
      `EMIT(enc(OP_LDI,  BYT,  0, 0, 512))
      `LABEL(L_BYTE)
      `EMIT(enc(OP_SPI,  RSP,  FF, 0, 0))
      `EMIT(enc(OP_OUT,  0,    RSP, 0, 0))
      `EMIT(enc(OP_ADDI, BYT,  BYT, 0, -1))
      `EMIT(enc(OP_BNE,  0,    BYT, ZERO, lbl[L_BYTE]))
      `EMIT(enc(OP_SPI,  RSP,  FF, 0, 0))          // CRC, discarded
      `EMIT(enc(OP_SPI,  RSP,  FF, 0, 0))
      `EMIT(enc(OP_ADDI, BLK,  BLK, 0, 1))
      `EMIT(enc(OP_BNE,  0,    BLK, NBLK, lbl[L_BLK]))
      // 7. finish
      `EMIT(enc(OP_CS,   0,    0, 0, 3))          // CS high
      `EMIT(enc(OP_SPI,  RSP,  FF, 0, 0))
      `EMIT(enc(OP_LED,  0,    0, 0, 'h80))
      `EMIT(enc(OP_HALT, 0,    0, 0, 0))
      // error handlers: show the code and stay here
      `LABEL(L_E1)
      `EMIT(enc(OP_LED,  0,    0, 0, 'h01))
      `EMIT(enc(OP_JMP,  0,    0, 0, pc))
      `LABEL(L_E3)
      `EMIT(enc(OP_LED,  0,    0, 0, 'h03))
      `EMIT(enc(OP_JMP,  0,    0, 0, pc))
      `LABEL(L_E4)
      `EMIT(enc(OP_LED,  0,    0, 0, 'h04))
      `EMIT(enc(OP_JMP,  0,    0, 0, pc))
      `LABEL(L_E5)
      `EMIT(enc(OP_LED,  0,    0, 0, 'h05))
      `EMIT(enc(OP_JMP,  0,    0, 0, pc))
      `LABEL(L_E6)
      `EMIT(enc(OP_LED,  0,    0, 0, 'h06))
      `EMIT(enc(OP_JMP,  0,    0, 0, pc))
    end
    return r;
  endfunction

`undef EMIT
`undef LABEL

  localparam rom_t ROM = assemble(NUM_BLOCKS, BLOCK_ADDR, INIT_RETRIES);

  always_ff @(posedge clk) rom_data <= ROM[rom_addr];

endmodule
