// sd_isa_pkg: instruction set of the SD card controller CPU.
//
// The controller is a small application-specific processor: 11 general
// registers (r0..r10), 32-bit instructions in a ROM, no data memory. Its 16
// instructions cover constants, arithmetic and bitwise operations, branches,
// raw SPI byte transfers, complete SD commands (framing and CRC7 done in
// hardware), direct control of the card's chip select, an LED error-code
// display, and handing a byte of card data to the rest of the system.
//
// Encoding (this design's own; only the kinds of instruction are given):
//   [31:28] opcode   [27:24] rd   [23:20] ra   [19:16] rb   [15:0] imm
//
//   LDI  rd, imm        rd = zero-extended imm
//   HALT                stop; `done` goes high
//   ADD  rd, ra, rb     rd = ra + rb
//   ADDI rd, ra, imm    rd = ra + sign-extended imm
//   AND  rd, ra, rb     rd = ra & rb
//   OR   rd, ra, rb     rd = ra | rb
//   XOR  rd, ra, rb     rd = ra ^ rb
//   SHF  rd, ra, imm    imm[5] = 0: rd = ra << imm[4:0]; 1: rd = ra >> imm[4:0]
//   BEQ  ra, rb, imm    if ra == rb jump to address imm
//   BNE  ra, rb, imm    if ra != rb jump to address imm
//   JMP  imm            jump to address imm
//   SPI  rd, ra         send ra[7:0] over SPI, rd = byte received
//   CMD  rd, ra, imm    send SD command imm[5:0] with argument ra and its
//                       CRC7, then clock 0xFF bytes until a byte with bit 7
//                       clear (the R1 response) arrives or 8 bytes passed;
//                       rd = that byte (0xFF if none)
//   CS   imm            card chip select = imm[0]; imm[1] = 1 selects the
//                       fast SPI clock, 0 the slow initialisation clock
//   LED  imm            show imm[7:0] on the error-code LEDs
//   OUT  ra             hand ra[7:0] to the output stream (waits for ready)
package sd_isa_pkg;

  typedef enum logic [3:0] {
    OP_LDI  = 4'h0,
    OP_HALT = 4'h1,
    OP_ADD  = 4'h2,
    OP_ADDI = 4'h3,
    OP_AND  = 4'h4,
    OP_OR   = 4'h5,
    OP_XOR  = 4'h6,
    OP_SHF  = 4'h7,
    OP_BEQ  = 4'h8,
    OP_BNE  = 4'h9,
    OP_JMP  = 4'hA,
    OP_SPI  = 4'hB,
    OP_CMD  = 4'hC,
    OP_CS   = 4'hD,
    OP_LED  = 4'hE,
    OP_OUT  = 4'hF
  } opcode_t;

  localparam int unsigned NUM_REGS = 11;

  typedef struct packed {
    opcode_t     op;
    logic [3:0]  rd;
    logic [3:0]  ra;
    logic [3:0]  rb;
    logic [15:0] imm;
  } instr_t;

  function automatic logic [31:0] enc(opcode_t op, int rd, int ra, int rb, int imm);
    instr_t i;
    i.op  = op;
    i.rd  = 4'(rd);
    i.ra  = 4'(ra);
    i.rb  = 4'(rb);
    i.imm = 16'(imm);
    return i;
  endfunction

  // CRC7 (polynomial x^7 + x^3 + 1) over the first 40 bits of an SD command
  // frame, MSB first.
  function automatic logic [6:0] crc7(input logic [39:0] bits);
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

endpackage
