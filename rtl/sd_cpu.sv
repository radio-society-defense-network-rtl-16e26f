// sd_cpu: application-specific processor that drives a microSD card in SPI
// mode and streams the card's data bytes to the rest of the system.
//
// The CPU starts executing its ROM at address 0 after reset; the firmware in
// sd_rom initialises the card and reads the fingerprint blocks. It has 11
// 32-bit registers, no data memory and the 16 instructions of sd_isa_pkg.
// Execution is multi-cycle: one cycle to fetch (the ROM read is registered),
// one to execute; SPI, CMD and OUT instructions then wait for their transfer
// or handshake. The CMD instruction builds the 6-byte command frame
// {01, index, argument, CRC7, 1} itself, sends it, then clocks 0xFF bytes
// until a response byte with bit 7 clear arrives (at most 8 bytes).
//
// Interface: rom_addr/rom_data to the instruction ROM (data one cycle after
// the address); the card's SPI pins including chip select, which only the CS
// instruction moves; m_tvalid/m_tdata/m_tready, the stream of bytes handed
// out by OUT; led, the code last written by LED; done, high after HALT.
// The SPI clock has two speeds: SLOW_HALF gives 400 kHz from 100 MHz for
// initialisation, FAST_HALF 25 MHz for reading.
// The idea of a register-only CPU with SD-specific instructions, the 11
// registers, 32-bit instructions, LED error codes and direct chip-select
// control follow the document; the micro-architecture, encoding and the two
// clock speeds are this design's own.
module sd_cpu
  import sd_isa_pkg::*;
#(
  parameter int unsigned PC_W      = 8,
  parameter int unsigned SLOW_HALF = 125,
  parameter int unsigned FAST_HALF = 2
) (
  input  logic            clk,
  input  logic            rst,
  output logic [PC_W-1:0] rom_addr,
  input  logic [31:0]     rom_data,
  // SD card SPI pins
  output logic            sd_sclk,
  output logic            sd_mosi,
  input  logic            sd_miso,
  output logic            sd_cs_n,
  // data stream out
  output logic            m_tvalid,
  output logic [7:0]      m_tdata,
  input  logic            m_tready,
  // status
  output logic [7:0]      led,
  output logic            done
);

  typedef enum logic [2:0] {
    C_FETCH, C_EXEC, C_SPI, C_CMD, C_POLL, C_OUT, C_HALT
  } state_t;
  state_t state;

  logic [PC_W-1:0] pc;
  logic [31:0]     regs [NUM_REGS];
  instr_t          ir;
  logic [31:0]     va, vb, simm;
  logic            fast;

  assign rom_addr = pc;
  assign ir       = instr_t'(rom_data);
  assign va       = (ir.ra < 4'(NUM_REGS)) ? regs[ir.ra] : 32'd0;
  assign vb       = (ir.rb < 4'(NUM_REGS)) ? regs[ir.rb] : 32'd0;
  assign simm     = 32'($signed(ir.imm));

  // SPI byte engine
  logic       spi_valid, spi_ready, spi_rx_valid;
  logic [7:0] spi_tx, spi_rx;

  spi_controller #(.WIDTH(8)) u_spi (
    .clk, .rst,
    .half_period(fast ? 16'(FAST_HALF) : 16'(SLOW_HALF)),
    .s_tvalid(spi_valid), .s_tdata(spi_tx), .s_tready(spi_ready),
    .m_tvalid(spi_rx_valid), .m_tdata(spi_rx),
    .sclk(sd_sclk), .mosi(sd_mosi), .miso(sd_miso)
  );

  // command frame shifting
  logic [47:0] frame;
  logic [2:0]  nbytes;      // frame bytes / poll bytes sent
  logic        in_flight;   // a byte is on the wire
  logic [3:0]  dest;

  function automatic logic [47:0] cmd_frame(logic [5:0] idx, logic [31:0] arg);
    logic [39:0] head;
    head = {2'b01, idx, arg};
    return {head, crc7(head), 1'b1};
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= C_FETCH;
      pc        <= '0;
      fast      <= 1'b0;
      sd_cs_n   <= 1'b1;
      led       <= '0;
      done      <= 1'b0;
      spi_valid <= 1'b0;
      spi_tx    <= 8'hFF;
      m_tvalid  <= 1'b0;
      m_tdata   <= '0;
      frame     <= '0;
      nbytes    <= '0;
      in_flight <= 1'b0;
      dest      <= '0;
      for (int i = 0; i < NUM_REGS; i++) regs[i] <= '0;
    end else begin
      spi_valid <= 1'b0;
      case (state)
        C_FETCH: state <= C_EXEC;

        C_EXEC: begin
          state <= C_FETCH;
          pc    <= pc + 1'b1;
          dest  <= ir.rd;
          case (ir.op)
            OP_LDI:  regs[ir.rd] <= {16'd0, ir.imm};
            OP_HALT: begin done <= 1'b1; pc <= pc; state <= C_HALT; end
            OP_ADD:  regs[ir.rd] <= va + vb;
            OP_ADDI: regs[ir.rd] <= va + simm;
            OP_AND:  regs[ir.rd] <= va & vb;
            OP_OR:   regs[ir.rd] <= va | vb;
            OP_XOR:  regs[ir.rd] <= va ^ vb;
            OP_SHF:  regs[ir.rd] <= ir.imm[5] ? (va >> ir.imm[4:0]) : (va << ir.imm[4:0]);
            OP_BEQ:  if (va == vb) pc <= PC_W'(ir.imm);
            OP_BNE:  if (va != vb) pc <= PC_W'(ir.imm);
            OP_JMP:  pc <= PC_W'(ir.imm);
            OP_SPI: begin
              spi_tx    <= va[7:0];
              spi_valid <= 1'b1;
              in_flight <= 1'b1;
              pc        <= pc;
              state     <= C_SPI;
            end
            OP_CMD: begin
              frame     <= cmd_frame(ir.imm[5:0], va);
              nbytes    <= '0;
              in_flight <= 1'b0;
              pc        <= pc;
              state     <= C_CMD;
            end
            OP_CS:   begin sd_cs_n <= ir.imm[0]; fast <= ir.imm[1]; end
            OP_LED:  led <= ir.imm[7:0];
            OP_OUT: begin
              m_tvalid <= 1'b1;
              m_tdata  <= va[7:0];
              pc       <= pc;
              state    <= C_OUT;
            end
            default: ;
          endcase
        end

        C_SPI: if (spi_rx_valid) begin
          if (dest < 4'(NUM_REGS)) regs[dest] <= {24'd0, spi_rx};
          in_flight <= 1'b0;
          pc        <= pc + 1'b1;
          state     <= C_FETCH;
        end

        C_CMD: begin
          if (!in_flight && spi_ready && !spi_valid) begin
            spi_tx    <= frame[47:40];
            spi_valid <= 1'b1;
            in_flight <= 1'b1;
            frame     <= {frame[39:0], 8'hFF};
          end else if (in_flight && spi_rx_valid) begin
            in_flight <= 1'b0;
            if (nbytes == 3'd5) begin
              nbytes <= '0;
              state  <= C_POLL;
            end else begin
              nbytes <= nbytes + 1'b1;
            end
          end
        end

        C_POLL: begin
          if (!in_flight && spi_ready && !spi_valid) begin
            spi_tx    <= 8'hFF;
            spi_valid <= 1'b1;
            in_flight <= 1'b1;
          end else if (in_flight && spi_rx_valid) begin
            in_flight <= 1'b0;
            nbytes    <= nbytes + 1'b1;
            if (!spi_rx[7] || nbytes == 3'd7) begin
              if (dest < 4'(NUM_REGS)) regs[dest] <= {24'd0, spi_rx};
              pc    <= pc + 1'b1;
              state <= C_FETCH;
            end
          end
        end

        C_OUT: if (m_tready) begin
          m_tvalid <= 1'b0;
          pc       <= pc + 1'b1;
          state    <= C_FETCH;
        end

        C_HALT: ;
        default: state <= C_FETCH;
      endcase
    end
  end

  // an OUT byte stays on the stream until it is taken
  property p_out_stable;
    @(posedge clk) disable iff (rst) (m_tvalid && !m_tready) |=> (m_tvalid && $stable(m_tdata));
  endproperty
  assert property (p_out_stable);

endmodule
