// tb_sd_rom: reads the firmware ROM back and checks its structure against
// the command sequence it must implement: the power-up sequence at the start,
// the SD commands used (CMD0, CMD8, CMD55, ACMD41, CMD1, CMD16 only for
// byte addressing, CMD17), the block count loaded for the read loop, that
// every branch target lies inside the program, and that the program ends
// with HALT. Two ROMs are checked: byte addressing and block addressing.
module tb_sd_rom;
  import sd_isa_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0]  addr;
  logic [31:0] d_byte, d_blk;
  int checks = 0, failures = 0;

  sd_rom #(.NUM_BLOCKS(7), .BLOCK_ADDR(1'b0)) rom_b (.clk, .rom_addr(addr), .rom_data(d_byte));
  sd_rom #(.NUM_BLOCKS(9), .BLOCK_ADDR(1'b1)) rom_h (.clk, .rom_addr(addr), .rom_data(d_blk));

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic scan(input bit hc, input int nblocks);
    instr_t prog [256];
    int     cmds [64];
    int     len, nblk_ok, halt_at;
    foreach (cmds[i]) cmds[i] = 0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); addr = 8'(a);
      @(negedge clk);
      prog[a] = instr_t'(hc ? d_blk : d_byte);
    end
    // program length: up to the last instruction that is not the HALT fill
    len = 0;
    for (int a = 0; a < 256; a++) if (prog[a] != instr_t'(enc(OP_HALT, 0, 0, 0, 0))) len = a + 1;
    halt_at = -1;
    nblk_ok = 0;
    for (int a = 0; a < len; a++) begin
      if (prog[a].op == OP_CMD) cmds[prog[a].imm[5:0]]++;
      if (prog[a].op inside {OP_BEQ, OP_BNE, OP_JMP})
        check($sformatf("branch at %0d to %0d outside program", a, prog[a].imm), int'(prog[a].imm) < len);
      if (prog[a].op == OP_LDI && prog[a].rd == 4'd7 && prog[a].imm == 16'(nblocks)) nblk_ok = 1;
      if (prog[a].op == OP_HALT && halt_at < 0) halt_at = a;
    end
    check("starts by clearing r0", prog[0] == instr_t'(enc(OP_LDI, 0, 0, 0, 0)));
    check("CS high before the power-up clocks", prog[2].op == OP_CS && prog[2].imm[0] == 1'b1);
    check("CMD0 used", cmds[0] == 1);
    check("CMD8 used", cmds[8] == 1);
    check("CMD55/ACMD41 used", cmds[55] == 1 && cmds[41] == 1);
    check("CMD1 fallback present", cmds[1] == 1);
    check("CMD16 only with byte addressing", cmds[16] == (hc ? 0 : 1));
    check("CMD17 used", cmds[17] == 1);
    check("block count loaded", nblk_ok == 1);
    check("HALT present", halt_at > 0);
    check("program fits the ROM", len < 256 && len > 40);
  endtask

  initial begin
    addr = 0;
    scan(1'b0, 7);
    scan(1'b1, 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
