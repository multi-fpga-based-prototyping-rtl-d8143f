// Self-checking test of the 5-stage core against a 1-cycle synchronous
// memory.  The program exercises forwarding, a load-use stall, a branch
// loop with its delay slot, JAL/JR, MUL, LUI, SRA and SLT; results stored
// to memory are compared with values worked out by hand.  It also checks
// that a run of independent instructions retires one per cycle.
module tb_mcore_core;
  import mips_asm::*;
  logic clk = 0, rst_n = 0, en = 1;
  logic [31:0] if_addr, if_rdata, ls_addr, ls_wdata, ls_rdata, retired;
  logic ls_re, ls_we;
  logic [31:0] mem [1024];
  int checks = 0, failures = 0;

  mcore_core dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    if (en) begin
      if_rdata <= mem[if_addr[11:2]];
      ls_rdata <= mem[ls_addr[11:2]];
      if (ls_we) mem[ls_addr[11:2]] <= ls_wdata;
    end
  end

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    int ret0;
    for (int i = 0; i < 1024; i++) mem[i] = 0;
    mem[0]  = ADDIU(1, 0, 10);
    mem[1]  = ADDIU(2, 0, 0);
    mem[2]  = ADDIU(3, 0, 1);
    mem[3]  = ADDU(2, 2, 3);        // loop: sum += i
    mem[4]  = BNE(3, 1, -2);
    mem[5]  = ADDIU(3, 3, 1);       // delay slot
    mem[6]  = SW(2, 'h100, 0);
    mem[7]  = LW(4, 'h100, 0);
    mem[8]  = ADDIU(5, 4, 1);       // load-use
    mem[9]  = SW(5, 'h104, 0);
    mem[10] = JAL(16);
    mem[11] = ADDIU(6, 0, 7);       // delay slot of JAL
    mem[12] = SW(7, 'h108, 0);
    mem[13] = SW(31, 'h10c, 0);
    mem[14] = BEQ(0, 0, -1);
    mem[15] = NOP();
    mem[16] = ADDIU(8, 0, 6);
    mem[17] = MUL(7, 6, 8);
    mem[18] = LUI(9, 'h8000);
    mem[19] = SRA(10, 9, 4);
    mem[20] = SW(10, 'h110, 0);
    mem[21] = SLT(11, 9, 0);
    mem[22] = SW(11, 'h114, 0);
    mem[23] = JR(31);
    mem[24] = NOP();
    // straight-line block for the issue-rate check, entered at 0x200
    for (int k = 0; k < 20; k++) mem[128 + k] = ADDIU(12 + (k % 4), 0, k);
    mem[148] = BEQ(0, 0, -1);
    mem[149] = NOP();
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (300) @(posedge clk);
    check("sum 1..10", mem['h100/4], 55);
    check("load-use", mem['h104/4], 56);
    check("mul", mem['h108/4], 42);
    check("jal link", mem['h10c/4], 48);
    check("sra", mem['h110/4], 32'hF800_0000);
    check("slt", mem['h114/4], 1);
    // issue rate: restart at the straight-line block via a jump at 0
    rst_n = 0;
    mem[0] = J(128);
    mem[1] = NOP();
    @(posedge clk);
    rst_n = 1;
    wait (dut.pc_d == 32'h200 && dut.valid_d);
    repeat (4) @(posedge clk);
    ret0 = retired;
    repeat (10) @(posedge clk);
    // pipeline full: ten independent instructions retire in ten cycles
    check("one instruction per cycle", retired - ret0, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
