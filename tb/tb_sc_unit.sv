// Self-checking test of one ScalableCore Unit standing alone (no
// neighbours).  A program placed in the SRAM fills 8 words with i*i, copies
// them with a DMA PUT addressed to its own node (through the router's local
// port), polls the received-word counter, then reports a result and halts.
// Checked: the copied words in the SRAM, the result, the halt, and the
// emulation cost: FPGA clocks per simulated cycle stay at or below 40.
module tb_sc_unit;
  import sc_pkg::*;
  import mips_asm::*;
  logic clk = 0, clk_ser = 0, arst_n = 0, run = 1;
  logic [3:0] ser_in = '0, ser_out;
  logic [MEM_AW+1:0] sram_addr;
  logic [7:0] dq_o, dq_i;
  logic dq_oe, ce_n, oe_n, we_n, halted;
  logic [31:0] vcycle, retired, result, wait_cycles;
  logic [7:0] link_errors;
  int checks = 0, failures = 0;

  sc_unit dut (.clk, .clk_ser, .arst_n, .run, .halt_cycle(32'd0), .my_x(4'd2), .my_y(4'd1),
               .nbr_present(4'b0000), .ser_in, .ser_out, .sram_addr, .sram_dq_o(dq_o),
               .sram_dq_oe(dq_oe), .sram_dq_i(dq_i), .sram_ce_n(ce_n), .sram_oe_n(oe_n),
               .sram_we_n(we_n), .vcycle, .retired, .result, .halted, .link_errors, .wait_cycles);
  sram_model u_sram (.clk, .addr(sram_addr), .dq_o, .dq_oe, .dq_i, .ce_n, .oe_n, .we_n);
  always #12 clk = ~clk;
  always #6 clk_ser = ~clk_ser;

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    logic [31:0] prog [27];
    int c0, v0;
    prog = '{LUI(20, 8), ADDIU(1, 0, 0), ADDIU(2, 0, 8), ADDIU(3, 0, 'h400),
             MUL(4, 1, 1), SW(4, 0, 3), ADDIU(1, 1, 1), BNE(1, 2, -4), ADDIU(3, 3, 4),
             LW(5, R_NODE_ID*4, 20), SW(5, R_DMA_DST*4, 20),
             ADDIU(6, 0, 'h100), SW(6, R_DMA_LADDR*4, 20),
             ADDIU(6, 0, 'h200), SW(6, R_DMA_RADDR*4, 20),
             SW(2, R_DMA_LEN*4, 20), ADDIU(7, 0, 1), SW(7, R_DMA_CTRL*4, 20),
             LW(8, R_DMA_RCNT*4, 20), BNE(8, 2, -2), NOP(),
             LW(9, 'h800 + 7*4, 0), ADDIU(9, 9, 1000), SW(9, R_RESULT*4, 20),
             SW(0, R_HALT*4, 20), BEQ(0, 0, -1), NOP()};
    for (int i = 0; i < 27; i++) u_sram.poke(i, prog[i]);
    repeat (3) @(posedge clk);
    arst_n = 1;
    repeat (100) @(posedge clk);
    c0 = 0; v0 = vcycle;
    repeat (400) @(posedge clk);
    checks++;
    if ((vcycle - v0) * 40 < 400) begin
      failures++; $display("FAIL %0d simulated cycles in 400 clocks", vcycle - v0);
    end
    wait (halted);
    c0 = int'(retired);
    repeat (200) @(posedge clk);
    check("no instruction retires after halt", retired, 32'(c0));
    for (int i = 0; i < 8; i++) check($sformatf("copied word %0d", i), u_sram.peek('h200 + i), 32'(i * i));
    check("result", result, 1049);
    check("link errors", 32'(link_errors), 0);
    $display("simulated cycles %0d, instructions %0d", vcycle, retired);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
