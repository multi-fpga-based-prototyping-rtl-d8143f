// Behavioural model of the unit's asynchronous SRAM chip, 8 bit x 512K.
// Reads are combinational from the address; a byte is stored at a rising
// clk edge while CE# and WE# are low.  Contents start at zero.
module sram_model #(
  parameter int unsigned AW = 19
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic [7:0]    dq_o,
  input  logic          dq_oe,
  output logic [7:0]    dq_i,
  input  logic          ce_n,
  input  logic          oe_n,
  input  logic          we_n
);
  logic [7:0] mem [2**AW];
  initial for (int i = 0; i < 2**AW; i++) mem[i] = '0;
  assign dq_i = (!ce_n && !oe_n) ? mem[addr] : 8'h00;
  always @(posedge clk) if (!ce_n && !we_n && dq_oe) mem[addr] <= dq_o;
  // backdoor word access, little-endian
  function automatic void poke(input int unsigned waddr, input logic [31:0] w);
    for (int b = 0; b < 4; b++) mem[waddr*4 + b] = w[8*b +: 8];
  endfunction
  function automatic logic [31:0] peek(input int unsigned waddr);
    return {mem[waddr*4+3], mem[waddr*4+2], mem[waddr*4+1], mem[waddr*4]};
  endfunction
endmodule
