// Processor core of an M-Core node: a 5-stage, single-issue, in-order
// pipeline executing an integer subset of the MIPS32 instruction set.
//
// Stages IF, ID, EX, MEM, WB.  The core has two memory ports, instruction
// fetch and load/store, both to a synchronous memory with one cycle of
// latency: an address given in one cycle returns its data in the next.  So
// the fetched instruction arrives directly in ID, and load data arrives in
// WB.  Results are forwarded from MEM and WB to EX; a load followed by a
// dependent instruction stalls one cycle (during the stall the ID
// instruction is fetched again so that it is still there next cycle).
// Branches and jumps resolve in EX and keep the MIPS branch delay slot: the
// instruction behind the branch executes, the one fetched after it is
// squashed.  Instructions: ADDU SUBU AND OR XOR NOR SLT SLTU SLL SRL SRA
// SLLV SRLV JR JALR, ADDIU SLTI SLTIU ANDI ORI XORI LUI LW SW BEQ BNE BLEZ
// BGTZ J JAL and MUL.  ADD/ADDI/SUB behave as their unsigned forms (no
// overflow trap); other opcodes execute as no-ops.  There are no exceptions,
// interrupts, byte/halfword accesses, HI/LO or coprocessors.
// Every register updates only when en is high (the simulated clock edge).
// Interface: if_addr (byte address; always reading), if_rdata;
// ls_re/ls_we/ls_addr/ls_wdata (byte address, word accesses), ls_rdata.
// The description gives only the ISA family, 5 stages, single issue and the
// two memory ports; the instruction subset and the hazard handling are this
// design's choices.
module mcore_core (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic [31:0] if_addr,
  input  logic [31:0] if_rdata,
  output logic        ls_re,
  output logic        ls_we,
  output logic [31:0] ls_addr,
  output logic [31:0] ls_wdata,
  input  logic [31:0] ls_rdata,
  output logic [31:0] retired       // instructions completed (WB)
);
  typedef enum logic [3:0] {
    A_ADD, A_SUB, A_AND, A_OR, A_XOR, A_NOR, A_SLT, A_SLTU,
    A_SLL, A_SRL, A_SRA, A_LUI, A_MUL, A_SLLV, A_SRLV
  } alu_e;
  typedef enum logic [2:0] {BR_NONE, BR_EQ, BR_NE, BR_LEZ, BR_GTZ, BR_J, BR_JR} br_e;

  typedef struct packed {
    alu_e       alu;
    logic       use_imm;
    logic       zext;      // zero-extend the immediate
    logic       reg_write;
    logic       link;      // result is PC+8
    logic       is_load;
    logic       is_store;
    br_e        br;
    logic [4:0] dest;
  } ctrl_t;

  typedef struct packed {
    logic        valid;
    ctrl_t       c;
    logic [31:0] pc;
    logic [31:0] a;        // rs value
    logic [31:0] b;        // rt value
    logic [4:0]  rs;
    logic [4:0]  rt;
    logic [31:0] imm;      // extended immediate
    logic [4:0]  shamt;
    logic [25:0] jidx;
  } ex_t;

  typedef struct packed {
    logic        valid;
    logic        reg_write;
    logic        is_load;
    logic        is_store;
    logic [4:0]  dest;
    logic [31:0] res;
    logic [31:0] sdata;
  } mem_t;

  typedef struct packed {
    logic        valid;
    logic        reg_write;
    logic        is_load;
    logic [4:0]  dest;
    logic [31:0] res;
  } wb_t;

  logic [31:0] rf [32];
  logic [31:0] pc_f, pc_d;
  logic        valid_d;
  ex_t         ex;
  mem_t        mem;
  wb_t         wb;

  // ---------------------------------------------------------------- decode
  function automatic ctrl_t decode(input logic [31:0] ins);
    ctrl_t c;
    logic [5:0] op, fn;
    op = ins[31:26];
    fn = ins[5:0];
    c = '0;
    c.alu  = A_ADD;
    c.br   = BR_NONE;
    c.dest = ins[20:16];
    unique case (op)
      6'h00: begin
        c.dest = ins[15:11];
        c.reg_write = 1'b1;
        unique case (fn)
          6'h00: c.alu = A_SLL;
          6'h02: c.alu = A_SRL;
          6'h03: c.alu = A_SRA;
          6'h04: c.alu = A_SLLV;
          6'h06: c.alu = A_SRLV;
          6'h08: begin c.br = BR_JR; c.reg_write = 1'b0; end
          6'h09: begin c.br = BR_JR; c.link = 1'b1; end
          6'h20, 6'h21: c.alu = A_ADD;
          6'h22, 6'h23: c.alu = A_SUB;
          6'h24: c.alu = A_AND;
          6'h25: c.alu = A_OR;
          6'h26: c.alu = A_XOR;
          6'h27: c.alu = A_NOR;
          6'h2a: c.alu = A_SLT;
          6'h2b: c.alu = A_SLTU;
          default: c.reg_write = 1'b0;
        endcase
      end
      6'h1c: if (fn == 6'h02) begin c.alu = A_MUL; c.dest = ins[15:11]; c.reg_write = 1'b1; end
      6'h02: c.br = BR_J;
      6'h03: begin c.br = BR_J; c.link = 1'b1; c.reg_write = 1'b1; c.dest = 5'd31; end
      6'h04: c.br = BR_EQ;
      6'h05: c.br = BR_NE;
      6'h06: c.br = BR_LEZ;
      6'h07: c.br = BR_GTZ;
      6'h08, 6'h09: begin c.alu = A_ADD;  c.use_imm = 1'b1; c.reg_write = 1'b1; end
      6'h0a: begin c.alu = A_SLT;  c.use_imm = 1'b1; c.reg_write = 1'b1; end
      6'h0b: begin c.alu = A_SLTU; c.use_imm = 1'b1; c.reg_write = 1'b1; end
      6'h0c: begin c.alu = A_AND;  c.use_imm = 1'b1; c.zext = 1'b1; c.reg_write = 1'b1; end
      6'h0d: begin c.alu = A_OR;   c.use_imm = 1'b1; c.zext = 1'b1; c.reg_write = 1'b1; end
      6'h0e: begin c.alu = A_XOR;  c.use_imm = 1'b1; c.zext = 1'b1; c.reg_write = 1'b1; end
      6'h0f: begin c.alu = A_LUI;  c.use_imm = 1'b1; c.reg_write = 1'b1; end
      6'h23: begin c.alu = A_ADD;  c.use_imm = 1'b1; c.reg_write = 1'b1; c.is_load = 1'b1; end
      6'h2b: begin c.alu = A_ADD;  c.use_imm = 1'b1; c.is_store = 1'b1; end
      default: ;
    endcase
    if (c.dest == 5'd0) c.reg_write = 1'b0;
    return c;
  endfunction

  // ---------------------------------------------------------------- ID
  logic [31:0] ins_d;
  ctrl_t       c_d;
  logic [4:0]  rs_d, rt_d;
  logic [31:0] rs_val, rt_val;
  logic        stall;
  logic [31:0] wb_val;

  assign ins_d  = valid_d ? if_rdata : 32'h0;
  assign c_d    = decode(ins_d);
  assign rs_d   = ins_d[25:21];
  assign rt_d   = ins_d[20:16];
  assign wb_val = wb.is_load ? ls_rdata : wb.res;

  // register file read, bypassing the value written in this cycle
  always_comb begin
    rs_val = rf[rs_d];
    rt_val = rf[rt_d];
    if (wb.valid && wb.reg_write && wb.dest == rs_d) rs_val = wb_val;
    if (wb.valid && wb.reg_write && wb.dest == rt_d) rt_val = wb_val;
    if (rs_d == 5'd0) rs_val = '0;
    if (rt_d == 5'd0) rt_val = '0;
  end

  // load-use hazard (conservatively compares both source fields)
  assign stall = valid_d && ex.valid && ex.c.is_load && ex.c.reg_write &&
                 (ex.c.dest == rs_d || ex.c.dest == rt_d);

  assign if_addr = stall ? pc_d : pc_f;

  // ---------------------------------------------------------------- EX
  logic [31:0] fa, fb, opb, alu_res, res_x;
  logic        taken;
  logic [31:0] target;

  always_comb begin
    fa = ex.a;
    fb = ex.b;
    if (wb.valid && wb.reg_write && wb.dest == ex.rs) fa = wb_val;
    if (wb.valid && wb.reg_write && wb.dest == ex.rt) fb = wb_val;
    if (mem.valid && mem.reg_write && !mem.is_load && mem.dest == ex.rs) fa = mem.res;
    if (mem.valid && mem.reg_write && !mem.is_load && mem.dest == ex.rt) fb = mem.res;
    if (ex.rs == 5'd0) fa = '0;
    if (ex.rt == 5'd0) fb = '0;
    opb = ex.c.use_imm ? ex.imm : fb;
    unique case (ex.c.alu)
      A_ADD:  alu_res = fa + opb;
      A_SUB:  alu_res = fa - opb;
      A_AND:  alu_res = fa & opb;
      A_OR:   alu_res = fa | opb;
      A_XOR:  alu_res = fa ^ opb;
      A_NOR:  alu_res = ~(fa | opb);
      A_SLT:  alu_res = {31'd0, $signed(fa) < $signed(opb)};
      A_SLTU: alu_res = {31'd0, fa < opb};
      A_SLL:  alu_res = fb << ex.shamt;
      A_SRL:  alu_res = fb >> ex.shamt;
      A_SRA:  alu_res = 32'($signed(fb) >>> ex.shamt);
      A_SLLV: alu_res = fb << fa[4:0];
      A_SRLV: alu_res = fb >> fa[4:0];
      A_LUI:  alu_res = {ex.imm[15:0], 16'd0};
      A_MUL:  alu_res = fa * fb;
      default: alu_res = '0;
    endcase
    res_x = ex.c.link ? ex.pc + 32'd8 : alu_res;
    unique case (ex.c.br)
      BR_EQ:   taken = (fa == fb);
      BR_NE:   taken = (fa != fb);
      BR_LEZ:  taken = ($signed(fa) <= 0);
      BR_GTZ:  taken = ($signed(fa) > 0);
      BR_J,
      BR_JR:   taken = 1'b1;
      default: taken = 1'b0;
    endcase
    taken = taken && ex.valid;
    unique case (ex.c.br)
      BR_J:    target = {ex.pc[31:28], ex.jidx, 2'b00};
      BR_JR:   target = fa;
      default: target = ex.pc + 32'd4 + {ex.imm[29:0], 2'b00};
    endcase
  end

  // ---------------------------------------------------------------- MEM
  assign ls_addr  = mem.res;
  assign ls_wdata = mem.sdata;
  assign ls_we    = mem.valid && mem.is_store;
  assign ls_re    = mem.valid && mem.is_load;

  // ---------------------------------------------------------------- update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_f    <= '0;
      pc_d    <= '0;
      valid_d <= 1'b0;
      ex      <= '0;
      mem     <= '0;
      wb      <= '0;
      retired <= '0;
      for (int i = 0; i < 32; i++) rf[i] <= '0;
    end else if (en) begin
      // IF / ID
      if (taken) begin
        pc_f    <= target;
        valid_d <= 1'b0;
      end else if (!stall) begin
        pc_f    <= pc_f + 32'd4;
        pc_d    <= pc_f;
        valid_d <= 1'b1;
      end
      // ID -> EX
      if (stall) begin
        ex.valid <= 1'b0;
        ex.c     <= '0;
      end else begin
        ex.valid <= valid_d;
        ex.c     <= decode(ins_d);
        ex.pc    <= pc_d;
        ex.a     <= rs_val;
        ex.b     <= rt_val;
        ex.rs    <= rs_d;
        ex.rt    <= rt_d;
        ex.imm   <= c_d.zext ? {16'd0, ins_d[15:0]} : {{16{ins_d[15]}}, ins_d[15:0]};
        ex.shamt <= ins_d[10:6];
        ex.jidx  <= ins_d[25:0];
      end
      // EX -> MEM
      mem.valid     <= ex.valid;
      mem.reg_write <= ex.valid && ex.c.reg_write;
      mem.is_load   <= ex.c.is_load;
      mem.is_store  <= ex.c.is_store;
      mem.dest      <= ex.c.dest;
      mem.res       <= res_x;
      mem.sdata     <= fb;
      // MEM -> WB
      wb.valid     <= mem.valid;
      wb.reg_write <= mem.reg_write;
      wb.is_load   <= mem.is_load;
      wb.dest      <= mem.dest;
      wb.res       <= mem.res;
      // WB
      if (wb.valid && wb.reg_write) rf[wb.dest] <= wb_val;
      if (wb.valid) retired <= retired + 1'b1;
    end
  end

endmodule
