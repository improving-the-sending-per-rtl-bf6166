// sep_core: the Sending Embedded Processor (SEP), a small RISC core
// specialised for large-send offload.
//
// Following the document, the core has three pipeline stages: fetch from its
// own instruction memory, decode/execute with register read, and write-back
// to the destination register. It has no floating point and no data cache,
// and its instructions are only those the LSO program needs: loads, stores,
// arithmetic/logic operations and conditional branches (encoding in lso_pkg,
// this design's own). Registers are 16 x 32 bits, r0 reading as zero.
//
// How it works: the fetch address is presented to the synchronous instruction
// memory at each step, so the instruction in decode/execute is the one fetched
// at the previous step. A taken branch or jump in decode/execute steers that
// same fetch to its target, so no wrong-path instruction enters the pipe.
// The write-back stage's result is forwarded (bypassed) to decode/execute.
// Loads and stores access the local bus from decode/execute and hold the
// whole pipeline until the bus answers; while the DMA owns the bus this is
// where the core idles.
//
// Timing: the core advances on clock-enable cycles (`ce`, one in five fast
// clocks at the document's DMA/SEP clock ratio) unless a bus access is not yet
// ready. Counters report executed instructions and idle (stalled) steps.
module sep_core
  import lso_pkg::*;
#(
  parameter int unsigned IM_AW = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce,
  // instruction memory
  output logic             im_en,
  output logic [IM_AW-1:0] im_addr,
  input  logic [31:0]      im_rdata,
  // local bus
  output lb_req_t          lb,
  output logic             lb_done,
  input  logic             lb_rdy,
  input  logic [BUS_W-1:0] lb_rdata,
  // performance counters
  output logic [31:0]      instr_count,
  output logic [31:0]      idle_count
);
  logic [31:0]      rf [NREGS];
  logic [IM_AW-1:0] pc, f_pc;
  logic             f_valid;
  logic             w_valid;
  logic [3:0]       w_rd;
  logic [31:0]      w_val;

  instr_t ins;
  opcode_e op;
  assign ins = instr_t'(im_rdata);
  assign op  = opcode_e'(ins.op);

  function automatic logic [31:0] rd_reg(input logic [3:0] r);
    if (r == 4'd0)                return '0;
    else if (w_valid && w_rd == r) return w_val;   // bypass from write-back
    else                          return rf[r];
  endfunction

  logic [31:0] v_rs1, v_rs2, v_rd, simm, zimm, alu, mem_addr32, ldata;
  assign v_rs1 = rd_reg(ins.rs1);
  assign v_rs2 = rd_reg(ins.imm[17:14]);
  assign v_rd  = rd_reg(ins.rd);
  assign simm  = {{14{ins.imm[17]}}, ins.imm};
  assign zimm  = {14'd0, ins.imm};
  assign mem_addr32 = v_rs1 + simm;

  logic is_load, is_store, is_mem, is_half, is_branch, taken, redirect, writes;
  logic [IM_AW-1:0] target;

  always_comb begin
    is_load   = (op == OP_LW) || (op == OP_LHU);
    is_store  = (op == OP_SW) || (op == OP_SH);
    is_half   = (op == OP_LHU) || (op == OP_SH);
    is_branch = (op == OP_BEQ) || (op == OP_BNE) || (op == OP_BLTU) || (op == OP_BGEU);
    is_mem    = is_load || is_store;
    unique case (op)
      OP_BEQ:  taken = (v_rd == v_rs1);
      OP_BNE:  taken = (v_rd != v_rs1);
      OP_BLTU: taken = (v_rd <  v_rs1);
      OP_BGEU: taken = (v_rd >= v_rs1);
      default: taken = 1'b0;
    endcase
    redirect = f_valid && (taken || op == OP_JAL || op == OP_JR);
    target   = (op == OP_JR) ? v_rs1[IM_AW-1:0] : f_pc + simm[IM_AW-1:0];
    writes   = !(is_store || is_branch || op == OP_JR) && ins.rd != 4'd0;

    unique case (op)
      OP_ADD:   alu = v_rs1 + v_rs2;
      OP_SUB:   alu = v_rs1 - v_rs2;
      OP_AND:   alu = v_rs1 & v_rs2;
      OP_OR:    alu = v_rs1 | v_rs2;
      OP_XOR:   alu = v_rs1 ^ v_rs2;
      OP_SLL:   alu = v_rs1 << v_rs2[4:0];
      OP_SRL:   alu = v_rs1 >> v_rs2[4:0];
      OP_SLTU:  alu = {31'd0, v_rs1 < v_rs2};
      OP_ADDI:  alu = v_rs1 + simm;
      OP_ANDI:  alu = v_rs1 & zimm;
      OP_ORI:   alu = v_rs1 | zimm;
      OP_XORI:  alu = v_rs1 ^ zimm;
      OP_SLLI:  alu = v_rs1 << ins.imm[4:0];
      OP_SRLI:  alu = v_rs1 >> ins.imm[4:0];
      OP_SLTIU: alu = {31'd0, v_rs1 < simm};
      OP_LUI:   alu = {ins.imm, 14'd0};
      OP_JAL:   alu = 32'(f_pc) + 32'd1;
      default:  alu = '0;
    endcase
  end

  // local bus request, big-endian byte lanes
  logic [2:0] boff;
  assign boff = mem_addr32[2:0];
  always_comb begin
    lb.req   = f_valid && is_mem;
    lb.we    = is_store;
    lb.addr  = mem_addr32[LB_AW-1:0];
    lb.be    = '0;
    if (is_half) begin
      lb.be[{boff[2:1], 1'b0}]   = 1'b1;
      lb.be[{boff[2:1], 1'b1}]   = 1'b1;
      lb.wdata = {4{v_rd[15:0]}};
      ldata    = {16'd0, lb_rdata[63 - 16*boff[2:1] -: 16]};
    end else begin
      lb.be    = boff[2] ? 8'hF0 : 8'h0F;
      lb.wdata = {2{v_rd}};
      ldata    = boff[2] ? lb_rdata[31:0] : lb_rdata[63:32];
    end
  end

  logic stall, adv;
  assign stall   = f_valid && is_mem && !lb_rdy;
  assign adv     = ce && !stall;
  assign lb_done = adv && f_valid && is_mem;

  assign im_en   = adv;
  assign im_addr = redirect ? target : pc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc          <= '0;
      f_pc        <= '0;
      f_valid     <= 1'b0;
      w_valid     <= 1'b0;
      w_rd        <= '0;
      w_val       <= '0;
      instr_count <= '0;
      idle_count  <= '0;
      for (int i = 0; i < NREGS; i++) rf[i] <= '0;
    end else begin
      if (ce && stall) idle_count <= idle_count + 1;
      if (adv) begin
        // write-back stage
        if (w_valid) rf[w_rd] <= w_val;
        // decode/execute -> write-back
        w_valid <= f_valid && writes;
        w_rd    <= ins.rd;
        w_val   <= is_load ? ldata : alu;
        if (f_valid) instr_count <= instr_count + 1;
        // fetch
        pc      <= im_addr + 1'b1;
        f_pc    <= im_addr;
        f_valid <= 1'b1;
      end
    end
  end

  a_store_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    (lb.req && !is_half) |-> (boff[1:0] == 2'b00));
  a_half_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    (lb.req && is_half) |-> (boff[0] == 1'b0));
endmodule
