// lso_pkg: types and constants shared by the sending-side network interface.
//
// The network interface is big-endian throughout, as network headers are:
// byte address 8*w+i of a 64-bit word w sits in bits [63-8*i -: 8], so a
// 16- or 32-bit field loaded from a header reads with its most significant
// byte first. Byte enables follow the byte index (bit i enables byte i).
//
// The local-bus address map is this design's own choice (the document gives
// none). Byte addresses are 17 bits wide: bit 16 clear selects the 64 KiB
// Sending Buffer, bit 16 set the memory-mapped registers below, and bits 16
// and 15 set a write window onto the SBI buffer being filled (programmed I/O).
//
// The instruction set of the Sending Embedded Processor (SEP) is also this
// design's own; the document only lists the instruction classes it needs:
// load, store, arithmetic and logic operations, and conditional branches.
// Every instruction is 32 bits:
//   [31:26] opcode  [25:22] rd  [21:18] rs1  [17:14] rs2  [17:0] imm18
// Stores write register rd; branches compare rd with rs1 and jump to
// pc + imm18 (in instructions). Register r0 reads as zero.
package lso_pkg;

  localparam int unsigned BUS_W    = 64;   // local bus data width (document: 64-bit)
  localparam int unsigned BUS_BE   = BUS_W / 8;
  localparam int unsigned LB_AW    = 17;   // local bus byte address width
  localparam int unsigned NREGS    = 16;

  // Memory-mapped registers (byte addresses on the local bus)
  localparam logic [LB_AW-1:0] A_FIFO2_POP  = 17'h10000; // R: pop one host message word
  localparam logic [LB_AW-1:0] A_FIFO1_PUSH = 17'h10004; // W: push one status word to the host
  localparam logic [LB_AW-1:0] A_FIFO_STAT  = 17'h10008; // R: [0] FIFO2 not empty, [1] FIFO1 not full
  localparam logic [LB_AW-1:0] A_DMA_SRC    = 17'h10010; // W: source byte address in SB
  localparam logic [LB_AW-1:0] A_DMA_DST    = 17'h10014; // W: destination byte offset in SBI buffer
  localparam logic [LB_AW-1:0] A_DMA_CTRL   = 17'h10018; // W: [15:0] length in bytes, [16] end of packet; starts DMA
  localparam logic [LB_AW-1:0] A_SBI_STAT   = 17'h10020; // R: [0] an SBI buffer is free to fill
  localparam logic [LB_AW-1:0] A_SBI_COMMIT = 17'h10024; // W: close the SBI buffer filled by the SEP, [15:0] length
  localparam logic [LB_AW-1:0] A_SBI_WIN    = 17'h18000; // W: 0x18000 + offset writes the SBI fill buffer directly


  typedef enum logic [5:0] {
    OP_ADD   = 6'h00, OP_SUB   = 6'h01, OP_AND   = 6'h02, OP_OR    = 6'h03,
    OP_XOR   = 6'h04, OP_SLL   = 6'h05, OP_SRL   = 6'h06, OP_SLTU  = 6'h07,
    OP_ADDI  = 6'h08, OP_ANDI  = 6'h0A, OP_ORI   = 6'h0B, OP_XORI  = 6'h0C,
    OP_SLLI  = 6'h0D, OP_SRLI  = 6'h0E, OP_SLTIU = 6'h0F, OP_LUI   = 6'h10,
    OP_LW    = 6'h18, OP_LHU   = 6'h19, OP_SW    = 6'h1A, OP_SH    = 6'h1B,
    OP_BEQ   = 6'h20, OP_BNE   = 6'h21, OP_BLTU  = 6'h22, OP_BGEU  = 6'h23,
    OP_JAL   = 6'h28, OP_JR    = 6'h29
  } opcode_e;

  typedef struct packed {
    logic [5:0]  op;
    logic [3:0]  rd;
    logic [3:0]  rs1;
    logic [17:0] imm;   // rs2 is imm[17:14] for register-register operations
  } instr_t;

  // Local bus request from the SEP (one 64-bit word lane set per access)
  typedef struct packed {
    logic              req;    // an access is pending in the execute stage
    logic              we;     // store (valid only in the cycle the access commits)
    logic [LB_AW-1:0]  addr;   // byte address
    logic [BUS_BE-1:0] be;     // byte enables
    logic [BUS_W-1:0]  wdata;  // store data, already placed in its byte lanes
  } lb_req_t;

endpackage
