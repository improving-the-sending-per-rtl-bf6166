// tb_sep_core: self-checking test of the SEP RISC core.
//
// The testbench holds the core's instruction memory and a local-bus model
// whose answers come after a random delay (as when the DMA owns the bus). A
// small program exercises every instruction class: register and immediate
// arithmetic/logic with back-to-back dependences (write-back bypass), word and
// halfword loads and stores in both halves of a 64-bit bus word, taken and
// not-taken branches, a counted loop, and a call/return with jal/jr. It ends
// by storing its results; the testbench compares them with values it works out
// itself, and checks the executed-instruction count (branches cost no extra
// step) and that stalls were counted while the bus was slow.
`timescale 1ns/1ps
module tb_sep_core;
  import lso_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic        ce;
  logic        im_en;
  logic [7:0]  im_addr;
  logic [31:0] im_rdata;
  lb_req_t     lb;
  logic        lb_done, lb_rdy = 0;
  logic [63:0] lb_rdata;
  logic [31:0] instr_count, idle_count;

  sep_core #(.IM_AW(8)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // clock enable: one clock in five
  int ccnt = 0;
  always @(posedge clk) ccnt <= (ccnt == 4) ? 0 : ccnt + 1;
  assign ce = rst_n && (ccnt == 4);

  // instruction memory
  logic [31:0] prog [256];
  always @(posedge clk) if (im_en) im_rdata <= prog[im_addr];

  // local bus model: byte memory, random wait before rdy
  byte unsigned dmem [1024];
  int wait_left = 0;
  logic [16:0] last_addr = '1;
  bit slow = 0;
  always @(posedge clk) begin
    if (!lb.req || lb_done) begin
      lb_rdy <= 0;
      wait_left <= slow ? $urandom % 12 : 0;
    end else if (wait_left > 0) begin
      wait_left <= wait_left - 1;
      lb_rdy <= 0;
    end else begin
      lb_rdy <= 1;
      for (int i = 0; i < 8; i++) lb_rdata[63-8*i -: 8] <= dmem[{lb.addr[9:3], 3'(i)}];
    end
    if (lb_done && lb.we)
      for (int i = 0; i < 8; i++) if (lb.be[i]) dmem[{lb.addr[9:3], 3'(i)}] = lb.wdata[63-8*i -: 8];
  end

  function automatic logic [31:0] enc(input opcode_e op, input int rd, input int rs1, input int imm);
    return {op, 4'(rd), 4'(rs1), 18'(imm)};
  endfunction
  function automatic logic [31:0] encr(input opcode_e op, input int rd, input int rs1, input int rs2);
    return {op, 4'(rd), 4'(rs1), 4'(rs2), 14'd0};
  endfunction

  function automatic logic [31:0] rd32(input int a);
    return {dmem[a], dmem[a+1], dmem[a+2], dmem[a+3]};
  endfunction

  int n = 0;
  task automatic emit(input logic [31:0] w); prog[n] = w; n++; endtask

  initial begin
    int done_pc;
    for (int i = 0; i < 256; i++) prog[i] = 0;
    for (int i = 0; i < 1024; i++) dmem[i] = 0;
    dmem[512] = 8'hDE; dmem[513] = 8'hAD; dmem[514] = 8'hBE; dmem[515] = 8'hEF;
    dmem[516] = 8'h01; dmem[517] = 8'h23; dmem[518] = 8'h45; dmem[519] = 8'h67;
    emit(enc(OP_ADDI, 1, 0, 100));          // 0  r1 = 100
    emit(enc(OP_ADDI, 2, 0, -3));           // 1  r2 = -3
    emit(encr(OP_ADD, 3, 1, 2));            // 2  r3 = 97
    emit(encr(OP_SUB, 4, 1, 2));            // 3  r4 = 103
    emit(encr(OP_AND, 5, 1, 2));            // 4
    emit(encr(OP_OR, 6, 1, 2));             // 5
    emit(encr(OP_XOR, 7, 1, 2));            // 6
    emit(enc(OP_SLLI, 8, 1, 4));            // 7
    emit(enc(OP_SRLI, 9, 2, 28));           // 8
    emit(encr(OP_SLTU, 10, 1, 2));          // 9
    emit(enc(OP_SLTIU, 11, 2, 5));          // 10
    emit(enc(OP_LUI, 12, 0, 3));            // 11
    emit(enc(OP_ORI, 12, 12, 'h155));       // 12
    emit(enc(OP_XORI, 13, 12, 'hFF));       // 13
    emit(enc(OP_ANDI, 14, 2, 'h3F0F));      // 14
    // store r3..r14 at 0, 4, ..., 44
    for (int r = 3; r <= 14; r++) emit(enc(OP_SW, r, 0, (r - 3) * 4));   // 15..26
    // loads: word from both halves, halfwords, then use immediately
    emit(enc(OP_LW, 3, 0, 512));            // 27 r3 = DEADBEEF
    emit(enc(OP_LW, 4, 0, 516));            // 28 r4 = 01234567
    emit(encr(OP_ADD, 5, 3, 4));            // 29 r5 = sum
    emit(enc(OP_LHU, 6, 0, 514));           // 30 r6 = BEEF
    emit(enc(OP_LHU, 7, 0, 518));           // 31 r7 = 4567
    emit(enc(OP_SH, 6, 0, 64));             // 32 mem[64..65] = BEEF
    emit(enc(OP_SH, 7, 0, 70));             // 33 mem[70..71] = 4567
    emit(enc(OP_SW, 5, 0, 48));             // 34
    // loop: r8 = sum 1..10
    emit(enc(OP_ADDI, 8, 0, 0));            // 35
    emit(enc(OP_ADDI, 9, 0, 10));           // 36
    emit(encr(OP_ADD, 8, 8, 9));            // 37 loop:
    emit(enc(OP_ADDI, 9, 9, -1));           // 38
    emit(enc(OP_BNE, 9, 0, -2));            // 39 -> 37
    emit(enc(OP_BEQ, 8, 0, 5));             // 40 not taken
    emit(enc(OP_BLTU, 8, 0, 5));            // 41 not taken (55 < 0 false)
    emit(enc(OP_BGEU, 8, 1, 3));            // 42 not taken (55 >= 100 false)
    emit(enc(OP_BLTU, 8, 1, 2));            // 43 taken -> 45
    emit(enc(OP_ADDI, 8, 0, 999));          // 44 skipped
    emit(enc(OP_SW, 8, 0, 52));             // 45
    emit(enc(OP_JAL, 15, 0, 4));            // 46 call 50, r15 = 47
    emit(enc(OP_SW, 10, 0, 56));            // 47 after return
    emit(enc(OP_SW, 15, 0, 60));            // 48
    emit(enc(OP_BEQ, 0, 0, 4));             // 49 -> 53
    emit(enc(OP_ADDI, 10, 0, 77));          // 50 subroutine
    emit(enc(OP_JR, 0, 15, 0));             // 51 return
    emit(enc(OP_ADDI, 10, 0, 88));          // 52 never
    emit(enc(OP_ADDI, 11, 0, 1));           // 53
    emit(enc(OP_SW, 11, 0, 72));            // 54 completion flag
    emit(enc(OP_BEQ, 0, 0, 0));             // 55 stop here
    done_pc = 55;

    slow = 1;
    repeat (4) @(negedge clk);
    rst_n = 1;
    while (rd32(72) != 1 && instr_count < 5000) @(posedge clk);
    repeat (20) @(posedge clk);

    check(rd32(0)  == 32'd97,  "add");
    check(rd32(4)  == 32'd103, "sub");
    check(rd32(8)  == (32'd100 & 32'hFFFF_FFFD), "and");
    check(rd32(12) == (32'd100 | 32'hFFFF_FFFD), "or");
    check(rd32(16) == (32'd100 ^ 32'hFFFF_FFFD), "xor");
    check(rd32(20) == 32'd1600, "slli");
    check(rd32(24) == 32'hF, "srli");
    check(rd32(28) == 32'd1, "sltu");
    check(rd32(32) == 32'd0, "sltiu");
    check(rd32(36) == ((32'd3 << 14) | 32'h155), "lui/ori");
    check(rd32(40) == (((32'd3 << 14) | 32'h155) ^ 32'hFF), "xori");
    check(rd32(44) == (32'hFFFF_FFFD & 32'h3F0F), "andi");
    check(rd32(48) == 32'hDEADBEEF + 32'h01234567, "lw + bypass");
    check({dmem[64], dmem[65]} == 16'hBEEF && {dmem[70], dmem[71]} == 16'h4567, "lhu/sh");
    check(dmem[66] == 0 && dmem[69] == 0, "sh leaves neighbours");
    check(rd32(52) == 32'd55, "loop and branches");
    check(rd32(56) == 32'd77, "call");
    check(rd32(60) == 32'd47, "jal link");
    check(dut.f_pc == 8'(done_pc), "stopped at the final loop");
    check(idle_count > 0, "stalls counted while the bus was slow");

    // timing with a fast bus: the final self-loop runs one instruction per enable
    begin
      int unsigned i0;
      slow = 0;
      @(posedge clk iff ce);
      i0 = instr_count;
      repeat (50) @(posedge clk iff ce);
      check(instr_count - i0 == 50, $sformatf("one instruction per step: %0d", instr_count - i0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
