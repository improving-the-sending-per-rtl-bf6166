// tb_imem: self-checking test of the SEP instruction memory.
//
// Loads the default LSO program and checks the synchronous read (data one
// clock after en), that the output holds while en is low, and the program's
// first words against their encodings worked out here: addi r1,r0,0x10000;
// addi r14,r0,1; slli r14,r14,16; addi r8,r0,6; lw r2,8(r1). Words past the
// program must read as zero.
`timescale 1ns/1ps
module tb_imem;
  import lso_pkg::*;
  logic clk = 0;
  always #1 clk = ~clk;

  logic        en = 0;
  logic [7:0]  addr = 0;
  logic [31:0] rdata;

  imem #(.DEPTH(256)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (got %08x)", what, rdata); end
  endtask

  function automatic logic [31:0] enc(input opcode_e op, input int rd, input int rs1, input int imm);
    return {op, 4'(rd), 4'(rs1), 18'(imm)};
  endfunction

  task automatic rd(input int a);
    @(negedge clk); en = 1; addr = 8'(a);
    @(negedge clk); en = 0;
  endtask

  initial begin
    logic [31:0] exp [5];
    exp[0] = enc(OP_ADDI, 1, 0, 'h10000);
    exp[1] = enc(OP_ADDI, 14, 0, 1);
    exp[2] = enc(OP_SLLI, 14, 14, 16);
    exp[3] = enc(OP_ADDI, 8, 0, 6);
    exp[4] = enc(OP_LW, 2, 1, 8);
    for (int i = 0; i < 5; i++) begin
      rd(i);
      check(rdata == exp[i], $sformatf("word %0d", i));
    end
    // hold while en is low
    addr = 8'd0;
    repeat (3) @(negedge clk);
    check(rdata == exp[4], "output holds while en is low");
    rd(255);
    check(rdata == 32'd0, "unused word reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
