// tb_msg_fifo: self-checking test of the host message FIFO.
//
// Random pushes and pops (never past full or empty, as the bus and host
// interfaces guarantee) are checked against a queue model: data order, the
// first-word fall-through output, full, empty and the word count. The test
// also fills the FIFO to its depth and drains it completely.
`timescale 1ns/1ps
module tb_msg_fifo;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  localparam int DEPTH = 16;
  logic        push = 0, pop = 0, full, empty;
  logic [31:0] wdata = 0, rdata;
  logic [4:0]  count;

  msg_fifo #(.W(32), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [31:0] model [$];
  int n_full = 0;

  task automatic step(input bit do_push, input bit do_pop);
    @(negedge clk);
    check(empty == (model.size() == 0), "empty flag");
    check(full == (model.size() == DEPTH), "full flag");
    check(count == 5'(model.size()), "count");
    if (model.size() > 0) check(rdata == model[0], "head word");
    if (full) n_full++;
    push = do_push && !full; pop = do_pop && !empty; wdata = $urandom;
    @(posedge clk);
    if (pop) void'(model.pop_front());
    if (push) model.push_back(wdata);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < DEPTH + 3; i++) step(1, 0);
    for (int i = 0; i < DEPTH + 3; i++) step(0, 1);
    for (int i = 0; i < 3000; i++) step(($urandom % 2) == 1, ($urandom % 3) == 1);
    @(negedge clk); push = 0; pop = 0;
    check(n_full > 0, "FIFO was full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
