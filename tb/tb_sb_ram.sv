// tb_sb_ram: self-checking test of the dual-port Sending Buffer.
//
// Both ports make random reads and byte-masked writes, at the default 64 KiB
// size, and each read (one clock latency) is compared with a byte-array model.
// A write of the same word by both ports in one clock must leave port B's
// bytes where the two overlap.
`timescale 1ns/1ps
module tb_sb_ram;
  logic clk = 0;
  always #1 clk = ~clk;

  logic        a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [7:0]  a_be = 0, b_be = 0;
  logic [12:0] a_addr = 0, b_addr = 0;
  logic [63:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;

  sb_ram #(.BYTES(65536)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [63:0] model [8192];
  logic [63:0] exp_a, exp_b;
  bit          chk_a, chk_b;

  function automatic logic [63:0] merge(input logic [63:0] old, input logic [63:0] d, input logic [7:0] be);
    logic [63:0] r;
    r = old;
    for (int i = 0; i < 8; i++) if (be[i]) r[63-8*i -: 8] = d[63-8*i -: 8];
    return r;
  endfunction

  initial begin
    // initialise the whole memory through port A
    for (int w = 0; w < 8192; w++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_be = 8'hFF; a_addr = 13'(w); a_wdata = {$urandom, $urandom};
      model[w] = a_wdata;
    end
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      if (chk_a) check(a_rdata == exp_a, $sformatf("port A read t=%0d", t));
      if (chk_b) check(b_rdata == exp_b, $sformatf("port B read t=%0d", t));
      a_en = $urandom % 4 != 0; a_we = $urandom % 2; a_be = 8'($urandom);
      b_en = $urandom % 4 != 0; b_we = $urandom % 2; b_be = 8'($urandom);
      a_addr = 13'($urandom % 64); b_addr = (t % 7 == 0) ? a_addr : 13'($urandom % 64);
      a_wdata = {$urandom, $urandom}; b_wdata = {$urandom, $urandom};
      chk_a = a_en; chk_b = b_en;
      exp_a = model[a_addr]; exp_b = model[b_addr];
      if (a_en && a_we) model[a_addr] = merge(model[a_addr], a_wdata, a_be);
      if (b_en && b_we) model[b_addr] = merge(model[b_addr], b_wdata, b_be);
    end
    @(negedge clk);
    a_en = 0; b_en = 0;
    // read back the whole memory through port B
    for (int w = 0; w < 8192; w++) begin
      @(negedge clk);
      if (w > 0) check(b_rdata == model[w-1], "final read-back");
      b_en = 1; b_we = 0; b_addr = 13'(w);
    end
    @(negedge clk);
    check(b_rdata == model[8191], "final read-back");
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
