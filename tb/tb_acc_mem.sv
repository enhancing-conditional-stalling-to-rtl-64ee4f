// tb_acc_mem: self-checking testbench for the accumulator memory.
//
// A 16-word memory is filled, then read and written at random through its
// two ports and compared with an array: a read returns, one cycle later,
// the word as it was before the writes of the read's own cycle
// (read-first); rdata holds while no read is issued. Same-address
// read/write pairs are forced often.
`timescale 1ns/1ps
module tb_acc_mem;
  localparam int unsigned AW = 4;
  localparam int unsigned DW = 64;

  logic          clk = 1'b0;
  logic          re, we;
  logic [AW-1:0] raddr, waddr;
  logic [DW-1:0] rdata, wdata;
  logic [DW-1:0] model [2**AW];
  logic [DW-1:0] expect_q;
  int            checks = 0, failures = 0, n_collide = 0;

  always #5 clk = ~clk;

  acc_mem #(.AW(AW), .DW(DW)) dut (.*);

  initial begin
    re = 1'b0;
    we = 1'b0;
    raddr = '0;
    waddr = '0;
    wdata = '0;
    @(negedge clk);
    for (int a = 0; a < 2 ** AW; a++) begin
      we = 1'b1;
      waddr = AW'(a);
      wdata = {$urandom(), $urandom()};
      model[a] = wdata;
      @(negedge clk);
    end
    we = 1'b0;
    re = 1'b1;
    raddr = '0;
    expect_q = model[0];
    @(negedge clk);
    for (int i = 0; i < 5000; i++) begin
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        if (failures < 10) $display("FAIL: rdata %h expected %h", rdata, expect_q);
      end
      re    = ($urandom() % 4) != 0;
      we    = ($urandom() % 2) != 0;
      raddr = AW'($urandom());
      waddr = (($urandom() % 3) == 0) ? raddr : AW'($urandom());
      wdata = {$urandom(), $urandom()};
      if (re && we && raddr == waddr) n_collide++;
      if (re) expect_q = model[raddr];
      if (we) model[waddr] = wdata;
      @(negedge clk);
    end
    checks++;
    if (n_collide == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
