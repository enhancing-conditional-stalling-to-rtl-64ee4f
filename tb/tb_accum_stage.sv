// tb_accum_stage: self-checking testbench for the accumulation stage.
//
// A stage with DD = 6 and 16 groups is used. The testbench first checks
// that the stage stays not-ready for exactly 2**AW cycles after reset
// (the clear sweep). It then feeds slots the way a stall stage would: a
// random group for each sample, and bubbles in front of any sample whose
// group was sent fewer than DD + 1 slots before, with random idle cycles
// between slots. Every update must come out on res_* exactly DD cycles
// after its slot was taken, with the group address and the sum the
// simulator's own double arithmetic gives for that group so far (starting
// from +0.0). Bubbles must produce nothing. A second stage built with
// II_P = 3 and offered a slot every cycle must take one every third cycle.
`timescale 1ns/1ps
module tb_accum_stage;
  localparam int unsigned DD = 6;
  localparam int unsigned AW = 4;
  localparam int unsigned N  = 3000;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          in_valid, in_ready, in_live;
  logic [AW-1:0] in_raddr, in_waddr;
  logic [63:0]   in_data;
  logic          ready, res_valid;
  logic [AW-1:0] res_addr;
  logic [63:0]   res_value;
  int            checks = 0, failures = 0;
  longint        cycle = 0;
  real           sums [2**AW];
  longint        last_slot [2**AW];
  longint        slot = 0;
  int            n_bubbles = 0;

  typedef struct {
    longint        due;
    logic [AW-1:0] addr;
    logic [63:0]   value;
  } exp_t;
  exp_t q[$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  accum_stage #(.DD(DD), .AW(AW)) dut (.*);

  // a second stage with II_P = 3, offered a bubble every cycle: it must
  // take exactly one slot every third cycle
  logic       b_ready, b_in_ready, b_ready_out, b_res_valid;
  logic [AW-1:0] b_res_addr;
  logic [63:0]   b_res_value;
  int            b_takes = 0, b_cycles = 0;
  longint        b_last_take = -1;
  accum_stage #(.DD(DD), .AW(AW), .II_P(3)) dut_iip3 (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b1), .in_ready(b_in_ready), .in_live(1'b0),
    .in_raddr('0), .in_waddr('0), .in_data('0), .ready(b_ready_out),
    .res_valid(b_res_valid), .res_addr(b_res_addr), .res_value(b_res_value));
  always @(posedge clk) begin
    if (rst_n && b_ready_out) begin
      b_cycles++;
      if (b_in_ready) begin
        checks++;
        if (b_last_take >= 0 && cycle - b_last_take != 3)
          fail($sformatf("II_P = 3 stage took slots %0d cycles apart", cycle - b_last_take));
        b_last_take = cycle;
        b_takes++;
      end
      if (b_res_valid) begin
        checks++;
        fail("II_P = 3 stage produced an update from bubbles");
      end
    end
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL cycle %0d: %s", cycle, msg);
  endtask

  always @(posedge clk) begin
    if (rst_n && res_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) fail("result without a sample");
      else begin
        e = q.pop_front();
        if (cycle != e.due || res_addr != e.addr || res_value != e.value)
          fail($sformatf("group %0d sum %h at %0d, expected group %0d sum %h at %0d",
                         res_addr, res_value, cycle, e.addr, e.value, e.due));
      end
    end
  end

  // one slot; waits until it is taken
  task automatic send(logic live, logic [AW-1:0] addr, logic [63:0] v);
    in_valid = 1'b1;
    in_live  = live;
    in_raddr = addr;
    in_waddr = addr;
    in_data  = v;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    if (live) begin
      exp_t e;
      sums[addr] = sums[addr] + $bitstoreal(v);
      e.due   = cycle + DD;   // taken at this edge: cycle t = current cycle
      e.addr  = addr;
      e.value = $realtobits(sums[addr]);
      q.push_back(e);
      last_slot[addr] = slot;
    end
    slot++;
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    longint t0;
    foreach (sums[i]) sums[i] = 0.0;
    foreach (last_slot[i]) last_slot[i] = -100;
    rst_n = 1'b0;
    in_valid = 1'b0;
    in_live = 1'b0;
    in_raddr = '0;
    in_waddr = '0;
    in_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    t0 = cycle;
    @(posedge clk);
    while (!ready) @(posedge clk);
    checks++;
    if (cycle - t0 != 2 ** AW) fail($sformatf("clear took %0d cycles", cycle - t0));
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      logic [AW-1:0] a;
      logic [63:0]   v;
      a = AW'($urandom());
      v = {1'($urandom()), 11'(1010 + $urandom() % 30), 20'($urandom()), 32'($urandom())};
      while (slot - last_slot[a] <= longint'(DD)) begin
        send(1'b0, AW'($urandom()), 64'h3FF0_0000_0000_0000);
        n_bubbles++;
      end
      send(1'b1, a, v);
      if (($urandom() % 4) == 0) repeat ($urandom() % 3) @(negedge clk);
    end
    repeat (DD + 3) @(negedge clk);
    checks++;
    if (q.size() != 0) fail($sformatf("%0d updates missing", q.size()));
    checks++;
    if (n_bubbles == 0) fail("no bubble was sent");
    checks++;
    if (b_takes < b_cycles / 3 - 1 || b_takes > b_cycles / 3 + 1)
      fail($sformatf("II_P = 3 stage took %0d slots in %0d cycles", b_takes, b_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * N) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
