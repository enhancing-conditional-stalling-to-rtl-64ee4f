// tb_wait_list: self-checking testbench for the wait list.
//
// A small list (DD = 5, AW = 3, so matches are frequent) is shifted at
// random with random live/empty entries and random addresses, and queried
// with random addresses every cycle. The expected hit comes from a queue
// that holds the last DD pushed entries. A second phase pushes DD entries
// of one address and checks that a query hits for exactly DD shifts after
// the push and not after.
`timescale 1ns/1ps
module tb_wait_list;
  localparam int unsigned DD = 5;
  localparam int unsigned AW = 3;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          shift_en, push_live;
  logic [AW-1:0] push_addr, query_addr;
  logic          hit;
  int            checks = 0, failures = 0;

  typedef struct {
    logic          live;
    logic [AW-1:0] addr;
  } ent_t;
  ent_t model[$];

  always #5 clk = ~clk;

  wait_list #(.DD(DD), .AW(AW)) dut (.*);

  function automatic logic model_hit(logic [AW-1:0] q);
    foreach (model[i]) if (model[i].live && model[i].addr == q) return 1'b1;
    return 1'b0;
  endfunction

  task automatic check_hit(string what);
    #1;
    checks++;
    if (hit !== model_hit(query_addr)) begin
      failures++;
      $display("FAIL %s: query %0d hit %0b expected %0b", what, query_addr, hit,
               model_hit(query_addr));
    end
  endtask

  task automatic shift(logic live, logic [AW-1:0] addr);
    shift_en  = 1'b1;
    push_live = live;
    push_addr = addr;
    @(posedge clk);
    model.push_front('{live, addr});
    if (model.size() > DD) void'(model.pop_back());
    @(negedge clk);
    shift_en = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0;
    shift_en = 1'b0;
    push_live = 1'b0;
    push_addr = '0;
    query_addr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // reset empties the list
    for (int a = 0; a < 2 ** AW; a++) begin
      query_addr = AW'(a);
      check_hit("after reset");
    end
    // random phase
    for (int i = 0; i < 4000; i++) begin
      shift_en   = ($urandom() % 4) != 0;
      push_live  = ($urandom() % 3) != 0;
      push_addr  = AW'($urandom());
      query_addr = AW'($urandom());
      check_hit("random");
      @(posedge clk);
      if (shift_en) begin
        model.push_front('{push_live, push_addr});
        if (model.size() > DD) void'(model.pop_back());
      end
      @(negedge clk);
    end
    // an address stays in the list for exactly DD shifts
    for (int i = 0; i < DD; i++) shift(1'b0, '0);
    shift(1'b1, AW'(3));
    query_addr = AW'(3);
    for (int i = 1; i <= DD + 2; i++) begin
      #1;
      checks++;
      if (hit !== (i <= DD)) begin
        failures++;
        $display("FAIL lifetime: %0d shifts after push hit=%0b", i - 1, hit);
      end
      shift(1'b0, AW'(3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
