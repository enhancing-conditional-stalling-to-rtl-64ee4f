// tb_stall_stage: self-checking testbench for the conditional stall stage.
//
// A small stage (DD = 4, AW = 3) is checked against rules, not against a
// copy of its logic:
//   * live output slots carry the input packets in order, none lost or
//     repeated, fields intact;
//   * two live slots with the same address are more than DD slots apart;
//   * a bubble is sent only when the packet waiting to go out would land
//     within DD slots of a live slot of its address, and a packet is never
//     held longer than that (slot at which it goes = max(previous slot + 1,
//     last slot of its address + DD + 1), worked out from the slot history);
//   * stall is high exactly on bubble slots.
// Then three rate checks with the input always full and the output always
// ready: a burst of one address takes DD + 1 slots per packet (the
// baseline initiation interval), addresses cycling over more than DD values
// take one slot per packet, and per-packet cycle counts match.
`timescale 1ns/1ps
module tb_stall_stage;
  localparam int unsigned DD = 4;
  localparam int unsigned AW = 3;
  localparam int unsigned DW = 16;
  localparam longint      SDD = longint'(DD);

  logic          clk = 1'b0;
  logic          rst_n;
  logic          in_valid, in_ready;
  logic [AW-1:0] in_raddr, in_waddr;
  logic [DW-1:0] in_data;
  logic          out_valid, out_ready, out_live;
  logic [AW-1:0] out_raddr, out_waddr;
  logic [DW-1:0] out_data;
  logic          stall;
  int            checks = 0, failures = 0;

  always #5 clk = ~clk;

  stall_stage #(.DD(DD), .AW(AW), .DW(DW)) dut (.*);

  typedef struct {
    logic [AW-1:0] addr;
    logic [DW-1:0] data;
  } pkt_t;
  pkt_t   sent[$];          // packets accepted at the input, not yet out
  longint slot = 0;         // slots emitted so far
  longint last_slot[2**AW]; // last live slot of each address
  longint prev_live = -1;   // last live slot of any address
  int     n_bubbles = 0, n_live = 0;
  bit     drive_random = 1'b1;
  bit     want_first = 1'b0;
  longint first_live = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL slot %0d: %s", slot, msg);
  endtask

  // input driver (random phase)
  logic [DW-1:0] next_data = '0;
  always @(negedge clk) begin
    if (drive_random) begin
      if (!in_valid || in_ready_q) begin
        in_valid = ($urandom() % 4) != 0;
        in_raddr = AW'($urandom());
        in_waddr = in_raddr;
        in_data  = next_data;
        next_data++;
      end
      out_ready = ($urandom() % 5) != 0;
    end
  end
  logic in_ready_q;
  always @(posedge clk) in_ready_q <= in_valid && in_ready;

  // monitor
  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && in_ready) sent.push_back('{in_raddr, in_data});
      if (out_valid && out_ready) begin
        pkt_t   head;
        longint earliest;
        logic   fresh;
        // the packet that is due: the oldest accepted one, or the one
        // being accepted in this very cycle
        head = sent[0];
        earliest = prev_live + 1;
        if (last_slot[head.addr] + SDD + 1 > earliest) earliest = last_slot[head.addr] + SDD + 1;
        checks++;
        if (out_live) begin
          if (slot < earliest) fail($sformatf("live at slot %0d, due at %0d", slot, earliest));
          if (out_raddr != head.addr || out_waddr != head.addr || out_data != head.data)
            fail("live packet differs from the next input packet");
          if (stall) fail("stall on a live slot");
          last_slot[head.addr] = slot;
          prev_live = slot;
          if (want_first) begin
            first_live = slot;
            want_first = 1'b0;
          end
          void'(sent.pop_front());
          n_live++;
        end else begin
          if (slot >= earliest) fail($sformatf("bubble although packet was due at %0d", earliest));
          if (!stall) fail("bubble without stall");
          n_bubbles++;
        end
        slot++;
      end
      if (out_valid && !out_ready && stall) begin
        checks++;
        fail("stall without a slot sent");
      end
    end
  end

  // run n packets of an address pattern with a full input and a ready
  // output; return the slots from the first live one to the last live one.
  // (The list does not age while the stage has nothing to send, so the
  // first packet may still wait for entries left by the previous burst.)
  task automatic burst(int n, int stride, output longint slots);
    drive_random = 1'b0;
    @(negedge clk);
    out_ready = 1'b1;
    want_first = 1'b1;
    for (int i = 0; i < n; i++) begin
      in_valid = 1'b1;
      in_raddr = AW'(i * stride);
      in_waddr = in_raddr;
      in_data  = DW'(i);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 1'b0;
    // let the last packet go out
    repeat (DD + 2) @(negedge clk);
    slots = prev_live + 1 - first_live;
  endtask

  initial begin
    longint slots;
    foreach (last_slot[i]) last_slot[i] = -100;
    rst_n = 1'b0;
    in_valid = 1'b0;
    in_raddr = '0;
    in_waddr = '0;
    in_data = '0;
    out_ready = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (20000) @(negedge clk);
    drive_random = 1'b0;
    in_valid = 1'b0;
    out_ready = 1'b1;
    repeat (DD + 4) @(negedge clk);
    checks++;
    if (sent.size() != 0) fail($sformatf("%0d packets never came out", sent.size()));
    checks++;
    if (n_bubbles == 0 || n_live == 0) fail("random phase saw no stall or no packet");
    $display("random phase: %0d live slots, %0d bubbles", n_live, n_bubbles);

    // single-address burst: DD + 1 slots per packet, as without stalling
    burst(20, 0, slots);
    checks++;
    if (slots != 19 * (DD + 1) + 1)
      fail($sformatf("one-address burst took %0d slots, expected %0d", slots, 19 * (DD + 1) + 1));
    // addresses cycling over 2**AW > DD values: no stall at all
    burst(40, 1, slots);
    checks++;
    if (slots != 40) fail($sformatf("conflict-free burst took %0d slots, expected 40", slots));
    // stride 2 over 8 addresses: period 4 = DD, each packet waits one slot
    burst(40, 2, slots);
    checks++;
    if (slots != 4 + 36 * 5 / 4)
      fail($sformatf("stride-2 burst took %0d slots, expected %0d", slots, 4 + 36 * 5 / 4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
