// stall_stage: conditional-stalling front stage for a RAW-dependent pipeline.
//
// Every time it fires, the stage emits one slot on its output: either the
// packet it is working on (out_live = 1) or a bubble (out_live = 0) that the
// processing stage must let pass without touching memory. The packet is
// taken from the input unless a conflict is pending, in which case the held
// packet is re-examined. A packet conflicts when its read address equals
// the write address of any packet sent in the last DD slots (wait_list).
// A conflicting packet is held and a bubble is sent in its place, so the
// processing stage sees no two accesses to one address closer than DD + 1
// slots, and can be pipelined as if it had no dependency at all.
//
// The per-slot behaviour (read unless a conflict is pending, look the read
// address up, send the packet with its live flag cleared on a conflict,
// shift the write address or an empty entry into the list) follows the
// published stall stage. The handshake is this design's own: valid/ready on
// both sides. The stage fires when out_ready is high and it has something
// to send (a held packet, or an input packet). While it cannot fire, the
// list does not shift; since the processing stage takes at most one slot
// per cycle, packets can only drift further apart downstream, never closer.
//
// Timing: out_* and in_ready are combinational from the inputs and the
// stage's registers (conflict flag, held packet, wait list); the conflict
// decision for a slot is made in the cycle the slot is sent.
module stall_stage #(
  parameter int unsigned DD = cs_pkg::DD_DEFAULT,
  parameter int unsigned AW = cs_pkg::AW_DEFAULT,
  parameter int unsigned DW = 64
) (
  input  logic          clk,
  input  logic          rst_n,
  // input packet stream
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [AW-1:0] in_raddr,
  input  logic [AW-1:0] in_waddr,
  input  logic [DW-1:0] in_data,
  // output slot stream (a packet or a bubble each slot)
  output logic          out_valid,
  input  logic          out_ready,
  output logic          out_live,
  output logic [AW-1:0] out_raddr,
  output logic [AW-1:0] out_waddr,
  output logic [DW-1:0] out_data,
  // slot sent this cycle was a bubble caused by a conflict
  output logic          stall
);

  typedef struct packed {
    logic [AW-1:0] raddr;
    logic [AW-1:0] waddr;
    logic [DW-1:0] data;
  } pkt_t;

  logic conflict_q;
  pkt_t held_q;
  pkt_t cur;
  logic hit;
  logic fire;

  assign cur       = conflict_q ? held_q : pkt_t'{in_raddr, in_waddr, in_data};
  assign out_valid = conflict_q || in_valid;
  assign in_ready  = !conflict_q && out_ready;
  assign fire      = out_valid && out_ready;

  wait_list #(.DD(DD), .AW(AW)) u_list (
    .clk       (clk),
    .rst_n     (rst_n),
    .shift_en  (fire),
    .push_live (!hit),
    .push_addr (cur.waddr),
    .query_addr(cur.raddr),
    .hit       (hit)
  );

  assign out_live  = !hit;
  assign out_raddr = cur.raddr;
  assign out_waddr = cur.waddr;
  assign out_data  = cur.data;
  assign stall     = fire && hit;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      conflict_q <= 1'b0;
      held_q     <= '0;
    end else if (fire) begin
      conflict_q <= hit;
      held_q     <= cur;
    end
  end

  // A held packet may not be dropped: while a conflict is pending the stage
  // must keep offering a slot.
  assert property (@(posedge clk) disable iff (!rst_n) conflict_q |-> out_valid);

endmodule
