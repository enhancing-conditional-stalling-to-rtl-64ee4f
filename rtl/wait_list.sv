// wait_list: the addresses a stall stage sent in its last DD output slots.
//
// A DD-entry shift register. Each time the owning stage emits a slot
// (shift_en), the list shifts by one and takes either the write address of
// the packet just sent (push_live = 1) or an empty entry (push_live = 0, a
// bubble). hit is the OR of DD parallel comparisons of query_addr with the
// non-empty entries; it is combinational, the same cycle as query_addr.
//
// This mirrors the wait list of the stall stage the design follows: a
// shift-in list plus an unrolled match loop. Marking an entry empty with a
// per-entry valid bit, rather than a reserved address value, is this
// design's choice, so every address value stays usable. Reset empties the
// list.
module wait_list #(
  parameter int unsigned DD = cs_pkg::DD_DEFAULT,
  parameter int unsigned AW = cs_pkg::AW_DEFAULT
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          shift_en,
  input  logic          push_live,
  input  logic [AW-1:0] push_addr,
  input  logic [AW-1:0] query_addr,
  output logic          hit
);

  logic [DD-1:0]         live_q;
  logic [DD-1:0][AW-1:0] addr_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      live_q <= '0;
      addr_q <= '0;
    end else if (shift_en) begin
      for (int i = DD - 1; i > 0; i--) begin
        live_q[i] <= live_q[i-1];
        addr_q[i] <= addr_q[i-1];
      end
      live_q[0] <= push_live;
      addr_q[0] <= push_addr;
    end
  end

  always_comb begin
    hit = 1'b0;
    for (int i = 0; i < DD; i++)
      hit |= live_q[i] && (addr_q[i] == query_addr);
  end

endmodule
