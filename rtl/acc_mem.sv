// acc_mem: memory of group sums for the accumulation stage.
//
// A simple dual-port RAM of 2**AW words: one synchronous read port and one
// write port on the same clock. A read issued in cycle t (re = 1) returns
// the word at raddr in rdata during cycle t + 1. A write in cycle t takes
// effect at the end of that cycle. When both ports address the same word in
// the same cycle the read returns the old word (read-first), as the block
// RAMs the design was characterised with were configured. This read-first
// behaviour is what makes the dependency distance of the accumulation
// stage equal to the adder latency plus one. rdata holds its value while
// re is low. The contents are not reset; the owner clears them.
module acc_mem #(
  parameter int unsigned AW = cs_pkg::AW_DEFAULT,
  parameter int unsigned DW = 64
) (
  input  logic          clk,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
    if (we) mem[waddr] <= wdata;
  end

endmodule
