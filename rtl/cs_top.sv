// cs_top: groupwise float64 accumulation with conditional stalling.
//
// Samples arrive as (group address, float64 value) pairs and are added to
// the running sum of their group, held in a memory. Reading a sum, adding
// and writing it back takes DD cycles of latency, so two samples of the
// same group closer than DD + 1 cycles would lose an update. Rather than
// accept a new sample only every DD + 1 cycles, the system runs the
// accumulation pipeline at one sample per cycle and lets a stall stage
// hold back only the samples that actually collide with one still in
// flight, inserting bubbles until the earlier update has landed.
//
//   in_* -> stream_fifo (input) -> stall_stage -> stream_fifo (slots)
//        -> accum_stage (acc_mem + fp64_add) -> res_*
//
// Interface: in_* is a valid/ready stream; res_* reports each updated sum
// (no back-pressure). ready goes high once the sums have been cleared
// after reset. stall pulses for each bubble the stall stage sends because
// of a conflict and issue for each sample it sends on; over a run, cycles
// per sample at the stall stage is (issue + stall) / issue when the input
// never runs dry. Updates are in-situ: each sample's read and write
// address are its group address.
//
// II_P (default 1) sets the initiation interval of the accumulation stage;
// above 1 it takes a slot only every II_P cycles and the stall stage keeps
// a shorter list of DD / II_P entries, rounded down, trading throughput for
// a cheaper processing module (DD / II_P must be at least 1).
//
// Timing: from in_* to res_* the latency is at least 2 (FIFO) + 1 (memory
// read) + DD - 1 (adder) cycles plus any bubbles and queueing.
//
// The structure (a separate stall stage ahead of a processing stage
// pipelined as if it had no dependency, bubbles to keep the two in step,
// a float64 accumulation example, DD = 16 and AW = 16, the DD / II_P list
// for a slower processing module) follows the design this is based on; the
// FIFO depths and the handshakes are this design's.
module cs_top #(
  parameter int unsigned DD              = cs_pkg::DD_DEFAULT,
  parameter int unsigned AW              = cs_pkg::AW_DEFAULT,
  parameter int unsigned IN_FIFO_DEPTH   = cs_pkg::FIFO_DEPTH_DEFAULT,
  parameter int unsigned LINK_FIFO_DEPTH = cs_pkg::FIFO_DEPTH_DEFAULT,
  parameter int unsigned II_P            = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_tvalid,
  output logic          in_tready,
  input  logic [AW-1:0] in_addr,
  input  logic [63:0]   in_value,
  output logic          ready,
  output logic          res_valid,
  output logic [AW-1:0] res_addr,
  output logic [63:0]   res_value,
  output logic          stall,
  output logic          issue
);

  // slots the stall stage must keep apart: with a processing module that
  // takes a slot every II_P cycles, DD cycles span DD / II_P slots
  localparam int unsigned DD_SLOTS = DD / II_P;

  localparam int unsigned IW = AW + 64;
  localparam int unsigned LW = 1 + 2 * AW + 64;

  // input FIFO -> stall stage
  logic          q_valid, q_ready;
  logic [IW-1:0] q_data;
  logic [AW-1:0] q_addr;
  logic [63:0]   q_value;

  // stall stage -> slot FIFO
  logic          s_valid, s_ready, s_live;
  logic [AW-1:0] s_raddr, s_waddr;
  logic [63:0]   s_value;

  // slot FIFO -> accumulation stage
  logic          p_valid, p_ready, p_live;
  logic [LW-1:0] p_data;
  logic [AW-1:0] p_raddr, p_waddr;
  logic [63:0]   p_value;

  stream_fifo #(.WIDTH(IW), .DEPTH(IN_FIFO_DEPTH)) u_in_fifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_valid(in_tvalid),
    .wr_ready(in_tready),
    .wr_data ({in_addr, in_value}),
    .rd_valid(q_valid),
    .rd_ready(q_ready),
    .rd_data (q_data),
    .count   ()
  );

  assign {q_addr, q_value} = q_data;

  stall_stage #(.DD(DD_SLOTS), .AW(AW), .DW(64)) u_stall (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (q_valid),
    .in_ready (q_ready),
    .in_raddr (q_addr),
    .in_waddr (q_addr),
    .in_data  (q_value),
    .out_valid(s_valid),
    .out_ready(s_ready),
    .out_live (s_live),
    .out_raddr(s_raddr),
    .out_waddr(s_waddr),
    .out_data (s_value),
    .stall    (stall)
  );

  assign issue = s_valid && s_ready && s_live;

  stream_fifo #(.WIDTH(LW), .DEPTH(LINK_FIFO_DEPTH)) u_link_fifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_valid(s_valid),
    .wr_ready(s_ready),
    .wr_data ({s_live, s_raddr, s_waddr, s_value}),
    .rd_valid(p_valid),
    .rd_ready(p_ready),
    .rd_data (p_data),
    .count   ()
  );

  assign {p_live, p_raddr, p_waddr, p_value} = p_data;

  accum_stage #(.DD(DD), .AW(AW), .II_P(II_P)) u_accum (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (p_valid),
    .in_ready (p_ready),
    .in_live  (p_live),
    .in_raddr (p_raddr),
    .in_waddr (p_waddr),
    .in_data  (p_value),
    .ready    (ready),
    .res_valid(res_valid),
    .res_addr (res_addr),
    .res_value(res_value)
  );

endmodule
