// accum_stage: groupwise float64 accumulation, pipelined with no RAW check.
//
// The processing module of the conditional-stalling system. Each slot it
// takes carries a group address and a float64 sample; for a live slot it
// reads the group's running sum, adds the sample and writes the new sum
// back, and reports the new sum on the res_* outputs. Bubbles (in_live = 0)
// flow down the pipeline and change nothing. It takes one slot per cycle
// (II = 1) whenever it is ready and never stalls once a slot is taken.
//
// Pipeline: cycle t, the slot is taken and the sum at in_raddr is read
// from acc_mem; cycle t + 1, the sum and the sample enter fp64_add; cycle
// t + 1 + ADD_LAT, the result is written to in_waddr and shown on res_*.
// With the read-first memory, a read of the same address issued in any of
// cycles t + 1 .. t + 1 + ADD_LAT misses this write, so the dependency
// distance is DD = ADD_LAT + 1; the adder latency is derived from DD. The
// stage itself does nothing about it: the stall stage ahead of it keeps
// slots that touch the same address at least DD + 1 slots apart.
//
// With II_P > 1 the stage takes a slot (sample or bubble) at most every
// II_P cycles, a cheaper processing module; slots j apart are then at least
// j * II_P cycles apart, so the stall stage only has to keep DD / II_P
// (rounded down) of them apart (see cs_top).
//
// After reset the stage writes +0.0 to every one of the 2**AW sums, one per
// cycle, and keeps in_ready (and ready) low until that is done.
//
// The accumulation example, the use of a block RAM in read-first mode and
// a deep float64 adder follow the design this is based on; the exact split
// of the latency between memory and adder, the result port and the clear
// sweep are this design's choices.
module accum_stage #(
  parameter int unsigned DD = cs_pkg::DD_DEFAULT,
  parameter int unsigned AW = cs_pkg::AW_DEFAULT,
  parameter int unsigned II_P = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic          in_live,
  input  logic [AW-1:0] in_raddr,
  input  logic [AW-1:0] in_waddr,
  input  logic [63:0]   in_data,
  output logic          ready,
  output logic          res_valid,
  output logic [AW-1:0] res_addr,
  output logic [63:0]   res_value
);

  localparam int unsigned ADD_LAT = DD - 1;

  logic          take;
  logic          slot_ok;
  logic          clr_busy_q;
  logic [AW-1:0] clr_addr_q;

  logic          s1_live_q;
  logic [AW-1:0] s1_waddr_q;
  logic [63:0]   s1_data_q;
  logic [63:0]   sum_rd;

  logic          add_valid;
  logic [63:0]   add_y;
  logic [AW-1:0] waddr_dly [ADD_LAT];

  logic          mem_we;
  logic [AW-1:0] mem_waddr;
  logic [63:0]   mem_wdata;

  assign in_ready = !clr_busy_q && slot_ok;
  assign ready    = !clr_busy_q;

  // initiation interval of the processing module
  if (II_P > 1) begin : g_iip
    logic [$clog2(II_P)-1:0] wait_q;
    always_ff @(posedge clk) begin
      if (!rst_n)
        wait_q <= '0;
      else if (take)
        wait_q <= $clog2(II_P)'(II_P - 1);
      else if (wait_q != '0)
        wait_q <= wait_q - 1'b1;
    end
    assign slot_ok = (wait_q == '0);
  end else begin : g_ii1
    assign slot_ok = 1'b1;
  end
  assign take     = in_valid && in_ready;

  // clear sweep
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      clr_busy_q <= 1'b1;
      clr_addr_q <= '0;
    end else if (clr_busy_q) begin
      clr_addr_q <= clr_addr_q + 1'b1;
      if (clr_addr_q == '1) clr_busy_q <= 1'b0;
    end
  end

  // stage 1: sample and address beside the memory read
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_live_q  <= 1'b0;
      s1_waddr_q <= '0;
      s1_data_q  <= '0;
    end else begin
      s1_live_q  <= take && in_live;
      s1_waddr_q <= in_waddr;
      s1_data_q  <= in_data;
    end
  end

  fp64_add #(.LAT(ADD_LAT)) u_add (
    .clk      (clk),
    .in_valid (s1_live_q),
    .a        (sum_rd),
    .b        (s1_data_q),
    .out_valid(add_valid),
    .y        (add_y)
  );

  always_ff @(posedge clk) begin
    waddr_dly[0] <= s1_waddr_q;
    for (int i = 1; i < ADD_LAT; i++) waddr_dly[i] <= waddr_dly[i-1];
  end

  assign mem_we    = clr_busy_q || add_valid;
  assign mem_waddr = clr_busy_q ? clr_addr_q : waddr_dly[ADD_LAT-1];
  assign mem_wdata = clr_busy_q ? 64'd0 : add_y;

  acc_mem #(.AW(AW), .DW(64)) u_mem (
    .clk  (clk),
    .re   (take && in_live),
    .raddr(in_raddr),
    .rdata(sum_rd),
    .we   (mem_we),
    .waddr(mem_waddr),
    .wdata(mem_wdata)
  );

  assign res_valid = add_valid && !clr_busy_q;
  assign res_addr  = waddr_dly[ADD_LAT-1];
  assign res_value = add_y;

  // the clear sweep must outlast the adder pipeline so that no stale
  // pipeline content is written after it
  initial assert (DD >= 2 && (2 ** AW) > DD + 1)
    else $fatal(1, "accum_stage needs DD >= 2 and 2**AW > DD + 1");

endmodule
