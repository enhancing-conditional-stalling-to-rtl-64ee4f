// tb_cs_workloads: the address workloads of the technique's evaluation,
// run on the complete system at several dependency distances.
//
// Runners with DD = 2, 4 and 8 (10-bit group addresses, so up to 1024
// groups), and one with DD = 8 and a processing module that takes a slot
// only every second cycle (II_p = 2), each stream 20000 samples per workload: uniform over 4, 8, 16,
// 64 and 1024 groups and Zipf (exponent 1.8) over 4, 8 and 1024 groups.
// Their measured cycles per sample are held against the models described
// in cs_workload_runner. A stall stage with DD = 1 (which the accumulation
// pipeline cannot have, being at least two cycles deep) is checked on its
// own against the exact result for that case: with uniform addresses over
// C groups the number of samples that wait is binomial with p = 1/C, so
// the mean is 1 + 1/C.
`timescale 1ns/1ps
module tb_cs_workloads;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NR = 4;
  logic done [NR];
  int   chk [NR];
  int   fl [NR];

  cs_workload_runner #(.DD(2)) u_dd2 (.clk(clk), .done(done[0]), .checks(chk[0]), .failures(fl[0]));
  cs_workload_runner #(.DD(4)) u_dd4 (.clk(clk), .done(done[1]), .checks(chk[1]), .failures(fl[1]));
  cs_workload_runner #(.DD(8)) u_dd8 (.clk(clk), .done(done[2]), .checks(chk[2]), .failures(fl[2]));
  // a processing module that takes a slot every 2 cycles: DD' = 4
  cs_workload_runner #(.DD(8), .II_P(2)) u_dd8_iip2 (.clk(clk), .done(done[3]), .checks(chk[3]),
                                                    .failures(fl[3]));

  // ---- DD = 1 stall stage, uniform addresses over C = 4 groups
  localparam int unsigned C1 = 4;
  localparam int unsigned W1 = 40000;
  logic       rst_n = 1'b0;
  logic       s_in_valid = 1'b0, s_in_ready, s_out_valid, s_out_live, s_stall;
  logic [3:0] s_addr = '0, s_oraddr, s_owaddr;
  logic [7:0] s_odata;
  int         s_live = 0, s_bub = 0;
  bit         s_done = 1'b0;
  int         checks = 0, failures = 0;

  stall_stage #(.DD(1), .AW(4), .DW(8)) u_dd1 (
    .clk(clk), .rst_n(rst_n), .in_valid(s_in_valid), .in_ready(s_in_ready),
    .in_raddr(s_addr), .in_waddr(s_addr), .in_data(8'd0),
    .out_valid(s_out_valid), .out_ready(1'b1), .out_live(s_out_live),
    .out_raddr(s_oraddr), .out_waddr(s_owaddr), .out_data(s_odata), .stall(s_stall));

  always @(posedge clk) if (rst_n && s_out_valid) begin
    if (s_out_live) s_live++;
    else s_bub++;
  end

  initial begin
    real mean, expect_ii, se;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < W1; i++) begin
      s_in_valid = 1'b1;
      s_addr = 4'($urandom() % C1);
      @(posedge clk);
      while (!s_in_ready) @(posedge clk);
      @(negedge clk);
    end
    s_in_valid = 1'b0;
    repeat (4) @(negedge clk);
    mean = real'(s_live + s_bub) / real'(s_live);
    expect_ii = 1.0 + 1.0 / real'(C1);
    se = $sqrt((1.0 / real'(C1)) * (1.0 - 1.0 / real'(C1)) / real'(W1));
    $display("DD=1 U(%0d)  II_sys %6.4f  exact mean %6.4f", C1, mean, expect_ii);
    checks += 2;
    if (s_live != W1) failures++;
    if (mean > expect_ii + 6.0 * se || mean < expect_ii - 6.0 * se) begin
      failures++;
      $display("FAIL DD=1: mean %f, expected %f", mean, expect_ii);
    end
    s_done = 1'b1;
  end

  initial begin
    wait (s_done && done[0] && done[1] && done[2] && done[3]);
    for (int i = 0; i < NR; i++) begin
      checks += chk[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
