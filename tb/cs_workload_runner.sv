// cs_workload_runner: drives one cs_top with long address streams and
// compares its mean cycles per sample with analytical models.
//
// Used by tb_cs_workloads, one runner per dependency distance DD and
// processing initiation interval II_P. With II_P > 1 the stall stage keeps
// DD' = DD / II_P (rounded down) slots apart and every model below is
// evaluated at DD' and scaled by II_P. For each
// workload (uniform over C groups, or Zipf with exponent 1.8 over C groups)
// W samples are streamed with the input kept full, so the stall stage
// sends one slot per cycle and the cycles each sample costs are the slots
// between it and the previous sample. The mean (II_sys) is compared with:
//   * uniform: the exact mean of a Markov chain over the occupancy of the
//     last DD slots (state = which of them carry a sample; a new sample
//     collides with each in-flight sample with probability 1/C and then
//     waits until that sample is DD + 1 slots behind it, giving
//     II = DD + 2 - j for a collision j slots back, else II = 1); the
//     measured mean must agree within eight standard errors;
//   * uniform: the closed-form estimate with II_lim = 1.35
//       DD_lim = (sqrt(8 (II_lim - 1) / Pc + 1) - 1) / 2,
//       b      = (2 DD_lim + 1) Pc / 2,
//       II     = 1 + (DD^2 + DD) Pc / 2            if DD <  DD_lim,
//                II_lim + b (DD - DD_lim)          otherwise,
//     to within 8 % (plus sampling error);
//   * any distribution: at most 1 + (DD^2 + DD) Pc / 2, with Pc the sum of
//     squared address probabilities, and at most DD + 1 (the rate without
//     stalling), also for every 1000-sample block.
// Every update's sum is checked against double arithmetic as well.
`timescale 1ns/1ps
module cs_workload_runner #(
  parameter int unsigned DD = 8,
  parameter int unsigned AW = 10,
  parameter int unsigned W  = 20000,
  parameter int unsigned II_P = 1
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  // slots the stall stage keeps apart
  localparam int unsigned DDS = DD / II_P;

  logic          rst_n;
  logic          in_tvalid, in_tready;
  logic [AW-1:0] in_addr;
  logic [63:0]   in_value;
  logic          ready, res_valid;
  logic [AW-1:0] res_addr;
  logic [63:0]   res_value;
  logic          stall, issue;

  cs_top #(.DD(DD), .AW(AW), .II_P(II_P)) dut (.*);

  real    sums [2**AW];
  logic [AW-1:0] exp_addr[$];
  logic [63:0]   exp_val[$];
  longint slot = 0, prev_issue_slot = -1;
  longint n_issue = 0;
  real    ii_sum, ii_sq;
  longint blk_slots;
  int     blk_n;
  real    blk_max;
  longint first_cyc, last_cyc, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL DD=%0d: %s", DD, msg);
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_tvalid && in_tready) begin
        sums[in_addr] = sums[in_addr] + $bitstoreal(in_value);
        exp_addr.push_back(in_addr);
        exp_val.push_back($realtobits(sums[in_addr]));
      end
      if (issue) begin
        real d;
        d = real'(slot - prev_issue_slot);
        if (prev_issue_slot >= 0) begin
          ii_sum += d;
          ii_sq  += d * d;
          blk_slots += slot - prev_issue_slot;
          blk_n++;
          if (blk_n == 1000) begin
            if (real'(blk_slots) / 1000.0 > blk_max) blk_max = real'(blk_slots) / 1000.0;
            blk_n = 0;
            blk_slots = 0;
          end
        end
        if (prev_issue_slot < 0) first_cyc = cycle;
        last_cyc = cycle;
        prev_issue_slot = slot;
        n_issue++;
      end
      if (stall || issue) slot++;
      if (res_valid) begin
        checks++;
        if (exp_addr.size() == 0) fail("update without a sample");
        else if (res_addr != exp_addr.pop_front() || res_value != exp_val.pop_front())
          fail("wrong group sum");
      end
    end
  end

  // exact mean II of the slot-occupancy Markov chain, uniform addresses
  function automatic real chain_mean(real pc);
    int   ns;
    real  pi[], nx[];
    real  mean;
    ns = 2 ** DDS;
    pi = new[ns];
    nx = new[ns];
    foreach (pi[s]) pi[s] = 0.0;
    pi[1] = 1.0;
    for (int it = 0; it < 4000; it++) begin
      foreach (nx[s]) nx[s] = 0.5 * pi[s];  // lazy chain: same steady state
      for (int s = 1; s < ns; s += 2) begin
        if (pi[s] != 0.0) begin
          int n;
          n = $countones(s);
          for (int j = 1; j <= DDS; j++)
            if (s[j-1]) nx[((s << (DDS + 2 - j)) | 1) & (ns - 1)] += 0.5 * pi[s] * pc;
          nx[((s << 1) | 1) & (ns - 1)] += 0.5 * pi[s] * (1.0 - n * pc);
        end
      end
      pi = nx;
      nx = new[ns];
    end
    mean = 0.0;
    for (int s = 1; s < ns; s += 2) begin
      int n;
      n = $countones(s);
      for (int j = 1; j <= DDS; j++)
        if (s[j-1]) mean += pi[s] * pc * real'(DDS + 2 - j);
      mean += pi[s] * (1.0 - n * pc);
    end
    return mean;
  endfunction

  function automatic real eq2(real pc);
    real lim, ddl, b, dd;
    lim = 1.35;
    dd  = real'(DDS);
    ddl = ($sqrt(8.0 * (lim - 1.0) / pc + 1.0) - 1.0) / 2.0;
    b   = (2.0 * ddl + 1.0) * pc / 2.0;
    return (dd < ddl) ? 1.0 + (dd * dd + dd) * pc / 2.0 : lim + b * (dd - ddl);
  endfunction

  task automatic run(string name, bit zipf, int c);
    real cdf[];
    real pc, tot, p, mean, var_, se, f2, model, approx, cyc;
    longint n0;
    cdf = new[c];
    pc = 0.0;
    tot = 0.0;
    for (int k = 1; k <= c; k++) tot += zipf ? 1.0 / (real'(k) ** 1.8) : 1.0;
    p = 0.0;
    for (int k = 1; k <= c; k++) begin
      real pk;
      pk = (zipf ? 1.0 / (real'(k) ** 1.8) : 1.0) / tot;
      p += pk;
      pc += pk * pk;
      cdf[k-1] = p;
    end
    ii_sum = 0.0;
    ii_sq = 0.0;
    blk_slots = 0;
    blk_n = 0;
    blk_max = 0.0;
    prev_issue_slot = -1;
    n0 = n_issue;
    for (int i = 0; i < W; i++) begin
      int unsigned k;
      if (zipf) begin
        real r;
        r = real'($urandom()) / 4294967296.0;
        k = c - 1;
        for (int j = 0; j < c; j++) if (r < cdf[j]) begin k = j; break; end
      end else k = $urandom() % c;
      in_tvalid = 1'b1;
      in_addr   = AW'(k * 397);
      in_value  = {1'($urandom()), 11'(1015 + $urandom() % 16), 20'($urandom()), 32'($urandom())};
      @(posedge clk);
      while (!in_tready) @(posedge clk);
      @(negedge clk);
    end
    in_tvalid = 1'b0;
    while (n_issue - n0 < W) @(negedge clk);
    // the slot FIFO drains at one slot every II_P cycles
    repeat ((DD + 40) * II_P) @(negedge clk);
    mean = ii_sum / real'(W - 1);
    var_ = ii_sq / real'(W - 1) - mean * mean;
    se   = $sqrt(var_ / real'(W - 1));
    f2   = 1.0 + real'(DDS * DDS + DDS) * pc / 2.0;
    if (f2 > real'(DDS + 1)) f2 = real'(DDS + 1);
    // with the input kept full the processing module sets the pace: one
    // slot every II_P cycles
    cyc = real'(last_cyc - first_cyc) / real'(W - 1);
    checks++;
    if (cyc > mean * II_P * 1.001 + 0.001 || cyc < mean * II_P * 0.999 - 0.001)
      fail($sformatf("%s: %f cycles per sample for %f slots per sample", name, cyc, mean));
    checks++;
    if (mean > f2 + 8.0 * se) fail($sformatf("%s: mean %f above bound %f", name, mean, f2));
    checks++;
    if (blk_max > real'(DDS + 1)) fail($sformatf("%s: a block took %f cycles per sample", name, blk_max));
    if (!zipf) begin
      model  = chain_mean(pc);
      approx = eq2(pc);
      checks++;
      if (mean - model > 8.0 * se || model - mean > 8.0 * se)
        fail($sformatf("%s: mean %f, chain model %f (se %f)", name, mean, model, se));
      checks++;
      if ((mean - approx) / mean > 0.08 + 8.0 * se || (approx - mean) / mean > 0.08 + 8.0 * se)
        fail($sformatf("%s: mean %f, closed form %f", name, mean, approx));
      $display("DD=%0d II_p=%0d %-12s II_sys %6.3f  chain model %6.3f  closed form %6.3f  worst 1000-block %6.3f  baseline %0d",
               DD, II_P, name, cyc, model * II_P, approx * II_P, blk_max * II_P, DD + 1);
    end else
      $display("DD=%0d II_p=%0d %-12s II_sys %6.3f  bound %6.3f  worst 1000-block %6.3f  baseline %0d",
               DD, II_P, name, cyc, f2 * II_P, blk_max * II_P, DD + 1);
  endtask

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
    foreach (sums[i]) sums[i] = 0.0;
    rst_n = 1'b0;
    in_tvalid = 1'b0;
    in_addr = '0;
    in_value = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (!ready) @(negedge clk);
    run("U(4)", 1'b0, 4);
    run("U(8)", 1'b0, 8);
    run("U(16)", 1'b0, 16);
    run("U(64)", 1'b0, 64);
    run("U(1024)", 1'b0, 1024);
    run("Z(1.8,4)", 1'b1, 4);
    run("Z(1.8,8)", 1'b1, 8);
    run("Z(1.8,1024)", 1'b1, 1024);
    checks++;
    if (exp_addr.size() != 0) fail("updates missing");
    done = 1'b1;
  end
endmodule
