// tb_cs_top: end-to-end testbench of the conditional-stalling accumulator,
// at the default size (DD = 16, 16-bit group addresses).
//
// Samples are streamed in blocks, each with its own address pattern:
//   * a block sent while the sums are still being cleared after reset
//     (the input must be held off: back-pressure),
//   * one address repeated (the worst case: DD + 1 cycles per sample, the
//     rate a design without stalling would always have),
//   * addresses cycling over 64 groups (no conflicts: one cycle per sample),
//   * 1000-sample blocks of uniformly distributed addresses over C = 4, 8,
//     16, 32, 64, 128, 512 and 1024 groups, and of Zipf-distributed
//     addresses (exponent 1.8) over 4, 8, 512 and 1024 groups.
// Checks:
//   * every sample yields one update, in order, with the sum the
//     simulator's own double arithmetic gives for its group;
//   * every sample leaves the stall stage in the slot given by the rule
//     slot = max(previous slot + 1, last slot of its group + DD + 1),
//     worked out here from the address sequence alone;
//   * with the input kept full, a block takes exactly one cycle per slot,
//     so its cycles per sample are 1 + bubbles / samples; this must be
//     DD + 1 for the one-address block, 1 for the cycling block, and for
//     the random blocks at most DD + 1 (never worse than without
//     stalling) and, within sampling error, at most the bound on the mean
//     1 + (DD*DD + DD) * Pc / 2 (Pc = sum of squared address probabilities).
// Stalls, back-pressure, conflict-free stretches and the clear phase are
// counted; one that never happened is a failure.
`timescale 1ns/1ps
module tb_cs_top;
  localparam int unsigned DD = cs_pkg::DD_DEFAULT;
  localparam int unsigned AW = cs_pkg::AW_DEFAULT;
  localparam longint      SDD = longint'(DD);

  logic          clk = 1'b0;
  logic          rst_n;
  logic          in_tvalid, in_tready;
  logic [AW-1:0] in_addr;
  logic [63:0]   in_value;
  logic          ready, res_valid;
  logic [AW-1:0] res_addr;
  logic [63:0]   res_value;
  logic          stall, issue;
  int            checks = 0, failures = 0;
  longint        cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  cs_top dut (.*);

  // ---------------------------------------------------------------- model
  real    sums [longint];
  longint last_slot [longint];
  longint model_prev = -1;
  longint slot = 0;              // slots sent by the stall stage
  longint exp_slot[$];           // model slot of each accepted sample
  typedef struct {
    logic [AW-1:0] addr;
    logic [63:0]   value;
  } upd_t;
  upd_t   exp_upd[$];
  int     n_stall = 0, n_issue = 0, n_backpressure = 0, n_clear_wait = 0;
  int     n_clean_blocks = 0;
  longint first_issue_cycle, last_issue_cycle;
  bit     block_started;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL cycle %0d: %s", cycle, msg);
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_tvalid && in_tready) begin
        longint a, s;
        a = longint'(in_addr);
        if (!sums.exists(a)) sums[a] = 0.0;
        if (!last_slot.exists(a)) last_slot[a] = -1000;
        s = model_prev + 1;
        if (last_slot[a] + SDD + 1 > s) s = last_slot[a] + SDD + 1;
        last_slot[a] = s;
        model_prev = s;
        exp_slot.push_back(s);
        sums[a] = sums[a] + $bitstoreal(in_value);
        exp_upd.push_back('{in_addr, $realtobits(sums[a])});
      end
      if (in_tvalid && !in_tready) n_backpressure++;
      if (!ready) n_clear_wait++;
      if (stall) begin
        n_stall++;
        slot++;
      end
      if (issue) begin
        longint s;
        checks++;
        s = exp_slot.pop_front();
        if (s != slot) fail($sformatf("sample sent in slot %0d, expected slot %0d", slot, s));
        if (!block_started) begin
          first_issue_cycle = cycle;
          block_started = 1'b1;
        end
        last_issue_cycle = cycle;
        n_issue++;
        slot++;
      end
      if (res_valid) begin
        upd_t u;
        checks++;
        if (exp_upd.size() == 0) fail("update without a sample");
        else begin
          u = exp_upd.pop_front();
          if (res_addr != u.addr || res_value != u.value)
            fail($sformatf("group %0d sum %h, expected group %0d sum %h",
                           res_addr, res_value, u.addr, u.value));
        end
      end
    end
  end

  // ------------------------------------------------------------- stimulus
  real zipf_cdf[];

  function automatic logic [AW-1:0] spread(int unsigned k);
    // scatter group numbers over the address space
    return AW'(k * 40503);
  endfunction

  function automatic real urand01();
    return real'($urandom()) / 4294967296.0;
  endfunction

  // kind: 0 uniform over c groups, 1 Zipf(s) over c groups, 2 one group,
  // 3 cycling over c groups. Returns Pc, the chance two samples collide.
  task automatic make_block(int kind, int c, real s, int w, ref logic [AW-1:0] addrs[$],
                            output real pc);
    addrs = {};
    pc = 0.0;
    if (kind == 1) begin
      real tot, p;
      zipf_cdf = new[c];
      tot = 0.0;
      for (int k = 1; k <= c; k++) tot += 1.0 / (real'(k) ** s);
      p = 0.0;
      for (int k = 1; k <= c; k++) begin
        real pk;
        pk = (1.0 / (real'(k) ** s)) / tot;
        p += pk;
        pc += pk * pk;
        zipf_cdf[k-1] = p;
      end
    end else if (kind == 0) pc = 1.0 / real'(c);
    else if (kind == 2) pc = 1.0;
    for (int i = 0; i < w; i++) begin
      int unsigned k;
      case (kind)
        0: k = $urandom() % c;
        1: begin
          real r;
          r = urand01();
          k = c - 1;
          for (int j = 0; j < c; j++) if (r < zipf_cdf[j]) begin k = j; break; end
        end
        2: k = 7;
        default: k = 100 + i % c;  // groups not used by earlier blocks
      endcase
      addrs.push_back(spread(k));
    end
  endtask

  task automatic run_block(string name, int kind, int c, real s, int w, bit measure);
    logic [AW-1:0] addrs[$];
    real    pc, f2, ii, lim, tol;
    int     stall0, issue0;
    longint slots;
    make_block(kind, c, s, w, addrs, pc);
    stall0 = n_stall;
    issue0 = n_issue;
    block_started = 1'b0;
    foreach (addrs[i]) begin
      in_tvalid = 1'b1;
      in_addr   = addrs[i];
      in_value  = {1'($urandom()), 11'(1010 + $urandom() % 30), 20'($urandom()), 32'($urandom())};
      @(posedge clk);
      while (!in_tready) @(posedge clk);
      @(negedge clk);
    end
    in_tvalid = 1'b0;
    while (n_issue - issue0 < w) @(negedge clk);
    repeat (DD + 8) @(negedge clk);
    slots = (n_stall - stall0) + (n_issue - issue0);
    ii = real'(slots) / real'(w);
    f2 = 1.0 + real'(DD * DD + DD) * pc / 2.0;
    $display("%-28s samples %5d  bubbles %6d  cycles/sample %7.3f  bound %7.3f",
             name, w, n_stall - stall0, ii, f2 < DD + 1 ? f2 : real'(DD + 1));
    if (measure) begin
      // with the input kept full, one slot per cycle from the first sample
      // of the block to its last (bubbles in front of the first excluded)
      checks++;
      if (last_issue_cycle - first_issue_cycle + 1 > slots)
        fail($sformatf("%s: %0d cycles for %0d slots", name,
                       last_issue_cycle - first_issue_cycle + 1, slots));
      n_clean_blocks++;
      lim = (f2 < DD + 1) ? f2 : real'(DD + 1);
      checks++;
      case (kind)
        2: if (last_issue_cycle - first_issue_cycle != longint'((w - 1) * (DD + 1)))
             fail($sformatf("%s: one-address block took %0d cycles, expected %0d", name,
                            last_issue_cycle - first_issue_cycle, (w - 1) * (DD + 1)));
        3: if (last_issue_cycle - first_issue_cycle != longint'(w - 1))
             fail($sformatf("%s: conflict-free block took %0d cycles", name,
                            last_issue_cycle - first_issue_cycle));
        default: begin
          // the bound is on the mean; a 1000-sample block may sit above
          // it by chance: allow four standard deviations of the bubble
          // count (each conflict costs at most DD bubbles) plus the DD
          // bubbles the first sample may wait for entries of the last block
          real extra;
          extra = (lim - 1.0) * real'(w);
          tol = 4.0 * $sqrt(extra * real'(DD + 1)) + real'(DD);
          if (ii < 1.0 || real'(slots - w) > extra + tol || ii > real'(DD + 1) + 0.001)
            fail($sformatf("%s: %f cycles per sample above bound %f", name, ii, lim));
        end
      endcase
    end
  endtask

  initial begin
    rst_n = 1'b0;
    in_tvalid = 1'b0;
    in_addr = '0;
    in_value = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // a block offered while the sums are being cleared
    run_block("during clear, U(64)", 0, 64, 0.0, 100, 1'b0);
    checks++;
    if (!ready) fail("not ready after the first block");
    run_block("one group", 2, 1, 0.0, 200, 1'b1);
    run_block("cycling over 64 groups", 3, 64, 0.0, 1000, 1'b1);
    run_block("uniform C=4", 0, 4, 0.0, 1000, 1'b1);
    run_block("uniform C=8", 0, 8, 0.0, 1000, 1'b1);
    run_block("uniform C=16", 0, 16, 0.0, 1000, 1'b1);
    run_block("uniform C=32", 0, 32, 0.0, 1000, 1'b1);
    run_block("uniform C=64", 0, 64, 0.0, 1000, 1'b1);
    run_block("uniform C=128", 0, 128, 0.0, 1000, 1'b1);
    run_block("uniform C=512", 0, 512, 0.0, 1000, 1'b1);
    run_block("uniform C=1024", 0, 1024, 0.0, 1000, 1'b1);
    run_block("Zipf s=1.8 C=4", 1, 4, 1.8, 1000, 1'b1);
    run_block("Zipf s=1.8 C=8", 1, 8, 1.8, 1000, 1'b1);
    run_block("Zipf s=1.8 C=512", 1, 512, 1.8, 1000, 1'b1);
    run_block("Zipf s=1.8 C=1024", 1, 1024, 1.8, 1000, 1'b1);
    checks++;
    if (exp_upd.size() != 0 || exp_slot.size() != 0)
      fail($sformatf("%0d updates never came out", exp_upd.size()));
    $display("stalls %0d  samples %0d  back-pressure cycles %0d  clear cycles %0d",
             n_stall, n_issue, n_backpressure, n_clear_wait);
    checks++;
    if (n_stall == 0) fail("no stall happened");
    checks++;
    if (n_backpressure == 0) fail("input was never held off");
    checks++;
    if (n_clear_wait == 0) fail("no clear phase seen");
    checks++;
    if (n_clean_blocks == 0) fail("no block was measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
