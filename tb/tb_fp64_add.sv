// tb_fp64_add: self-checking testbench for the pipelined float64 adder.
//
// Two adders are tested side by side: the default deep one (LAT = 15, one
// register per step plus a delay line) and a shallow one (LAT = 2, steps
// chained). Each cycle both get the same operand pair; the expected sum is
// the simulator's own double-precision addition, with results below the
// normal range replaced by a signed zero (the adder flushes them) and any
// NaN replaced by the adder's quiet NaN. Every result must appear exactly
// LAT cycles after its operands. Operands cover random magnitudes, every
// alignment distance up to 60, near-cancellations, exact cancellation,
// zeros, overflow, infinities and NaNs.
`timescale 1ns/1ps
module tb_fp64_add;
  localparam int unsigned LAT_A = 15;
  localparam int unsigned LAT_B = 2;
  localparam int unsigned N     = 20000;

  logic        clk = 1'b0;
  logic        in_valid;
  logic [63:0] a, b;
  logic        va, vb;
  logic [63:0] ya, yb;
  int          checks = 0, failures = 0;
  longint      cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  fp64_add #(.LAT(LAT_A)) dut_a (.clk(clk), .in_valid(in_valid), .a(a), .b(b),
                                 .out_valid(va), .y(ya));
  fp64_add #(.LAT(LAT_B)) dut_b (.clk(clk), .in_valid(in_valid), .a(a), .b(b),
                                 .out_valid(vb), .y(yb));

  typedef struct {
    longint      due_a;
    longint      due_b;
    logic [63:0] y;
    logic [63:0] opa;
    logic [63:0] opb;
  } exp_t;
  exp_t q_a[$], q_b[$];

  function automatic logic [63:0] expected(logic [63:0] x, logic [63:0] z);
    logic [63:0] r;
    r = $realtobits($bitstoreal(x) + $bitstoreal(z));
    if (r[62:52] == 11'h7FF && r[51:0] != 0) return 64'h7FF8_0000_0000_0000;
    if (r[62:52] == 11'd0) return {r[63], 63'd0};
    return r;
  endfunction

  function automatic logic [63:0] rnd_normal(int emin, int emax);
    logic [51:0] f;
    int unsigned e;
    f = {20'($urandom()), 32'($urandom())};
    e = emin + ($urandom() % (emax - emin + 1));
    return {1'($urandom()), 11'(e), f};
  endfunction

  task automatic pick(int unsigned i, output logic [63:0] x, output logic [63:0] z);
    int unsigned k;
    k = $urandom() % 8;
    x = rnd_normal(900, 1150);
    case (k)
      0, 1: z = rnd_normal(900, 1150);
      2, 3: begin  // controlled alignment distance, both signs
        z = rnd_normal(1, 2046);
        z[62:52] = x[62:52] - 11'(i % 61);
      end
      4: begin     // near-cancellation
        z = x ^ (64'd1 << 63);
        z[51:0] = x[51:0] ^ 52'($urandom() % 256);
      end
      5: begin     // exact cancellation or zero operands
        case ($urandom() % 4)
          0: z = x ^ (64'd1 << 63);
          1: z = 64'd0;
          2: begin z = 64'h8000_0000_0000_0000; x = 64'h8000_0000_0000_0000; end
          default: begin z = 64'd0; x = 64'h8000_0000_0000_0000; end
        endcase
      end
      6: begin     // wide range, overflow
        x = rnd_normal(2040, 2046);
        z = rnd_normal(2040, 2046);
        z[63] = x[63];
      end
      default: begin  // specials
        case ($urandom() % 5)
          0: z = 64'h7FF0_0000_0000_0000;
          1: z = 64'hFFF0_0000_0000_0000;
          2: begin x = 64'h7FF0_0000_0000_0000; z = 64'hFFF0_0000_0000_0000; end
          3: z = 64'h7FF4_0000_0000_1234;
          default: z = {1'b0, 11'd0, 52'($urandom())};  // subnormal read as zero
        endcase
      end
    endcase
  endtask

  // subnormal operands are read as zero by the adder
  function automatic logic [63:0] flush(logic [63:0] x);
    return (x[62:52] == 0) ? {x[63], 63'd0} : x;
  endfunction

  // the adder has no reset: its pipeline holds junk until the first
  // LAT_A cycles have passed, so outputs are watched from then on
  always @(posedge clk) begin
    if (cycle <= LAT_A) begin
    end else begin
    if (va) begin
      exp_t e;
      checks++;
      if (q_a.size() == 0) begin
        failures++;
        $display("FAIL deep adder: unexpected result at cycle %0d", cycle);
      end else begin
        e = q_a.pop_front();
        if (e.due_a != cycle || ya !== e.y) begin
          failures++;
          if (failures < 10)
            $display("FAIL deep: %h + %h = %h expected %h (cycle %0d due %0d)",
                     e.opa, e.opb, ya, e.y, cycle, e.due_a);
        end
      end
    end
    if (vb) begin
      exp_t e;
      checks++;
      if (q_b.size() == 0) begin
        failures++;
        $display("FAIL shallow adder: unexpected result at cycle %0d", cycle);
      end else begin
        e = q_b.pop_front();
        if (e.due_b != cycle || yb !== e.y) begin
          failures++;
          if (failures < 10)
            $display("FAIL shallow: %h + %h = %h expected %h (cycle %0d due %0d)",
                     e.opa, e.opb, yb, e.y, cycle, e.due_b);
        end
      end
    end
    end
  end

  initial begin
    exp_t e;
    in_valid = 1'b0;
    a = '0;
    b = '0;
    repeat (LAT_A + 2) @(negedge clk);
    for (int unsigned i = 0; i < N; i++) begin
      logic [63:0] x, z;
      pick(i, x, z);
      if (($urandom() % 2) == 1) begin
        a = x; b = z;
      end else begin
        a = z; b = x;
      end
      in_valid = ($urandom() % 8) != 0;
      if (in_valid) begin
        e.y     = expected(flush(a), flush(b));
        e.opa   = a;
        e.opb   = b;
        // operands are sampled at the coming edge (cycle + 1 after it)
        e.due_a = cycle + longint'(LAT_A);
        e.due_b = cycle + longint'(LAT_B);
        q_a.push_back(e);
        q_b.push_back(e);
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (LAT_A + 3) @(negedge clk);
    checks++;
    if (q_a.size() != 0 || q_b.size() != 0) begin
      failures++;
      $display("FAIL results missing: %0d deep, %0d shallow", q_a.size(), q_b.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
