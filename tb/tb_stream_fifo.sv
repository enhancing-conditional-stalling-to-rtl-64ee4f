// tb_stream_fifo: self-checking testbench for the stream FIFO.
//
// A 5-deep, 12-bit FIFO is written and read at random rates (mostly
// writing, then mostly reading, then balanced) and compared with a queue:
// every word read must be the oldest one written, wr_ready must be low
// only when the FIFO holds DEPTH words and no read frees a place, rd_valid
// must follow occupancy, and count must equal the queue size. A word
// written in one cycle must be readable in the next.
`timescale 1ns/1ps
module tb_stream_fifo;
  localparam int unsigned WIDTH = 12;
  localparam int unsigned DEPTH = 5;

  logic             clk = 1'b0;
  logic             rst_n;
  logic             wr_valid, wr_ready, rd_valid, rd_ready;
  logic [WIDTH-1:0] wr_data, rd_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int               checks = 0, failures = 0;
  int               n_full = 0, n_empty = 0;
  logic [WIDTH-1:0] model[$];

  always #5 clk = ~clk;

  stream_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s", msg);
  endtask

  initial begin
    rst_n = 1'b0;
    wr_valid = 1'b0;
    rd_ready = 1'b0;
    wr_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 6000; i++) begin
      int wp, rp;
      wp = (i < 2000) ? 90 : (i < 4000) ? 20 : 50;
      rp = (i < 2000) ? 20 : (i < 4000) ? 90 : 50;
      wr_valid = ($urandom() % 100) < wp;
      rd_ready = ($urandom() % 100) < rp;
      wr_data  = WIDTH'($urandom());
      #1;
      checks++;
      if (count != model.size()) fail($sformatf("count %0d, expected %0d", count, model.size()));
      checks++;
      if (rd_valid != (model.size() != 0)) fail("rd_valid wrong");
      checks++;
      if (wr_ready != (model.size() < DEPTH || rd_ready)) fail("wr_ready wrong");
      if (rd_valid && model.size() != 0) begin
        checks++;
        if (rd_data != model[0]) fail($sformatf("read %h, expected %h", rd_data, model[0]));
      end
      if (model.size() == DEPTH) n_full++;
      if (model.size() == 0) n_empty++;
      @(posedge clk);
      if (rd_valid && rd_ready && model.size() != 0) void'(model.pop_front());
      if (wr_valid && wr_ready) model.push_back(wr_data);
      @(negedge clk);
    end
    checks++;
    if (n_full == 0 || n_empty == 0) fail("FIFO never full or never empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (7000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
