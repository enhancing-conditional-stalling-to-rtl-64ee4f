// stream_fifo: synchronous first-word-fall-through FIFO for packet streams.
//
// Carries packets between the stages of the conditional-stalling system
// (the input stream ahead of the stall stage, and the slots from the stall
// stage to the processing stage). Both sides use a valid/ready handshake:
// a word is written when wr_valid && wr_ready and read when
// rd_valid && rd_ready. rd_data shows the oldest word whenever rd_valid is
// high. A written word can be read from the next cycle on; one write and one
// read can happen in the same cycle, also when the FIFO is full (the read
// frees the place). count gives the occupancy. Reset empties the FIFO.
//
// The stages are joined by streams in the design this follows; the depth,
// the handshake and the first-word-fall-through behaviour are this
// design's choices.
module stream_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = cs_pkg::FIFO_DEPTH_DEFAULT
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_valid,
  output logic                     wr_ready,
  input  logic [WIDTH-1:0]         wr_data,
  output logic                     rd_valid,
  input  logic                     rd_ready,
  output logic [WIDTH-1:0]         rd_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wr_ptr, rd_ptr;
  logic             wr_en, rd_en;

  assign rd_valid = (count != 0);
  assign wr_ready = (count != DEPTH[$clog2(DEPTH+1)-1:0]) || rd_ready;
  assign wr_en    = wr_valid && wr_ready;
  assign rd_en    = rd_valid && rd_ready;
  assign rd_data  = mem[rd_ptr];

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (wr_en) wr_ptr <= next_ptr(wr_ptr);
      if (rd_en) rd_ptr <= next_ptr(rd_ptr);
      case ({wr_en, rd_en})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) 32'(count) <= DEPTH);

endmodule
