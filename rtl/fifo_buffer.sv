// fifo_buffer - first-in first-out buffer used by the input block (to smooth
// out density fluctuations of the incoming data stream) and by the output
// block (to hold de-tagged results on their way off chip).
//
// A circular array of DEPTH words with read and write pointers one bit wider
// than the address, so full and empty are told apart by the top bit.
// Interface: push side wr_valid/wr_ready/wr_data, pop side
// rd_valid/rd_ready/rd_data; a word moves on a clock edge where valid and
// ready are both high. rd_data shows the head word whenever rd_valid is high
// (first-word fall-through), so a word pushed at edge k can be popped at
// edge k+1. The buffer's existence follows the architecture; its depth and
// the valid/ready convention are this design's choice.
module fifo_buffer #(
  parameter int W     = 16,
  parameter int DEPTH = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_valid,
  output logic         wr_ready,
  input  logic [W-1:0] wr_data,
  output logic         rd_valid,
  input  logic         rd_ready,
  output logic [W-1:0] rd_data,
  output logic [$clog2(DEPTH):0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wp, rp;

  wire do_wr = wr_valid && wr_ready;
  wire do_rd = rd_valid && rd_ready;

  assign count    = ($clog2(DEPTH)+1)'(wp - rp);
  assign wr_ready = (wp - rp) != (AW+1)'(DEPTH);
  assign rd_valid = wp != rp;
  assign rd_data  = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp[AW-1:0]] <= wr_data;
  end

  // Wrap of the pointers requires a power-of-two depth.
  initial assert ((DEPTH & (DEPTH - 1)) == 0 && DEPTH >= 2)
    else $error("fifo_buffer: DEPTH must be a power of two >= 2");

endmodule
