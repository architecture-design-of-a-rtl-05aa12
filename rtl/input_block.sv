// input_block - entry point of external data.
//
// Three functions:
//   * buffering: words arriving on the chip input (four-phase
//     in_req/in_data -> in_ack) go into a FIFO of DEPTH words, which smooths
//     out fluctuations of the data flow;
//   * tagging (the "input operation"): the port is shared by the N inputs
//     of one data set (the tags t with IN_BLK[t] == BLK), so the k-th word
//     of a set gets the tag t with IN_POS[t] == k, purely by arrival
//     order. Each tagged token is sent, as a bus sender
//     (src_req/src_tok/src_bus -> src_ack), to the bus BUS_OF[tag];
//   * token control: a counter of credits, initially MAX_SETS, lets a new
//     data set leave the FIFO only while fewer than MAX_SETS sets are inside
//     the system. The first word of a set takes a credit; a pulse on
//     set_done (from the output block, when a set's last result is out)
//     returns it. With several input blocks each keeps its own credits and
//     all receive the same set_done.
// Timing: an input word is acknowledged on the edge after in_req rises if
// the FIFO has room; a token is offered on the edge after its word reaches
// the FIFO head, and one token is in flight at a time.
// The three functions follow the architecture; the FIFO depth, credit
// scheme and one-credit default are this design's choices.
module input_block
  import adsp_pkg::*;
#(
  parameter int       BLK     = 0,
  parameter tab_t     IN_BLK  = adsp_pkg::CFG_IN_BLK,
  parameter tab_t     IN_POS  = adsp_pkg::CFG_IN_POS,
  parameter tab_t     BUS_OF  = adsp_pkg::CFG_BUS_OF,
  parameter int       DEPTH   = adsp_pkg::FIFO_DEPTH,
  parameter int       SETS    = adsp_pkg::MAX_SETS
) (
  input  logic   clk,
  input  logic   rst_n,
  // chip input
  input  logic   in_req,
  input  data_t  in_data,
  output logic   in_ack,
  // bus sender
  output logic   src_req,
  output token_t src_tok,
  output int     src_bus,
  input  logic   src_ack,
  // token control
  input  logic   set_done,
  output logic   ev_token_stall,    // a set was held back for lack of credit
  output logic   ev_fifo_full       // an input word waited for FIFO room
);
  localparam int N  = count_of(IN_BLK, BLK);   // words per data set
  localparam int KW = (N > 1) ? $clog2(N) : 1;

  // tag and bus of each position in the set
  function automatic tag_t tag_of_pos(input int k);
    return tag_t'(tag_at(IN_BLK, IN_POS, BLK, k));
  endfunction
  localparam int CW = $clog2(SETS + 1);

  logic  f_wr_ready, f_rd_valid, f_rd_ready;
  data_t f_rd_data;
  logic [$clog2(DEPTH):0] f_count;

  wire push = in_req && !in_ack && f_wr_ready;

  fifo_buffer #(.W(W_D), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_valid(push), .wr_ready(f_wr_ready), .wr_data(in_data),
    .rd_valid(f_rd_valid), .rd_ready(f_rd_ready), .rd_data(f_rd_data),
    .count(f_count)
  );

  logic [KW-1:0] k;         // position in the current data set
  logic [CW-1:0] credits;

  wire credit_ok = (k != '0) || (credits != '0);
  wire send      = f_rd_valid && credit_ok && !src_req && !src_ack;

  assign f_rd_ready     = send;
  assign ev_token_stall = f_rd_valid && !credit_ok && !src_req && !src_ack;
  assign ev_fifo_full   = in_req && !in_ack && !f_wr_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_ack  <= 1'b0;
      src_req <= 1'b0;
      src_tok <= '0;
      src_bus <= 0;
      k       <= '0;
      credits <= CW'(SETS);
    end else begin
      if (push)              in_ack <= 1'b1;
      else if (!in_req)      in_ack <= 1'b0;

      if (send) begin
        src_req <= 1'b1;
        src_tok <= '{tag: tag_of_pos(int'(k)), data: f_rd_data};
        src_bus <= BUS_OF[tag_of_pos(int'(k))];
        k       <= (int'(k) == N - 1) ? '0 : k + 1'b1;
      end else if (src_req && src_ack) begin
        src_req <= 1'b0;
      end

      credits <= credits - CW'(send && k == '0) + CW'(set_done);
    end
  end

  credit_bound: assert property (@(posedge clk) disable iff (!rst_n)
    int'(credits) <= SETS);

endmodule
