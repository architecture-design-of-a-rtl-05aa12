// output_block - exit point of results.
//
// It is a receiver on every bus: a decoder recognises the tags t of the N
// outputs this block emits (OUT_BLK[t] == BLK, each on bus BUS_OF[t]) and
// stores the datum in slot OUT_POS[t]. It de-tags the results, i.e. only
// the data words leave the chip, and puts them into the output FIFO in slot
// order 0, 1, ..., whatever order they arrived in. After the last result of
// a data set is queued it pulses set_done; once every output block has done
// so for a set, the input blocks' token control gets a credit back. The FIFO is emptied through the chip output, a
// four-phase out_req/out_data -> out_ack handshake.
// Timing: a bus token is acknowledged on the edge after bus_req rises if its
// slot is free; a slot moves to the FIFO on the next edge when it is the
// next in order; a word is offered on the chip output one edge after it
// reaches the FIFO head.
// De-tagging and ordered output through a FIFO follow the architecture; the
// slot-per-output reordering, FIFO depth and set_done signal are this
// design's choices.
module output_block
  import adsp_pkg::*;
#(
  parameter int        BLK     = 0,
  parameter tab_t      OUT_BLK = adsp_pkg::CFG_OUT_BLK,
  parameter tab_t      OUT_POS = adsp_pkg::CFG_OUT_POS,
  parameter tab_t      BUS_OF = adsp_pkg::CFG_BUS_OF,
  parameter int        NBUS   = adsp_pkg::NB,
  parameter int        DEPTH  = adsp_pkg::FIFO_DEPTH
) (
  input  logic            clk,
  input  logic            rst_n,
  // buses
  input  logic [NBUS-1:0] bus_req,
  input  token_t          bus_tok [NBUS],
  output logic [NBUS-1:0] rcv_sel,
  output logic [NBUS-1:0] rcv_ack,
  // chip output
  output logic            out_req,
  output data_t           out_data,
  input  logic            out_ack,
  // token control
  output logic            set_done,
  output logic            ev_reorder   // a result arrived ahead of its turn
);
  localparam int N  = count_of(OUT_BLK, BLK);   // results per data set
  localparam int OW = (N > 1) ? $clog2(N) : 1;

  logic  [N-1:0] full;
  data_t         slot [N];
  logic  [OW-1:0] seq;

  // decoders
  logic [OW-1:0] hit_o [NBUS];
  always_comb begin
    for (int b = 0; b < NBUS; b++) begin
      rcv_sel[b] = 1'b0;
      hit_o[b]   = '0;
      for (int t = 0; t < NT; t++)
        if (OUT_BLK[t] == BLK && BUS_OF[t] == b && int'(bus_tok[b].tag) == t) begin
          rcv_sel[b] = 1'b1;
          hit_o[b]   = OW'(OUT_POS[t]);
        end
    end
  end

  logic [NBUS-1:0] do_load;
  always_comb begin
    logic [N-1:0] busy;
    busy       = full;
    do_load    = '0;
    ev_reorder = 1'b0;
    for (int b = 0; b < NBUS; b++)
      if (bus_req[b] && rcv_sel[b] && !rcv_ack[b] && !busy[hit_o[b]]) begin
        do_load[b]       = 1'b1;
        busy[hit_o[b]]   = 1'b1;
        if (hit_o[b] != seq) ev_reorder = 1'b1;
      end
  end

  logic  f_wr_ready, f_rd_valid;
  logic [$clog2(DEPTH):0] f_count;
  data_t f_rd_data;

  wire push = full[seq] && f_wr_ready;
  wire pop  = f_rd_valid && !out_req && !out_ack;

  fifo_buffer #(.W(W_D), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_valid(push), .wr_ready(f_wr_ready), .wr_data(slot[seq]),
    .rd_valid(f_rd_valid), .rd_ready(pop), .rd_data(f_rd_data),
    .count(f_count)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full     <= '0;
      for (int o = 0; o < N; o++) slot[o] <= '0;
      seq      <= '0;
      rcv_ack  <= '0;
      out_req  <= 1'b0;
      out_data <= '0;
      set_done <= 1'b0;
    end else begin
      set_done <= 1'b0;
      for (int b = 0; b < NBUS; b++) begin
        if (!bus_req[b]) rcv_ack[b] <= 1'b0;
        if (do_load[b]) begin
          rcv_ack[b]        <= 1'b1;
          full[hit_o[b]]    <= 1'b1;
          slot[hit_o[b]]    <= bus_tok[b].data;
        end
      end
      if (push) begin
        full[seq] <= 1'b0;
        if (int'(seq) == N - 1) begin
          seq      <= '0;
          set_done <= 1'b1;
        end else begin
          seq <= seq + 1'b1;
        end
      end
      if (pop) begin
        out_req  <= 1'b1;
        out_data <= f_rd_data;
      end else if (out_req && out_ack) begin
        out_req <= 1'b0;
      end
    end
  end

  out_req_held: assert property (@(posedge clk) disable iff (!rst_n)
    out_req && !out_ack |=> out_req && $stable(out_data));

endmodule
