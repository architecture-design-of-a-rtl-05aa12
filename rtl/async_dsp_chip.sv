// async_dsp_chip - data-driven, distributed-control DSP chip.
//
// There is no central controller. NF functional-unit nodes, N_IBLK input
// blocks and N_OBLK output blocks are joined by a network of NB buses.
// Data travel as tokens (data + tag of the producing operation). A node fires an operation
// as soon as both operands are in its matching block and its FU is free; the
// result token is put on the node's bus and delivered to every unit whose
// decoders recognise its tag. Each input block tags external data by arrival
// order and limits how many data sets are inside at once; each output block
// collects its results, strips the tags and sends them out in a fixed order.
// A data set counts as finished when every output block has emitted its
// part; that event returns a credit to every input block.
//
// Chip interface: per input port i, in_req[i]/in_data[i] -> in_ack[i], and
// per output port o, out_req[o]/out_data[o] -> out_ack[o], all four-phase
// handshakes. In the example a data set is ar, ai on port 0 and br, bi, g
// on port 1, and gives zr, zi on the single output port.
// Every link inside is a four-phase request/acknowledge handshake, modelled
// with one clock per handshake step; the self-timed circuits the
// architecture calls for are thus rendered as clocked logic, which keeps
// the protocol but not the gate-level timing. The block structure follows
// the architecture; the application mapping (the adsp_pkg tables) is this
// design's example.
module async_dsp_chip
  import adsp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_IBLK-1:0] in_req,
  input  data_t             in_data [N_IBLK],
  output logic [N_IBLK-1:0] in_ack,
  output logic [N_OBLK-1:0] out_req,
  output data_t             out_data [N_OBLK],
  input  logic [N_OBLK-1:0] out_ack
);
  localparam int NS   = NF + N_IBLK;  // senders: FU nodes, then input blocks
  localparam int NRCV = NF + N_OBLK;  // receivers: FU nodes, then output blocks
  localparam int CW   = $clog2(MAX_SETS + 1) + 1;

  logic [NS-1:0]   src_req, src_ack;
  token_t          src_tok [NS];
  int              src_bus [NS];
  logic [NB-1:0]   bus_req;
  token_t          bus_tok [NB];
  logic [NB-1:0]   rcv_sel [NRCV];
  logic [NB-1:0]   rcv_ack [NRCV];
  logic [NB-1:0]   ev_xfer, ev_contention;
  logic [N_OBLK-1:0] set_done;
  logic              all_done;

  logic [NF-1:0]   ev_multi_ready, ev_stall, ev_shared_load, fu_busy;
  logic [N_IBLK-1:0] ev_token_stall, ev_fifo_full;
  logic [N_OBLK-1:0] ev_reorder;

  bus_network #(.NBUS(NB), .NS(NS), .NRCV(NRCV)) u_net (
    .clk, .rst_n,
    .src_req, .src_tok, .src_bus, .src_ack,
    .bus_req, .bus_tok, .rcv_sel, .rcv_ack,
    .ev_xfer, .ev_contention
  );

  for (genvar f = 0; f < NF; f++) begin : g_fu
    assign src_bus[f] = CFG_FU_BUS[f];
    fu_node #(.FU(f), .KIND(CFG_FU_KIND[f])) u_node (
      .clk, .rst_n,
      .bus_req, .bus_tok, .rcv_sel(rcv_sel[f]), .rcv_ack(rcv_ack[f]),
      .src_req(src_req[f]), .src_tok(src_tok[f]), .src_ack(src_ack[f]),
      .ev_multi_ready(ev_multi_ready[f]), .ev_stall(ev_stall[f]),
      .ev_shared_load(ev_shared_load[f]), .fu_busy(fu_busy[f])
    );
  end

  for (genvar i = 0; i < N_IBLK; i++) begin : g_in
    input_block #(.BLK(i)) u_in (
      .clk, .rst_n,
      .in_req(in_req[i]), .in_data(in_data[i]), .in_ack(in_ack[i]),
      .src_req(src_req[NF+i]), .src_tok(src_tok[NF+i]), .src_bus(src_bus[NF+i]),
      .src_ack(src_ack[NF+i]),
      .set_done(all_done), .ev_token_stall(ev_token_stall[i]),
      .ev_fifo_full(ev_fifo_full[i])
    );
  end

  for (genvar o = 0; o < N_OBLK; o++) begin : g_out
    output_block #(.BLK(o)) u_out (
      .clk, .rst_n,
      .bus_req, .bus_tok, .rcv_sel(rcv_sel[NF+o]), .rcv_ack(rcv_ack[NF+o]),
      .out_req(out_req[o]), .out_data(out_data[o]), .out_ack(out_ack[o]),
      .set_done(set_done[o]), .ev_reorder(ev_reorder[o])
    );
  end

  // Set completion: count each output block's finished sets; a set is done
  // when every output block has finished it.
  logic [CW-1:0] done_cnt [N_OBLK];
  logic          all_have;

  always_comb begin
    all_have = 1'b1;
    for (int o = 0; o < N_OBLK; o++)
      if (done_cnt[o] == '0 && !set_done[o]) all_have = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      all_done <= 1'b0;
      for (int o = 0; o < N_OBLK; o++) done_cnt[o] <= '0;
    end else begin
      all_done <= all_have;
      for (int o = 0; o < N_OBLK; o++)
        done_cnt[o] <= done_cnt[o] + CW'(set_done[o]) - CW'(all_have);
    end
  end

endmodule
