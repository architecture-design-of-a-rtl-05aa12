// bus_network - the multi-bus interconnection network.
//
// NBUS parallel token_bus instances. Every sender (an FU node's output
// register or an input block) presents a request, a token and the index of
// the bus it wants; the request is routed to that bus's arbiter and the
// acknowledge comes back from it. A functional unit always names the one bus
// its output is wired to, while an input block may name a different bus for
// each token. Every receiver (matching blocks, output blocks) sees all
// buses: bus_req/bus_tok of each bus, and answers per bus with a decoder hit
// (rcv_sel) and an acknowledge (rcv_ack). Buses run concurrently and
// independently, so NBUS transfers can be in progress at once.
// The structure follows the architecture; the number of buses is set by the
// application (two in the example).
module bus_network
  import adsp_pkg::*;
#(
  parameter int NBUS = adsp_pkg::NB,
  parameter int NS   = adsp_pkg::NF + 1,  // senders
  parameter int NRCV = adsp_pkg::NF + 1   // receivers
) (
  input  logic            clk,
  input  logic            rst_n,
  // senders
  input  logic [NS-1:0]   src_req,
  input  token_t          src_tok [NS],
  input  int              src_bus [NS],
  output logic [NS-1:0]   src_ack,
  // buses to receivers
  output logic [NBUS-1:0] bus_req,
  output token_t          bus_tok [NBUS],
  input  logic [NBUS-1:0] rcv_sel [NRCV],
  input  logic [NBUS-1:0] rcv_ack [NRCV],
  // activity, for observation only
  output logic [NBUS-1:0] ev_xfer,
  output logic [NBUS-1:0] ev_contention
);
  logic [NS-1:0] b_ack [NBUS];

  for (genvar b = 0; b < NBUS; b++) begin : g_bus
    logic [NS-1:0]   req_b;
    logic [NRCV-1:0] sel_b, ack_b;

    always_comb begin
      for (int s = 0; s < NS; s++) req_b[s] = src_req[s] && (src_bus[s] == b);
      for (int r = 0; r < NRCV; r++) begin
        sel_b[r] = rcv_sel[r][b];
        ack_b[r] = rcv_ack[r][b];
      end
    end

    token_bus #(.NS(NS), .NR(NRCV)) u_bus (
      .clk, .rst_n,
      .src_req(req_b), .src_tok(src_tok), .src_ack(b_ack[b]),
      .bus_req(bus_req[b]), .bus_tok(bus_tok[b]),
      .rcv_sel(sel_b), .rcv_ack(ack_b),
      .xfer_start(ev_xfer[b]), .contention(ev_contention[b])
    );
  end

  always_comb begin
    src_ack = '0;
    for (int b = 0; b < NBUS; b++) src_ack = src_ack | b_ack[b];
  end

endmodule
