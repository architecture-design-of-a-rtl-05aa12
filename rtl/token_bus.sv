// token_bus - one self-timed "indirect-transfer" bus of the multi-bus network.
//
// A transfer is two separate four-phase handshakes, as in the architecture:
//   1. sender -> bus: a granted sender's token is latched into the bus
//      register and the sender is acknowledged (src_ack), which frees it at
//      once; src_ack falls when the sender drops its request.
//   2. bus -> receivers: the bus raises bus_req with the latched token. Each
//      receiver decodes the tag (rcv_sel) and, if selected, answers with
//      rcv_ack once it has stored the token. When every selected receiver
//      has acknowledged, bus_req falls; when all acknowledges have fallen the
//      bus is released (the precharge phase) and the next grant can be made.
// Senders are served one at a time through a fair bus_arbiter; a sender
// whose previous handshake has not finished is not considered.
//
// Timing (one clock per step of the handshake): grant and latch on one edge,
// bus_req high from the next; the bus is free again two edges after the last
// acknowledge falls. rcv_sel must be a function of bus_tok only and rcv_ack
// must be registered in the receiver. The handshake order follows the
// architecture; this clocked rendering of the self-timed bus is this
// design's own.
module token_bus
  import adsp_pkg::*;
#(
  parameter int NS = 3,   // senders on this bus
  parameter int NR = 3    // receivers on this bus
) (
  input  logic            clk,
  input  logic            rst_n,
  // sender side
  input  logic   [NS-1:0] src_req,
  input  token_t          src_tok [NS],
  output logic   [NS-1:0] src_ack,
  // receiver side
  output logic            bus_req,
  output token_t          bus_tok,
  input  logic   [NR-1:0] rcv_sel,
  input  logic   [NR-1:0] rcv_ack,
  // activity, for observation only
  output logic            xfer_start,   // a token was taken from a sender
  output logic            contention    // more than one sender was waiting
);
  localparam int IW = (NS > 1) ? $clog2(NS) : 1;

  typedef enum logic [1:0] {B_IDLE, B_DELIVER, B_RELEASE} bstate_e;
  bstate_e state;

  logic          gnt_valid;
  logic [IW-1:0] gnt_idx;
  logic [NS-1:0] elig;

  assign elig = src_req & ~src_ack;

  bus_arbiter #(.N(NS)) u_arb (
    .clk, .rst_n,
    .req      (elig),
    .enable   (state == B_IDLE),
    .take     (xfer_start),
    .gnt_valid(gnt_valid),
    .gnt_idx  (gnt_idx)
  );

  assign xfer_start = (state == B_IDLE) && gnt_valid;
  assign contention = xfer_start && ((elig & (elig - 1'b1)) != '0);

  wire all_taken = &(~rcv_sel | rcv_ack);
  wire all_low   = ~|rcv_ack;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= B_IDLE;
      bus_req <= 1'b0;
      bus_tok <= '0;
      src_ack <= '0;
    end else begin
      // return-to-zero of the sender handshake
      for (int s = 0; s < NS; s++)
        if (src_ack[s] && !src_req[s]) src_ack[s] <= 1'b0;

      unique case (state)
        B_IDLE: if (gnt_valid) begin
          bus_tok          <= src_tok[gnt_idx];
          src_ack[gnt_idx] <= 1'b1;
          bus_req          <= 1'b1;
          state            <= B_DELIVER;
        end
        B_DELIVER: if (all_taken) begin
          bus_req <= 1'b0;
          state   <= B_RELEASE;
        end
        B_RELEASE: if (all_low) state <= B_IDLE;
        default: state <= B_IDLE;
      endcase
    end
  end

  // Four-phase rules: a sender withdraws its request only after it has been
  // acknowledged, and the bus keeps its request until every selected
  // receiver acknowledged.
  for (genvar s = 0; s < NS; s++) begin : g_src_chk
    src_req_held: assert property (@(posedge clk) disable iff (!rst_n)
      $fell(src_req[s]) |-> src_ack[s] || $past(src_ack[s]));
  end
  bus_req_held: assert property (@(posedge clk) disable iff (!rst_n)
    bus_req && !all_taken |=> bus_req);

endmodule
