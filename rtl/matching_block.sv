// matching_block - local operand matching for one functional unit.
//
// Each FU input port has a register file, RF_A for port A and RF_B for port
// B, with one register per logical operation mapped to the FU, so that every
// token on a bus can be taken at once. Two registers of a file may be one
// shared register when the configuration maps two operations onto the same
// register index (allowed when one datum cannot exist before the other has
// been consumed). Every register has a decoder on the bus that carries its
// operand: it loads the token whose tag equals the operand's producer and
// records which logical operation the datum belongs to, which is what makes
// a shared register usable.
//
// An operation is ready when its A and B registers are both full and both
// hold data for that operation. Among ready operations the one with the
// lowest tag is forwarded first (the priority scheme); its tag becomes the
// tag of the result token, since results are named by their producing
// operation.
//
// Interfaces:
//   bus side (per bus b, four-phase, receiver role of token_bus):
//     bus_req[b]/bus_tok[b] in, rcv_sel[b] (a decoder here matches the tag,
//     combinational in bus_tok) and rcv_ack[b] (registered) out. A token is
//     acknowledged on the edge after all registers it targets are free; if
//     one is still full the acknowledge waits.
//   FU side (four-phase, sender role): fu_req with fu_a, fu_b, fu_tag stable;
//     on fu_ack the operand registers are emptied and fu_req falls; the next
//     operation is offered after fu_ack has fallen.
// The register files, decoders, shared registers, matching and tag
// generation follow the architecture; lowest-tag-first priority and the
// clocked handshakes are this design's choices.
module matching_block
  import adsp_pkg::*;
#(
  parameter int   FU     = 0,
  parameter int   NBUS   = adsp_pkg::NB,
  parameter int   NR     = adsp_pkg::NREG,
  parameter tab_t OP_FU  = adsp_pkg::CFG_OP_FU,
  parameter tab_t SRC_A  = adsp_pkg::CFG_SRC_A,
  parameter tab_t SRC_B  = adsp_pkg::CFG_SRC_B,
  parameter tab_t REG_A  = adsp_pkg::CFG_REG_A,
  parameter tab_t REG_B  = adsp_pkg::CFG_REG_B,
  parameter tab_t BUS_OF = adsp_pkg::CFG_BUS_OF
) (
  input  logic            clk,
  input  logic            rst_n,
  // buses
  input  logic [NBUS-1:0] bus_req,
  input  token_t          bus_tok [NBUS],
  output logic [NBUS-1:0] rcv_sel,
  output logic [NBUS-1:0] rcv_ack,
  // to the functional unit
  output logic            fu_req,
  output data_t           fu_a,
  output data_t           fu_b,
  output tag_t            fu_tag,
  input  logic            fu_ack,
  // activity, for observation only
  output logic            ev_multi_ready, // several operations were ready
  output logic            ev_stall,       // a bus token waited for a register
  output logic            ev_shared_load  // a shared register was loaded
);

  typedef struct packed {
    logic  full;
    tag_t  op;     // logical operation the datum belongs to
    data_t data;
  } rf_entry_t;

  rf_entry_t rf_a [NR];
  rf_entry_t rf_b [NR];

  // register index used by more than one operation of this FU
  function automatic logic is_shared(input tab_t regmap, input int r);
    int n = 0;
    for (int t = 0; t < NT; t++)
      if (OP_FU[t] == FU && regmap[t] == r) n++;
    return n > 1;
  endfunction

  // ---- decoders ------------------------------------------------------------
  logic [NR-1:0] tgt_a [NBUS];
  logic [NR-1:0] tgt_b [NBUS];
  tag_t          op_a  [NBUS][NR];
  tag_t          op_b  [NBUS][NR];

  always_comb begin
    for (int b = 0; b < NBUS; b++) begin
      tgt_a[b] = '0;
      tgt_b[b] = '0;
      for (int r = 0; r < NR; r++) begin
        op_a[b][r] = '0;
        op_b[b][r] = '0;
      end
      for (int t = 0; t < NT; t++) begin
        if (OP_FU[t] == FU) begin
          if (SRC_A[t] >= 0 && BUS_OF[SRC_A[t]] == b &&
              int'(bus_tok[b].tag) == SRC_A[t]) begin
            tgt_a[b][REG_A[t]] = 1'b1;
            op_a[b][REG_A[t]]  = tag_t'(t);
          end
          if (SRC_B[t] >= 0 && BUS_OF[SRC_B[t]] == b &&
              int'(bus_tok[b].tag) == SRC_B[t]) begin
            tgt_b[b][REG_B[t]] = 1'b1;
            op_b[b][REG_B[t]]  = tag_t'(t);
          end
        end
      end
      rcv_sel[b] = |{tgt_a[b], tgt_b[b]};
    end
  end

  // ---- load arbitration between buses (lower bus first) ---------------------
  logic [NR-1:0]   full_a, full_b;
  logic [NBUS-1:0] do_load;

  always_comb begin
    logic [NR-1:0] busy_a, busy_b;
    for (int r = 0; r < NR; r++) begin
      full_a[r] = rf_a[r].full;
      full_b[r] = rf_b[r].full;
    end
    busy_a   = full_a;
    busy_b   = full_b;
    do_load  = '0;
    ev_stall = 1'b0;
    for (int b = 0; b < NBUS; b++) begin
      if (bus_req[b] && !rcv_ack[b] && rcv_sel[b]) begin
        if (((tgt_a[b] & busy_a) == '0) && ((tgt_b[b] & busy_b) == '0)) begin
          do_load[b] = 1'b1;
          busy_a     = busy_a | tgt_a[b];
          busy_b     = busy_b | tgt_b[b];
        end else begin
          ev_stall = 1'b1;
        end
      end
    end
  end

  // ---- matching & priority ------------------------------------------------
  logic            any_ready;
  int unsigned     n_ready;
  tag_t            pick;

  always_comb begin
    any_ready = 1'b0;
    n_ready   = 0;
    pick      = '0;
    for (int t = NT - 1; t >= 0; t--) begin
      if (OP_FU[t] == FU &&
          rf_a[REG_A[t]].full && int'(rf_a[REG_A[t]].op) == t &&
          rf_b[REG_B[t]].full && int'(rf_b[REG_B[t]].op) == t) begin
        any_ready = 1'b1;
        n_ready   = n_ready + 1;
        pick      = tag_t'(t);   // loop runs downwards: lowest tag wins
      end
    end
  end

  wire fire = any_ready && !fu_req && !fu_ack;

  assign ev_multi_ready = fire && (n_ready > 1);

  always_comb begin
    ev_shared_load = 1'b0;
    for (int b = 0; b < NBUS; b++)
      for (int r = 0; r < NR; r++)
        if (do_load[b] && ((tgt_a[b][r] && is_shared(REG_A, r)) ||
                           (tgt_b[b][r] && is_shared(REG_B, r))))
          ev_shared_load = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < NR; r++) begin
        rf_a[r] <= '0;
        rf_b[r] <= '0;
      end
      rcv_ack <= '0;
      fu_req  <= 1'b0;
      fu_a    <= '0;
      fu_b    <= '0;
      fu_tag  <= '0;
    end else begin
      // receive tokens
      for (int b = 0; b < NBUS; b++) begin
        if (!bus_req[b]) rcv_ack[b] <= 1'b0;
        if (do_load[b]) begin
          rcv_ack[b] <= 1'b1;
          for (int r = 0; r < NR; r++) begin
            if (tgt_a[b][r]) rf_a[r] <= '{full: 1'b1, op: op_a[b][r], data: bus_tok[b].data};
            if (tgt_b[b][r]) rf_b[r] <= '{full: 1'b1, op: op_b[b][r], data: bus_tok[b].data};
          end
        end
      end
      // forward a matched pair
      if (fire) begin
        fu_req <= 1'b1;
        fu_a   <= rf_a[REG_A[pick]].data;
        fu_b   <= rf_b[REG_B[pick]].data;
        fu_tag <= pick;
      end
      if (fu_req && fu_ack) begin
        fu_req <= 1'b0;
        rf_a[REG_A[fu_tag]].full <= 1'b0;
        rf_b[REG_B[fu_tag]].full <= 1'b0;
      end
    end
  end

  fu_req_held: assert property (@(posedge clk) disable iff (!rst_n)
    fu_req && !fu_ack |=> fu_req && $stable(fu_tag));

endmodule
