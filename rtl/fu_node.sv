// fu_node - one "FU & matching" node: matching block, functional unit and
// output register, as drawn in each dotted box of the multi-bus diagram.
//
// The matching block collects operands from any bus through its decoders,
// forwards matched pairs to the FU, the FU computes with a data-dependent
// delay, and the output register hands the result token to the single bus
// the node drives (bus index OUT_BUS, fixed per node). All links are
// four-phase handshakes (see the sub-blocks for their timing).
// The structure follows the architecture; parameters select this node's
// place in the example application.
module fu_node
  import adsp_pkg::*;
#(
  parameter int       FU     = 0,
  parameter fu_kind_e KIND   = FU_MUL,
  parameter int       NBUS   = adsp_pkg::NB,
  parameter int       NR     = adsp_pkg::NREG,
  parameter tab_t     OP_FU  = adsp_pkg::CFG_OP_FU,
  parameter tab_t     SRC_A  = adsp_pkg::CFG_SRC_A,
  parameter tab_t     SRC_B  = adsp_pkg::CFG_SRC_B,
  parameter tab_t     REG_A  = adsp_pkg::CFG_REG_A,
  parameter tab_t     REG_B  = adsp_pkg::CFG_REG_B,
  parameter tab_t     BUS_OF = adsp_pkg::CFG_BUS_OF
) (
  input  logic            clk,
  input  logic            rst_n,
  // receiver side of the buses
  input  logic [NBUS-1:0] bus_req,
  input  token_t          bus_tok [NBUS],
  output logic [NBUS-1:0] rcv_sel,
  output logic [NBUS-1:0] rcv_ack,
  // sender side towards the node's bus
  output logic            src_req,
  output token_t          src_tok,
  input  logic            src_ack,
  // activity, for observation only
  output logic            ev_multi_ready,
  output logic            ev_stall,
  output logic            ev_shared_load,
  output logic            fu_busy
);
  logic   m_req, m_ack;
  data_t  m_a, m_b;
  tag_t   m_tag;
  logic   r_req, r_ack;
  token_t r_tok;

  matching_block #(
    .FU(FU), .NBUS(NBUS), .NR(NR), .OP_FU(OP_FU), .SRC_A(SRC_A), .SRC_B(SRC_B),
    .REG_A(REG_A), .REG_B(REG_B), .BUS_OF(BUS_OF)
  ) u_match (
    .clk, .rst_n, .bus_req, .bus_tok, .rcv_sel, .rcv_ack,
    .fu_req(m_req), .fu_a(m_a), .fu_b(m_b), .fu_tag(m_tag), .fu_ack(m_ack),
    .ev_multi_ready, .ev_stall, .ev_shared_load
  );

  functional_unit #(.KIND(KIND)) u_fu (
    .clk, .rst_n,
    .in_req(m_req), .in_a(m_a), .in_b(m_b), .in_tag(m_tag), .in_ack(m_ack),
    .out_req(r_req), .out_tok(r_tok), .out_ack(r_ack), .busy(fu_busy)
  );

  output_reg u_reg (
    .clk, .rst_n,
    .in_req(r_req), .in_tok(r_tok), .in_ack(r_ack),
    .out_req(src_req), .out_tok(src_tok), .out_ack(src_ack)
  );

endmodule
