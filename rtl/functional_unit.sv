// functional_unit - self-timed arithmetic unit executing one logical
// operation at a time on a matched operand pair.
//
// KIND selects the function: FU_ADD (a + b), FU_SUB (a - b) or FU_MUL (a * b
// in signed Q1.15 fixed point: the 2*W_D-bit product shifted right by
// W_D-1 with truncation toward minus infinity). Sums and differences wrap in
// two's complement; -1.0 * -1.0 wraps to -1.0.
//
// Like a self-timed unit its computation delay depends on the data: add and
// subtract take one clock, while the multiplier is a shift-and-add unit that
// stops as soon as the remaining multiplier bits are zero, so a product takes
// bitlen(|b|) + 1 clocks (1 clock when b = 0, 17 when |b| = 2^15).
//
// Interfaces (both four-phase):
//   in_req/in_a/in_b/in_tag -> in_ack: the operands are latched and
//     acknowledged on the same edge; in_ack falls after in_req falls.
//   out_req/out_tok -> out_ack: the result token (tag = in_tag, the
//     producing operation) is offered until acknowledged; the unit takes new
//     operands only after out_ack has fallen again.
// Self-timed FUs with data-dependent delay follow the architecture; the
// functions, number format and shift-and-add multiplier are this design's
// choices.
module functional_unit
  import adsp_pkg::*;
#(
  parameter fu_kind_e KIND = FU_MUL
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_req,
  input  data_t  in_a,
  input  data_t  in_b,
  input  tag_t   in_tag,
  output logic   in_ack,
  output logic   out_req,
  output token_t out_tok,
  input  logic   out_ack,
  output logic   busy
);
  typedef enum logic [1:0] {F_IDLE, F_COMP, F_SEND, F_WAIT} fstate_e;
  fstate_e state;

  logic [2*W_D-1:0] acc, mcand;
  logic [W_D:0]     mplier;
  logic             neg;
  data_t            opa, opb;
  tag_t             tag;

  function automatic logic [W_D:0] magnitude(input data_t v);
    return v[W_D-1] ? (W_D+1)'(-$signed({v[W_D-1], v})) : {1'b0, v};
  endfunction

  wire [2*W_D-1:0] signed_prod = neg ? -acc : acc;

  assign busy = (state != F_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= F_IDLE;
      in_ack  <= 1'b0;
      out_req <= 1'b0;
      out_tok <= '0;
      acc     <= '0;
      mcand   <= '0;
      mplier  <= '0;
      neg     <= 1'b0;
      opa     <= '0;
      opb     <= '0;
      tag     <= '0;
    end else begin
      if (in_ack && !in_req) in_ack <= 1'b0;
      unique case (state)
        F_IDLE: if (in_req && !in_ack) begin
          in_ack <= 1'b1;
          opa    <= in_a;
          opb    <= in_b;
          tag    <= in_tag;
          acc    <= '0;
          mcand  <= (2*W_D)'(magnitude(in_a));
          mplier <= magnitude(in_b);
          neg    <= in_a[W_D-1] ^ in_b[W_D-1];
          state  <= F_COMP;
        end
        F_COMP: begin
          if (KIND == FU_MUL) begin
            if (mplier == '0) begin
              out_tok <= '{tag: tag, data: signed_prod[2*W_D-2 -: W_D]};
              out_req <= 1'b1;
              state   <= F_SEND;
            end else begin
              if (mplier[0]) acc <= acc + mcand;
              mcand  <= mcand << 1;
              mplier <= mplier >> 1;
            end
          end else begin
            out_tok <= '{tag: tag,
                         data: (KIND == FU_ADD) ? data_t'(opa + opb) : data_t'(opa - opb)};
            out_req <= 1'b1;
            state   <= F_SEND;
          end
        end
        F_SEND: if (out_ack) begin
          out_req <= 1'b0;
          state   <= F_WAIT;
        end
        F_WAIT: if (!out_ack) state <= F_IDLE;
        default: state <= F_IDLE;
      endcase
    end
  end

  out_req_held: assert property (@(posedge clk) disable iff (!rst_n)
    out_req && !out_ack |=> out_req && $stable(out_tok));

endmodule
