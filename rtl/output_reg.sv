// output_reg - the register between a functional unit and its bus.
//
// It takes the FU's result token in one four-phase handshake
// (in_req/in_tok -> in_ack) and offers it to the bus in a second one
// (out_req/out_tok -> out_ack), so the FU is free to start its next
// operation while the token waits for the bus arbiter. It holds one token:
// a new one is accepted only after the previous one has left and out_ack has
// fallen. Both handshakes take one clock per step. The register's place
// follows the architecture's block diagram; its one-token depth is this
// design's choice.
module output_reg
  import adsp_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_req,
  input  token_t in_tok,
  output logic   in_ack,
  output logic   out_req,
  output token_t out_tok,
  input  logic   out_ack
);
  typedef enum logic [1:0] {R_EMPTY, R_FULL, R_WAIT} rstate_e;
  rstate_e state;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= R_EMPTY;
      in_ack  <= 1'b0;
      out_req <= 1'b0;
      out_tok <= '0;
    end else begin
      if (in_ack && !in_req) in_ack <= 1'b0;
      unique case (state)
        R_EMPTY: if (in_req && !in_ack) begin
          out_tok <= in_tok;
          in_ack  <= 1'b1;
          out_req <= 1'b1;
          state   <= R_FULL;
        end
        R_FULL: if (out_ack) begin
          out_req <= 1'b0;
          state   <= R_WAIT;
        end
        R_WAIT: if (!out_ack) state <= R_EMPTY;
        default: state <= R_EMPTY;
      endcase
    end
  end

endmodule
