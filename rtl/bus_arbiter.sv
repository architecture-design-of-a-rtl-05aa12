// bus_arbiter - fair arbiter for one bus: at most one requester is granted at
// a time, so at most one token is loaded onto the bus.
//
// Round-robin: the search for the next grant starts just after the requester
// served last, so a requester waits for at most N-1 others. The arbiter
// offers a grant (gnt_valid, gnt_idx, combinational in req and the pointer)
// while `enable` is high; the bus takes the grant by pulsing `take`, which
// moves the pointer past the served requester. Fairness and the
// one-at-a-time rule follow the architecture; the round-robin scheme stands
// in for its interlock-circuit arbiter and is this design's choice.
module bus_arbiter #(
  parameter int N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 enable,
  input  logic                 take,
  output logic                 gnt_valid,
  output logic [$clog2(N)-1:0] gnt_idx
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last;   // index served last

  always_comb begin
    gnt_valid = 1'b0;
    gnt_idx   = '0;
    if (enable) begin
      for (int k = 1; k <= N; k++) begin
        if (!gnt_valid && req[(int'(last) + k) % N]) begin
          gnt_valid = 1'b1;
          gnt_idx   = IW'((int'(last) + k) % N);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)    last <= IW'(N - 1);
    else if (take) last <= gnt_idx;
  end

  take_needs_grant: assert property (@(posedge clk) disable iff (!rst_n)
    take |-> gnt_valid);

endmodule
