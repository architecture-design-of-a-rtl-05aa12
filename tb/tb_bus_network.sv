// tb_bus_network - self-checking test of the two-bus interconnection network
// with three senders and two receivers.
// Each sender names a random bus for every token and records it in the
// token's data; receiver r takes, on every bus, the tokens whose tag bit r
// is set and acknowledges after a random delay. Checks: each token appears
// on the bus it asked for, every receiver gets each addressed token exactly
// once, the sender is acknowledged by that bus, and both buses carry
// transfers at the same time.
module tb_bus_network;
  import adsp_pkg::*;
  localparam int NBUS = 2, NS = 3, NRCV = 2, PER = 300;
  logic clk = 0, rst_n = 0;
  logic [NS-1:0] src_req = '0, src_ack;
  token_t src_tok [NS];
  int src_bus [NS];
  logic [NBUS-1:0] bus_req;
  token_t bus_tok [NBUS];
  logic [NBUS-1:0] rcv_sel [NRCV];
  logic [NBUS-1:0] rcv_ack [NRCV];
  logic [NBUS-1:0] ev_xfer, ev_contention;
  int checks = 0, failures = 0, senders_done = 0, n_both = 0;
  int got [NRCV], expect_n [NRCV];

  bus_network #(.NBUS(NBUS), .NS(NS), .NRCV(NRCV)) dut (.*);
  always #5 clk = ~clk;

  always_comb
    for (int r = 0; r < NRCV; r++)
      for (int b = 0; b < NBUS; b++) rcv_sel[r][b] = bus_tok[b].tag[r];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  for (genvar s = 0; s < NS; s++) begin : g_snd
    initial begin
      int b;
      tag_t t;
      src_tok[s] = '0; src_bus[s] = 0;
      wait (rst_n);
      for (int i = 0; i < PER; i++) begin
        @(negedge clk);
        b = $urandom_range(0, NBUS - 1);
        t = tag_t'($urandom_range(1, 3));
        for (int r = 0; r < NRCV; r++) if (t[r]) expect_n[r]++;
        src_tok[s] = '{tag: t, data: data_t'((b << 15) | (s << 12) | i)};
        src_bus[s] = b;
        src_req[s] = 1;
        do @(negedge clk); while (!src_ack[s]);
        src_req[s] = 0;
        do @(negedge clk); while (src_ack[s]);
      end
      senders_done++;
    end
  end

  for (genvar r = 0; r < NRCV; r++) begin : g_rcv
    for (genvar b = 0; b < NBUS; b++) begin : g_bus
      initial begin
        rcv_ack[r][b] = 0;
        wait (rst_n);
        forever begin
          do @(negedge clk); while (!(bus_req[b] && rcv_sel[r][b]));
          repeat ($urandom_range(0, 4)) @(negedge clk);
          check(int'(bus_tok[b].data >> 15) == b, $sformatf("token on bus %0d asked for bus %0d", b, bus_tok[b].data >> 15));
          got[r]++;
          rcv_ack[r][b] = 1;
          do @(negedge clk); while (bus_req[b]);
          rcv_ack[r][b] = 0;
        end
      end
    end
  end

  always @(negedge clk) if (&bus_req) n_both++;

  initial begin
    for (int r = 0; r < NRCV; r++) begin got[r] = 0; expect_n[r] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (senders_done == NS);
    repeat (50) @(negedge clk);
    for (int r = 0; r < NRCV; r++)
      check(got[r] == expect_n[r], $sformatf("receiver %0d got %0d of %0d", r, got[r], expect_n[r]));
    check(n_both > 0, "buses never busy together");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
