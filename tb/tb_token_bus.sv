// tb_token_bus - self-checking test of one indirect-transfer bus with three
// senders and three receivers.
// Senders issue tokens whose data carries (sender, sequence number) and
// whose tag is random; receiver r decodes a tag as its own when tag bit r
// is set (so a token can go to none, one or several receivers) and
// acknowledges after a random delay. Checks: every receiver gets exactly the
// tokens addressed to it, each sender's tokens in order; bus_req never
// falls before all selected receivers acknowledged; a sender is released
// before delivery completes (the indirect transfer); while several senders
// wait, none is passed over more than twice (fairness); contention occurs.
module tb_token_bus;
  import adsp_pkg::*;
  localparam int NS = 3, NR = 3, PER = 300;
  logic clk = 0, rst_n = 0;
  logic [NS-1:0] src_req = '0, src_ack;
  token_t src_tok [NS];
  logic bus_req;
  token_t bus_tok;
  logic [NR-1:0] rcv_sel, rcv_ack = '0;
  logic xfer_start, contention;
  int checks = 0, failures = 0, cycle = 0;
  int n_cont = 0, n_early = 0, senders_done = 0;
  int exp_next [NR][NS];
  int waited [NS];

  token_bus #(.NS(NS), .NR(NR)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  always_comb for (int r = 0; r < NR; r++) rcv_sel[r] = bus_tok.tag[r];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // senders: tag chosen so every receiver sees a predictable subsequence
  function automatic tag_t tag_of(input int s, input int i);
    return tag_t'((s * 7 + i * 5) % 8);
  endfunction

  for (genvar s = 0; s < NS; s++) begin : g_snd
    initial begin
      src_tok[s] = '0;
      wait (rst_n);
      for (int i = 0; i < PER; i++) begin
        @(negedge clk);
        src_tok[s] = '{tag: tag_of(s, i), data: data_t'((s << 12) | i)};
        src_req[s] = 1;
        do @(negedge clk); while (!src_ack[s]);
        src_req[s] = 0;
        do @(negedge clk); while (src_ack[s]);
        if (s != 0) repeat ($urandom_range(0, 3)) @(negedge clk);
      end
      senders_done++;
    end
  end

  // receivers
  for (genvar r = 0; r < NR; r++) begin : g_rcv
    initial begin
      int s, i;
      for (int k = 0; k < NS; k++) exp_next[r][k] = 0;
      wait (rst_n);
      forever begin
        do @(negedge clk); while (!(bus_req && rcv_sel[r]));
        repeat ($urandom_range(0, 4)) @(negedge clk);
        s = int'(bus_tok.data) >> 12;
        i = int'(bus_tok.data) & 12'hfff;
        // skip the sender's tokens not addressed to this receiver
        while (exp_next[r][s] < PER && !tag_of(s, exp_next[r][s])[r]) exp_next[r][s]++;
        check(i == exp_next[r][s], $sformatf("receiver %0d: got %0d/%0d expected %0d", r, s, i, exp_next[r][s]));
        exp_next[r][s] = i + 1;
        rcv_ack[r] = 1;
        do @(negedge clk); while (bus_req);
        repeat ($urandom_range(0, 2)) @(negedge clk);
        rcv_ack[r] = 0;
      end
    end
  end

  // protocol and fairness monitors
  // sampled on the rising edge, where the bus itself decides
  logic bus_req_q = 0, taken_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (bus_req_q && !bus_req) check(taken_q, "bus_req fell before all acknowledged");
    bus_req_q <= bus_req;
    taken_q   <= (rcv_ack | ~rcv_sel) == '1;
  end
  always @(negedge clk) if (rst_n) begin
    if (bus_req && |src_ack && ((rcv_ack | ~rcv_sel) != '1)) n_early++;
    if (contention) n_cont++;
    if (xfer_start) begin
      for (int s = 0; s < NS; s++) begin
        if (src_req[s] && !src_ack[s] && dut.gnt_idx != s) waited[s]++;
        else waited[s] = 0;
        check(waited[s] <= NS - 1, $sformatf("sender %0d passed over %0d times", s, waited[s]));
      end
    end
  end

  initial begin
    for (int s = 0; s < NS; s++) waited[s] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (senders_done == NS);
    repeat (50) @(negedge clk);
    for (int r = 0; r < NR; r++)
      for (int s = 0; s < NS; s++) begin
        while (exp_next[r][s] < PER && !tag_of(s, exp_next[r][s])[r]) exp_next[r][s]++;
        check(exp_next[r][s] == PER, $sformatf("receiver %0d missed tokens of sender %0d", r, s));
      end
    check(n_cont > 0, "no contention");
    check(n_early > 0, "sender never released before delivery completed");
    $display("contention %0d, early release %0d", n_cont, n_early);
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
