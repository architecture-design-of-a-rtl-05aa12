// tb_matching_block - self-checking test of the matching block of the
// example's first multiplier (operations p1 = ar*br, p3 = ar*bi and
// zr = yr*g, with p1 and zr sharing one RF_A register).
// The testbench plays the two buses and the functional unit. Per data set
// it delivers ar, br, bi, g in random order on their buses, then yr, and
// checks every operand pair forwarded to the FU (tag, A, B) against the
// operation definitions. It also checks: a token for another unit is not
// decoded; when ar arrives last, p1 and p3 are ready together and p1 (lower
// tag) goes first; a token for the shared register waits, unacknowledged,
// while the register still holds an operand the FU has not taken.
module tb_matching_block;
  import adsp_pkg::*;
  localparam int NBUS = 2;
  logic clk = 0, rst_n = 0;
  logic [NBUS-1:0] bus_req = '0, rcv_sel, rcv_ack;
  token_t bus_tok [NBUS];
  logic fu_req, fu_ack = 0;
  data_t fu_a, fu_b;
  tag_t fu_tag;
  logic ev_multi_ready, ev_stall, ev_shared_load;
  int checks = 0, failures = 0, n_multi = 0, n_stall = 0, n_shared = 0;
  bit hold_fu = 0;

  typedef struct { tag_t tag; data_t a, b; } fire_t;
  fire_t fired[$];

  matching_block #(.FU(0), .NBUS(NBUS)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // bus driver: one token, four-phase
  task automatic send(input int b, input int tag, input data_t d, input bit expect_sel = 1);
    @(negedge clk);
    bus_tok[b] = '{tag: tag_t'(tag), data: d};
    bus_req[b] = 1;
    #1;
    check(rcv_sel[b] == expect_sel, $sformatf("decoder of tag %0d on bus %0d: sel %b", tag, b, rcv_sel[b]));
    if (expect_sel) begin
      do @(negedge clk); while (!rcv_ack[b]);
    end else @(negedge clk);
    bus_req[b] = 0;
    if (expect_sel) do @(negedge clk); while (rcv_ack[b]);
  endtask

  // functional unit stand-in
  initial begin
    forever begin
      do @(negedge clk); while (!fu_req || hold_fu);
      repeat ($urandom_range(0, 3)) @(negedge clk);
      if (!hold_fu) begin
        fired.push_back('{fu_tag, fu_a, fu_b});
        fu_ack = 1;
        do @(negedge clk); while (fu_req);
        fu_ack = 0;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    n_multi  += int'(ev_multi_ready);
    n_stall  += int'(ev_stall);
    n_shared += int'(ev_shared_load);
  end

  task automatic expect_fire(input int tag, input data_t a, input data_t b);
    int w = 0;
    while (fired.size() == 0 && w < 200) begin @(negedge clk); w++; end
    check(fired.size() > 0, $sformatf("operation %0d never forwarded", tag));
    if (fired.size() > 0) begin
      fire_t f = fired.pop_front();
      check(int'(f.tag) == tag && f.a == a && f.b == b,
            $sformatf("forwarded tag %0d (%h,%h), expected %0d (%h,%h)", f.tag, f.a, f.b, tag, a, b));
    end
  endtask

  initial begin
    data_t ar, br, bi, g, yr;
    int order [4];
    bus_tok[0] = '0; bus_tok[1] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int set = 0; set < 200; set++) begin
      ar = data_t'($urandom); br = data_t'($urandom); bi = data_t'($urandom);
      g = data_t'($urandom); yr = data_t'($urandom);
      // tokens of other units are ignored
      send(1, 6, data_t'($urandom), 0);
      if (set % 2 == 0) begin
        // ar last: p1 and p3 become ready together
        hold_fu = 1;
        send(0, 2, br); send(1, 3, bi); send(0, 4, g); send(0, 0, ar);
        repeat (3) @(negedge clk);
        hold_fu = 0;
        expect_fire(5, ar, br);
        expect_fire(7, ar, bi);
      end else begin
        // random order of ar, br, bi, g
        order = '{0, 2, 3, 4};
        order.shuffle();
        for (int k = 0; k < 4; k++)
          send(CFG_BUS_OF[order[k]], order[k],
               order[k] == 0 ? ar : order[k] == 2 ? br : order[k] == 3 ? bi : g);
        // p1 and p3 go in the order their operands completed
        while (fired.size() < 2) @(negedge clk);
        if (fired[0].tag == 7) fired.reverse();
        expect_fire(5, ar, br);
        expect_fire(7, ar, bi);
      end
      send(0, 9, yr);
      expect_fire(11, yr, g);
    end
    // shared register busy: p1 forwarded but not yet taken by the FU
    hold_fu = 1;
    send(0, 0, 16'h1111); send(0, 2, 16'h2222);
    fork
      send(0, 9, 16'h3333);
      begin
        repeat (10) @(negedge clk);
        check(!rcv_ack[0] && bus_req[0], "token for a busy shared register was acknowledged");
        hold_fu = 0;
      end
    join
    expect_fire(5, 16'h1111, 16'h2222);
    send(1, 3, 16'h4444); send(0, 4, 16'h5555);
    expect_fire(7, 16'h1111, 16'h4444);
    expect_fire(11, 16'h3333, 16'h5555);
    check(n_multi > 0, "never several operations ready");
    check(n_stall > 0, "never stalled a token");
    check(n_shared > 0, "shared register never loaded");
    $display("multi-ready %0d, stall cycles %0d, shared loads %0d", n_multi, n_stall, n_shared);
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
