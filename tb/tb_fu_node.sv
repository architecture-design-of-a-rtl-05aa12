// tb_fu_node - self-checking test of one complete "FU & matching" node: the
// example's second multiplier (p2 = ai*bi, p4 = ai*br, zi = g*yi, with p4
// and zi sharing one RF_B register).
// The testbench plays both buses on the receiving side and the node's bus
// on the sending side. Per data set it delivers br, bi, ai, g, waits for the
// two products, then delivers yi and waits for zi. Every result token's tag
// and value are compared with Q1.15 products computed here; since ai makes
// p2 and p4 ready together, p2 (the lower tag) must leave first.
module tb_fu_node;
  import adsp_pkg::*;
  localparam int NBUS = 2;
  logic clk = 0, rst_n = 0;
  logic [NBUS-1:0] bus_req = '0, rcv_sel, rcv_ack;
  token_t bus_tok [NBUS];
  logic src_req, src_ack = 0;
  token_t src_tok;
  logic ev_multi_ready, ev_stall, ev_shared_load, fu_busy;
  int checks = 0, failures = 0;
  token_t outq[$];

  fu_node #(.FU(1), .KIND(FU_MUL)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic data_t q15(input data_t a, input data_t b);
    logic signed [31:0] p;
    p = $signed(a) * $signed(b);
    return data_t'(p >>> 15);
  endfunction

  task automatic send(input int tag, input data_t d);
    int b = CFG_BUS_OF[tag];
    @(negedge clk);
    bus_tok[b] = '{tag: tag_t'(tag), data: d};
    bus_req[b] = 1;
    do @(negedge clk); while (!rcv_ack[b]);
    bus_req[b] = 0;
    do @(negedge clk); while (rcv_ack[b]);
  endtask

  // the node's bus: take result tokens with a random delay
  initial forever begin
    do @(negedge clk); while (!src_req);
    repeat ($urandom_range(0, 5)) @(negedge clk);
    outq.push_back(src_tok);
    src_ack = 1;
    do @(negedge clk); while (src_req);
    src_ack = 0;
  end

  task automatic expect_tok(input int tag, input data_t d);
    int w = 0;
    while (outq.size() == 0 && w < 500) begin @(negedge clk); w++; end
    check(outq.size() > 0, $sformatf("no result token for tag %0d", tag));
    if (outq.size() > 0) begin
      token_t t = outq.pop_front();
      check(int'(t.tag) == tag && t.data == d,
            $sformatf("token tag %0d data %h, expected tag %0d data %h", t.tag, t.data, tag, d));
    end
  endtask

  initial begin
    data_t ai, bi, br, g, yi;
    bus_tok[0] = '0; bus_tok[1] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int set = 0; set < 300; set++) begin
      ai = data_t'($urandom); bi = data_t'($urandom); br = data_t'($urandom);
      g = data_t'($urandom); yi = data_t'($urandom);
      if (set % 5 == 0) bi = '0;
      send(2, br); send(3, bi); send(1, ai); send(4, g);
      expect_tok(6, q15(ai, bi));
      expect_tok(8, q15(ai, br));
      send(10, yi);
      expect_tok(12, q15(g, yi));
    end
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
