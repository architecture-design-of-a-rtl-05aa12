// tb_functional_unit - self-checking test of the three functional-unit kinds.
// An adder, a subtractor and a multiplier get random operands (with 0,
// -1.0 and full-scale corner values) over the four-phase input handshake;
// their result tokens are drained with random acknowledge delays. Each
// result and its tag are compared with a reference computed here, and the
// data-dependent delay is checked: one clock for add/subtract and
// bitlen(|b|) + 1 clocks for a product, counted from the input acknowledge
// to the result request.
module tb_functional_unit;
  import adsp_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic   in_req [3];
  data_t  in_a [3], in_b [3];
  tag_t   in_tag [3];
  logic   in_ack [3], out_req [3], out_ack [3], busy [3];
  token_t out_tok [3];

  functional_unit #(.KIND(FU_ADD)) u_add (.clk, .rst_n, .in_req(in_req[0]), .in_a(in_a[0]), .in_b(in_b[0]),
    .in_tag(in_tag[0]), .in_ack(in_ack[0]), .out_req(out_req[0]), .out_tok(out_tok[0]), .out_ack(out_ack[0]), .busy(busy[0]));
  functional_unit #(.KIND(FU_SUB)) u_sub (.clk, .rst_n, .in_req(in_req[1]), .in_a(in_a[1]), .in_b(in_b[1]),
    .in_tag(in_tag[1]), .in_ack(in_ack[1]), .out_req(out_req[1]), .out_tok(out_tok[1]), .out_ack(out_ack[1]), .busy(busy[1]));
  functional_unit #(.KIND(FU_MUL)) u_mul (.clk, .rst_n, .in_req(in_req[2]), .in_a(in_a[2]), .in_b(in_b[2]),
    .in_tag(in_tag[2]), .in_ack(in_ack[2]), .out_req(out_req[2]), .out_tok(out_tok[2]), .out_ack(out_ack[2]), .busy(busy[2]));

  function automatic data_t operand();
    int sel;
    sel = $urandom_range(0, 6);
    unique case (sel)
      0: return 16'h0000;
      1: return 16'h8000;
      2: return 16'h7fff;
      3: return data_t'($urandom_range(0, 9));
      default: return data_t'($urandom);
    endcase
  endfunction

  function automatic int bitlen(input int v);
    int n = 0;
    while (v != 0) begin n++; v = v >> 1; end
    return n;
  endfunction

  function automatic data_t reference(input int k, input data_t a, input data_t b);
    logic signed [31:0] p;
    p = $signed(a) * $signed(b);
    unique case (k)
      0: return data_t'(a + b);
      1: return data_t'(a - b);
      default: return data_t'(p >>> 15);
    endcase
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int done_units = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;
  for (genvar k = 0; k < 3; k++) begin : g_drv
    initial begin
      data_t a, b, e;
      tag_t  t;
      int    lat, exp_lat, mag;
      in_req[k] = 0; in_a[k] = 0; in_b[k] = 0; in_tag[k] = 0; out_ack[k] = 0;
      wait (rst_n);
      for (int i = 0; i < 400; i++) begin
        a = operand(); b = operand(); t = tag_t'($urandom);
        @(negedge clk);
        in_a[k] = a; in_b[k] = b; in_tag[k] = t; in_req[k] = 1;
        do @(negedge clk); while (!in_ack[k]);
        lat = cycle;
        in_req[k] = 0;
        while (!out_req[k]) @(negedge clk);
        lat = cycle - lat;
        mag = b[15] ? -int'($signed(b)) : int'(b);
        exp_lat = (k == 2) ? bitlen(mag) + 1 : 1;
        e = reference(k, a, b);
        check(out_tok[k].data == e, $sformatf("unit %0d: %h op %h = %h, expected %h", k, a, b, out_tok[k].data, e));
        check(out_tok[k].tag == t, "tag");
        check(lat == exp_lat, $sformatf("unit %0d latency %0d expected %0d (b=%h)", k, lat, exp_lat, b));
        repeat ($urandom_range(0, 3)) @(posedge clk);
        @(negedge clk); out_ack[k] = 1;
        do @(negedge clk); while (out_req[k]);
        out_ack[k] = 0;
      end
      done_units++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (done_units == 3);
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
