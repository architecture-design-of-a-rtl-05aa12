// tb_bus_arbiter - self-checking test of the fair bus arbiter (N = 4).
// Random request patterns are applied; each offered grant is compared with
// a round-robin reference (first requester after the one served last), and
// the test checks that a grant is offered exactly when enabled and some
// request is present. With all four requesting continuously the grants must
// rotate 0, 1, 2, 3, 0, ...
module tb_bus_arbiter;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req = '0;
  logic enable = 0, take;
  logic gnt_valid;
  logic [$clog2(N)-1:0] gnt_idx;
  int checks = 0, failures = 0;
  int last_ref = N - 1;

  bus_arbiter #(.N(N)) dut (.*);
  assign take = gnt_valid && enable;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int exp_idx;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      req    = (i >= 2000 && i < 2100) ? '1 : N'($urandom);
      enable = (i >= 2000 && i < 2100) ? 1'b1 : ($urandom_range(0, 3) != 0);
      #1;
      exp_idx = -1;
      for (int k = 1; k <= N; k++)
        if (exp_idx < 0 && req[(last_ref + k) % N]) exp_idx = (last_ref + k) % N;
      check(gnt_valid == (enable && exp_idx >= 0), "grant offered");
      if (gnt_valid) begin
        check(int'(gnt_idx) == exp_idx,
              $sformatf("grant %0d expected %0d (req %b last %0d)", gnt_idx, exp_idx, req, last_ref));
        check(req[gnt_idx], "granted a non-requester");
      end
      if (take) last_ref = int'(gnt_idx);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // rotation with all requesting
  int prev_rot = -1;
  always @(posedge clk) if (rst_n && take && req == '1 && enable) begin
    if (prev_rot >= 0) begin
      checks++;
      if (int'(gnt_idx) != (prev_rot + 1) % N) begin
        failures++;
        $display("FAIL: rotation %0d after %0d", gnt_idx, prev_rot);
      end
    end
    prev_rot = int'(gnt_idx);
  end else if (rst_n) prev_rot = -1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
