// tb_output_reg - self-checking test of the FU output register.
// A producer sends random tokens through the four-phase input handshake and
// a consumer (standing in for the bus) takes them with random delays. The
// test checks that every token comes out unchanged and in order, that the
// producer is acknowledged on the edge after its request (it is released
// while the token still waits for the bus), and that the register never
// takes a second token while holding one.
module tb_output_reg;
  import adsp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_req = 0, in_ack, out_req, out_ack = 0;
  token_t in_tok = '0, out_tok;
  int checks = 0, failures = 0, early_release = 0;
  int cycle = 0;
  token_t sent[$];
  bit prod_done = 0;

  output_reg dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : producer
    int t0;
    wait (rst_n);
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      in_tok = token_t'($urandom);
      in_req = 1;
      t0 = cycle;
      do @(negedge clk); while (!in_ack);
      sent.push_back(in_tok);
      check(cycle - t0 <= 1 || out_req, "producer released late while register empty");
      if (out_req && !out_ack) early_release++;
      in_req = 0;
      do @(negedge clk); while (in_ack);
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    prod_done = 1;
  end

  initial begin : consumer
    int n = 0;
    wait (rst_n);
    while (n < 500) begin
      do @(negedge clk); while (!out_req);
      repeat ($urandom_range(0, 6)) @(negedge clk);
      check(sent.size() > 0 && out_tok == sent[0], $sformatf("token %0d: %h", n, out_tok));
      if (sent.size() > 0) void'(sent.pop_front());
      out_ack = 1;
      do @(negedge clk); while (out_req);
      out_ack = 0;
      n++;
    end
    check(early_release > 0, "producer never released before the bus took the token");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
