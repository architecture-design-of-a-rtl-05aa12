// tb_fifo_buffer - self-checking test of the FIFO buffer at its default
// depth. Random pushes and pops (with bursts that fill and drain it) are
// checked against a queue model: popped words and their order, the count,
// and the full/empty flags.
module tb_fifo_buffer;
  localparam int W = 16, DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic wr_valid = 0, wr_ready, rd_valid, rd_ready = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [$clog2(DEPTH):0] count;
  int checks = 0, failures = 0, n_full = 0, n_empty_pop = 0;
  logic [W-1:0] model[$];

  fifo_buffer dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 4000; i++) begin
      int phase;
      phase = (i / 200) % 3;       // 0: mostly push, 1: mostly pop, 2: mixed
      @(negedge clk);
      check(count == model.size(), $sformatf("count %0d model %0d", count, model.size()));
      check(wr_ready == (model.size() < DEPTH), "wr_ready");
      check(rd_valid == (model.size() > 0), "rd_valid");
      if (model.size() > 0) check(rd_data == model[0], $sformatf("head %h vs %h", rd_data, model[0]));
      if (!wr_ready) n_full++;
      wr_valid = ($urandom_range(0, 9) < (phase == 0 ? 8 : phase == 1 ? 2 : 5));
      rd_ready = ($urandom_range(0, 9) < (phase == 1 ? 8 : phase == 0 ? 2 : 5));
      wr_data  = W'($urandom);
      #1;
      if (rd_ready && !rd_valid) n_empty_pop++;
      if (rd_valid && rd_ready) void'(model.pop_front());
      if (wr_valid && wr_ready) model.push_back(wr_data);
      @(posedge clk);
    end
    check(n_full > 0, "never full");
    check(n_empty_pop > 0, "never popped while empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
