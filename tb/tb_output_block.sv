// tb_output_block - self-checking test of the output block at its default
// configuration (outputs zr, tag 11 on bus 0, and zi, tag 12 on bus 1).
// Per data set the two result tokens are delivered in random order, often
// on both buses at once; tokens of other tags are offered too and must not
// be decoded. The chip output is drained with random delays. Checks: the
// words leave de-tagged in the order zr, zi of each set, in set order; one
// set_done pulse per completed set; results arriving out of order occur.
module tb_output_block;
  import adsp_pkg::*;
  localparam int NBUS = 2, NSETS = 300;
  logic clk = 0, rst_n = 0;
  logic [NBUS-1:0] bus_req = '0, rcv_sel, rcv_ack;
  token_t bus_tok [NBUS];
  logic out_req, out_ack = 0;
  data_t out_data;
  logic set_done, ev_reorder;
  int checks = 0, failures = 0, n_done = 0, n_reorder = 0;
  data_t expq[$];

  output_block dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send(input int b, input int tag, input data_t d, input bit expect_sel = 1);
    @(negedge clk);
    bus_tok[b] = '{tag: tag_t'(tag), data: d};
    bus_req[b] = 1;
    #1;
    check(rcv_sel[b] == expect_sel, $sformatf("decoder of tag %0d on bus %0d", tag, b));
    if (expect_sel) begin
      do @(negedge clk); while (!rcv_ack[b]);
    end else @(negedge clk);
    bus_req[b] = 0;
    if (expect_sel) do @(negedge clk); while (rcv_ack[b]);
  endtask

  initial begin : producer
    data_t zr, zi;
    int sel;
    bus_tok[0] = '0; bus_tok[1] = '0;
    wait (rst_n);
    for (int s = 0; s < NSETS; s++) begin
      zr = data_t'($urandom); zi = data_t'($urandom);
      expq.push_back(zr); expq.push_back(zi);
      send(1, 10, data_t'($urandom), 0);
      sel = $urandom_range(0, 2);
      unique case (sel)
        0: begin send(0, 11, zr); send(1, 12, zi); end
        1: begin send(1, 12, zi); send(0, 11, zr); end
        default: fork send(0, 11, zr); send(1, 12, zi); join
      endcase
    end
  end

  initial begin : consumer
    int n = 0;
    wait (rst_n);
    while (n < 2 * NSETS) begin
      do @(negedge clk); while (!out_req);
      if ((n / 64) % 2 == 1) repeat ($urandom_range(0, 12)) @(negedge clk);
      check(expq.size() > 0 && out_data == expq[0], $sformatf("word %0d: %h", n, out_data));
      if (expq.size() > 0) void'(expq.pop_front());
      out_ack = 1;
      do @(negedge clk); while (out_req);
      out_ack = 0;
      n++;
    end
    repeat (20) @(negedge clk);
    check(n_done == NSETS, $sformatf("%0d set_done pulses for %0d sets", n_done, NSETS));
    check(n_reorder > 0, "no result arrived out of order");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    n_done    += int'(set_done);
    n_reorder += int'(ev_reorder);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
