// tb_input_block - self-checking test of the example's second input block
// (port 1: br, bi, g, i.e. tags 2, 3, 4 on buses 0, 1, 0), with an
// eight-word FIFO and token control set to two data sets in flight (the
// pipelined case; the chip itself runs with one).
// Words are offered on the four-phase chip input as fast as it accepts
// them; tokens are taken on the bus side with random delays, and set_done
// is pulsed some time after each set's last token. Checks: every token
// carries the next word in order, the tag of its place in the set and the
// bus of that tag; no token of a new set leaves before set_done returned
// the credit, so never more than SETS sets are inside; two sets are inside
// together at some point; the FIFO fills up and the token control holds
// sets back.
module tb_input_block;
  import adsp_pkg::*;
  localparam int NSETS = 60;
  localparam int N_IN = 3;
  localparam int SETS = 2;
  localparam int EXP_TAG [N_IN] = '{2, 3, 4};
  localparam int EXP_BUS [N_IN] = '{0, 1, 0};
  logic clk = 0, rst_n = 0;
  logic in_req = 0, in_ack;
  data_t in_data = '0;
  logic src_req, src_ack = 0;
  token_t src_tok;
  int src_bus;
  logic set_done = 0, ev_token_stall, ev_fifo_full;
  int checks = 0, failures = 0, n_tstall = 0, n_ffull = 0;
  int outstanding = 0;   // sets started and not yet completed
  int max_outstanding = 0;
  int done_req = 0;      // completed sets whose set_done pulse is still due

  input_block #(.BLK(1), .SETS(SETS)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : source
    wait (rst_n);
    for (int i = 0; i < NSETS * N_IN; i++) begin
      @(negedge clk);
      in_data = data_t'(i * 3 + 1);
      in_req  = 1;
      do @(negedge clk); while (!in_ack);
      in_req = 0;
      do @(negedge clk); while (in_ack);
    end
  end

  initial begin : sink
    int k;
    wait (rst_n);
    for (int i = 0; i < NSETS * N_IN; i++) begin
      do @(negedge clk); while (!src_req);
      k = i % N_IN;
      if (k == 0) begin
        outstanding++;
        if (outstanding > max_outstanding) max_outstanding = outstanding;
        check(outstanding <= SETS, $sformatf("set %0d entered with %0d in flight", i / N_IN, outstanding - 1));
      end
      check(src_tok.data == data_t'(i * 3 + 1), $sformatf("word %0d data %h", i, src_tok.data));
      check(int'(src_tok.tag) == EXP_TAG[k], $sformatf("word %0d tag %0d", i, src_tok.tag));
      check(src_bus == EXP_BUS[k], $sformatf("word %0d bus %0d", i, src_bus));
      repeat ($urandom_range(0, 3)) @(negedge clk);
      src_ack = 1;
      do @(negedge clk); while (src_req);
      src_ack = 0;
      if (k == N_IN - 1) begin
        fork begin
          repeat ($urandom_range(5, 40)) @(negedge clk);
          done_req++;
        end join_none
      end
    end
    repeat (50) @(negedge clk);
    check(n_tstall > 0, "token control never held a set back");
    check(n_ffull > 0, "input FIFO never full");
    check(max_outstanding == SETS, $sformatf("at most %0d sets were inside together", max_outstanding));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one set_done pulse per clock at most, so no completion is lost
  always @(negedge clk) begin
    if (set_done) set_done = 0;
    else if (done_req > 0) begin
      done_req--;
      outstanding--;
      set_done = 1;
    end
  end

  always @(posedge clk) if (rst_n) begin
    n_tstall += int'(ev_token_stall);
    n_ffull  += int'(ev_fifo_full);
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
