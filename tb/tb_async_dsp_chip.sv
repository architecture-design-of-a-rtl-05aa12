// tb_async_dsp_chip - end-to-end test of the data-driven DSP chip at its
// default configuration (the complex-multiply-with-gain example).
//
// Feeds NSETS data sets through the two four-phase chip inputs (ar, ai on
// port 0; br, bi, g on port 1), each port independently with random gaps,
// drains the four-phase chip output with random acknowledge delays, and compares every result with a reference computed
// here directly from the formulas zr = ((ar*br) - (ai*bi)) * g and
// zi = g * ((ar*bi) + (ai*br)) in Q1.15 with truncation. Operands include
// zero, -1.0 and near-full-scale values. It also counts how often each
// mechanism of the architecture happened (bus contention on each bus,
// arbitration, priority among several ready operations, shared-register
// loads, token-control holds, a full input FIFO, out-of-order result
// arrival, data-dependent multiplier delay) and counts a failure for any
// that never happened. A watchdog ends a hung run.
module tb_async_dsp_chip;
  import adsp_pkg::*;

  localparam int NSETS    = 300;
  localparam int WATCHDOG = 400_000;

  logic  clk = 0, rst_n = 0;
  logic [N_IBLK-1:0] in_req = '0, in_ack;
  logic [N_OBLK-1:0] out_req, out_ack = '0;
  data_t in_data [N_IBLK];
  data_t out_data [N_OBLK];

  int checks = 0, failures = 0;

  async_dsp_chip dut (.*);

  always #5 clk = ~clk;

  function automatic data_t q15(input data_t a, input data_t b);
    logic signed [31:0] p;
    p = $signed(a) * $signed(b);
    return data_t'(p >>> 15);
  endfunction

  function automatic data_t pick_operand();
    int sel;
    sel = $urandom_range(0, 7);
    unique case (sel)
      0: return 16'h0000;
      1: return 16'h8000;
      2: return 16'h7fff;
      3: return data_t'($urandom_range(0, 15));
      default: return data_t'($urandom);
    endcase
  endfunction

  data_t exp_q[$];

  // ---- stimulus --------------------------------------------------------
  // Data sets are generated up front; port 0 sends (ar, ai) and port 1
  // (br, bi, g) of each set, independently and with random gaps.
  data_t port_words [N_IBLK][$];

  // In every other block of 25 sets the ports are slow enough for the FIFOs
  // to drain, and port 0 starts each set late, so that ar arrives after br
  // and bi and both of MUL0's products become ready together (priority).
  // Otherwise both ports send as fast as they are acknowledged.
  task automatic drive_port(input int p);
    data_t w;
    int    n, per_set, set_no;
    n = 0;
    per_set = (p == 0) ? 2 : 3;
    while (port_words[p].size() > 0) begin
      w = port_words[p].pop_front();
      set_no = n / per_set;
      if (set_no % 50 >= 25 && n % per_set == 0)
        repeat ((p == 0) ? $urandom_range(70, 130) : $urandom_range(40, 90)) @(negedge clk);
      else if ($urandom_range(0, 3) == 0) repeat ($urandom_range(0, 12)) @(negedge clk);
      n++;
      @(negedge clk);
      in_data[p] = w;
      in_req[p]  = 1'b1;
      do @(negedge clk); while (!in_ack[p]);
      in_req[p]  = 1'b0;
      do @(negedge clk); while (in_ack[p]);
    end
  endtask

  initial begin
    data_t ar, ai, br, bi, g;
    for (int p = 0; p < N_IBLK; p++) in_data[p] = '0;
    for (int s = 0; s < NSETS; s++) begin
      ar = pick_operand(); ai = pick_operand(); br = pick_operand();
      bi = pick_operand(); g  = pick_operand();
      exp_q.push_back(q15(data_t'(q15(ar, br) - q15(ai, bi)), g));
      exp_q.push_back(q15(g, data_t'(q15(ar, bi) + q15(ai, br))));
      port_words[0].push_back(ar); port_words[0].push_back(ai);
      port_words[1].push_back(br); port_words[1].push_back(bi); port_words[1].push_back(g);
    end
    repeat (4) @(posedge clk);
    rst_n = 1;
    fork
      drive_port(0);
      drive_port(1);
    join_none
  end

  // ---- result checking -------------------------------------------------
  int got = 0;
  initial begin
    data_t e;
    wait (rst_n);
    while (got < 2 * NSETS) begin
      do @(negedge clk); while (!out_req[0]);
      if (got % 100 < 60) repeat ($urandom_range(0, 10)) @(negedge clk);
      e = exp_q.pop_front();
      checks++;
      if (out_data[0] !== e) begin
        failures++;
        $display("result %0d: got %h expected %h", got, out_data[0], e);
      end
      got++;
      out_ack[0] = 1'b1;
      do @(negedge clk); while (out_req[0]);
      out_ack[0] = 1'b0;
    end
  end

  // ---- mechanism counters ---------------------------------------------
  int n_xfer [NB], n_cont [NB];
  int n_multi = 0, n_shared = 0, n_tstall = 0, n_ffull = 0, n_reorder = 0;
  logic mul_out_q = 1'b0;
  always @(posedge clk) mul_out_q <= dut.g_fu[0].u_node.u_fu.out_req;
  int mul_lat = 0, lat_min = 1 << 30, lat_max = 0;
  initial for (int b = 0; b < NB; b++) begin n_xfer[b] = 0; n_cont[b] = 0; end

  always @(posedge clk) if (rst_n) begin
    for (int b = 0; b < NB; b++) begin
      n_xfer[b] += int'(dut.ev_xfer[b]);
      n_cont[b] += int'(dut.ev_contention[b]);
    end
    n_multi   += $countones(dut.ev_multi_ready);
    n_shared  += $countones(dut.ev_shared_load);
    n_tstall  += $countones(dut.ev_token_stall);
    n_ffull   += $countones(dut.ev_fifo_full);
    n_reorder += $countones(dut.ev_reorder);
    // latency of MUL0 from operand acceptance to result offer
    if (dut.g_fu[0].u_node.u_match.fu_req && dut.g_fu[0].u_node.u_match.fu_ack)
      mul_lat = 0;
    else
      mul_lat++;
    if (dut.g_fu[0].u_node.u_fu.out_req && !mul_out_q) begin
      lat_min = (mul_lat < lat_min) ? mul_lat : lat_min;
      lat_max = (mul_lat > lat_max) ? mul_lat : lat_max;
    end
  end

  // data-set latency: from the later of the two input blocks sending the
  // first token of a set to the set's last result entering the output FIFO
  int cyc = 0, start0 = 0, start1 = 0, set_start = 0, set_lat_min = 1 << 30, set_lat_max = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dut.g_in[0].u_in.send && dut.g_in[0].u_in.k == '0) start0 = cyc;
    if (dut.g_in[1].u_in.send && dut.g_in[1].u_in.k == '0) start1 = cyc;
    if (dut.all_done) begin
      set_start = (start0 > start1) ? start0 : start1;
      set_lat_min = (cyc - set_start < set_lat_min) ? cyc - set_start : set_lat_min;
      set_lat_max = (cyc - set_start > set_lat_max) ? cyc - set_start : set_lat_max;
    end
  end

  task automatic need(input string what, input int n);
    checks++;
    $display("  %-36s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("  mechanism never happened: %s", what);
    end
  endtask

  initial begin
    wait (got == 2 * NSETS);
    repeat (20) @(posedge clk);
    $display("mechanism counts:");
    begin
      int nc = 0;
      for (int b = 0; b < NB; b++) begin
        need($sformatf("bus %0d transfers", b), n_xfer[b]);
        $display("  bus %0d arbitration conflicts         %0d", b, n_cont[b]);
        nc += n_cont[b];
      end
      need("arbitration conflicts, all buses", nc);
    end
    need("priority among ready operations", n_multi);
    need("shared-register loads", n_shared);
    need("token-control holds", n_tstall);
    need("input FIFO full", n_ffull);
    need("results arriving out of order", n_reorder);
    need("multiplier delay spread (max-min)", lat_max - lat_min);
    $display("data-set latency: %0d to %0d clocks", set_lat_min, set_lat_max);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d results after %0d cycles", got, 2 * NSETS, WATCHDOG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
