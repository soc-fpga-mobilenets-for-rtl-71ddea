// Send Results test. Groups of pointwise results (two lanes, random order of
// addresses, random gaps) are written into the OFM memories and closed with
// set_done; the 64-bit output stream is compared byte by byte with the
// expected order (lane 1 pixels 0..n-1, then lane 2), tlast must mark only the
// final beat of each set, and the two ping-pong sets must alternate: set_free
// goes low when both sets are waiting and returns once one has been sent.
// m_ready is dropped at random. The beat rate with m_ready high is checked
// (2 clocks per beat).
// The set ping-pong follows the reference; send order and beat rate are this design's.
module tb_send_results;
  import mbn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, wvalid = 0, set_done = 0, set_free, m_valid, m_ready = 0, m_last;
  logic [11:0] n_bytes, waddr;
  logic [7:0] wdata_a, wdata_b;
  logic [63:0] m_data;

  send_results dut (.clk, .rst_n, .start, .n_bytes, .wvalid, .waddr, .wdata_a, .wdata_b, .set_done,
    .set_free, .m_valid, .m_ready, .m_data, .m_last);

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  byte unsigned exp_q [$];
  int sets_out = 0, beats = 0, busy_full = 0;
  bit rdy_random = 1, stall = 0;
  int first_beat = -1, last_beat = -1, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // output checker
  always @(posedge clk) if (rst_n) begin
    if (m_valid && m_ready) begin
      automatic bit lastexp;
      if (first_beat < 0) first_beat = cyc;
      last_beat = cyc;
      beats++;
      for (int k = 0; k < 8; k++) begin
        chk(exp_q.size() > 0 && m_data[k*8 +: 8] == exp_q[0], $sformatf("beat %0d byte %0d", beats, k));
        if (exp_q.size() > 0) void'(exp_q.pop_front());
      end
      lastexp = (exp_q.size() % (2 * n_bytes) == 0);
      chk(m_last == lastexp, $sformatf("tlast at beat %0d", beats));
      if (m_last) sets_out++;
    end
    m_ready <= stall ? 1'b0 : rdy_random ? ($urandom_range(2) != 0) : 1'b1;
  end

  task automatic fill_set(input int n);
    byte unsigned a [], b [];
    int order [];
    a = new[n]; b = new[n]; order = new[n];
    foreach (order[i]) order[i] = i;
    order.shuffle();
    foreach (a[i]) begin a[i] = byte'($urandom()); b[i] = byte'($urandom()); end
    while (!set_free) begin @(negedge clk); busy_full++; end
    foreach (order[j]) begin
      while ($urandom_range(4) == 0) begin @(negedge clk); wvalid = 0; end
      @(negedge clk);
      wvalid = 1; waddr = 12'(order[j]); wdata_a = a[order[j]]; wdata_b = b[order[j]];
    end
    @(negedge clk); wvalid = 0; set_done = 1;
    foreach (a[i]) exp_q.push_back(a[i]);
    foreach (b[i]) exp_q.push_back(b[i]);
    @(negedge clk); set_done = 0;
  endtask

  initial begin
    waddr = 0; wdata_a = 0; wdata_b = 0; n_bytes = 12'd392;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    // the DMA stalls while three sets are produced: the third must wait
    stall = 1;
    fork
      begin repeat (3000) @(negedge clk); stall = 0; end
      for (int s = 0; s < 3; s++) fill_set(392);     // 7x7x8 OFM pixels per memory
    join
    for (int s = 0; s < 3; s++) fill_set(392);
    wait (exp_q.size() == 0);
    repeat (5) @(negedge clk);
    chk(sets_out == 6, $sformatf("%0d sets sent", sets_out));
    chk(busy_full > 0, "writer had to wait for a free set");
    // rate with ready held high: the largest set, 3136 pixels per memory
    rdy_random = 0; n_bytes = 12'd3136; first_beat = -1; beats = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    fill_set(3136);
    wait (exp_q.size() == 0);
    repeat (3) @(negedge clk);
    chk(beats == 784, $sformatf("%0d beats", beats));
    chk(last_beat - first_beat <= 2 * 784, $sformatf("784 beats in %0d clocks", last_beat - first_beat));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
