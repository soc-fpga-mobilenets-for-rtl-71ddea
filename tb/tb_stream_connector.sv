// Stream Connector test. A host model sends, for several random stage
// schedules, the streams of one stage in order (DW weights, DW BN, PW BN,
// PW weights, PW shifts, IFM tiles with pointwise reloads in between) as
// packets of random length with random valid gaps; the ports' ready signals
// toggle at random. Each port records what it receives; the checker compares
// the per-port packet sequence and data with what the host sent to that port
// and checks that valid reaches only the port of the current state, that the
// connector holds while the selected port is not ready, and that stage_done
// pulses once, after the final tile.
// The stream order and reload schedule are this design's encoding of the host transfers.
module tb_stream_connector;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, s_valid = 0, s_ready, s_last = 0, m_last, stage_done, busy;
  logic [15:0] n_ifm, pw_first, pw_period, pw_reloads;
  logic [63:0] s_data, m_data;
  logic [5:0] m_valid, m_ready;

  stream_connector dut (.clk, .rst_n, .start, .n_ifm, .pw_first, .pw_period, .pw_reloads, .s_valid,
    .s_ready, .s_data, .s_last, .m_valid, .m_ready, .m_data, .m_last, .stage_done, .busy);

  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  logic [63:0] exp_q [6][$];
  int exp_port [$];       // port of each expected packet, in order
  int dones = 0, held = 0, fires = 0;

  always @(posedge clk) if (rst_n) begin
    if (stage_done) dones++;
    if (s_valid && s_ready) fires++;
    chk($onehot0(m_valid), "valid to more than one port");
    for (int p = 0; p < 6; p++) if (m_valid[p]) begin
      chk(s_ready == m_ready[p], "ready comes from the selected port");
      if (!m_ready[p]) held++;
      if (m_ready[p]) begin
        chk(exp_port.size() > 0 && exp_port[0] == p, $sformatf("beat on port %0d, expected %0d", p, exp_port.size() ? exp_port[0] : -1));
        chk(exp_q[p].size() > 0 && m_data == exp_q[p][0], $sformatf("data on port %0d", p));
        if (exp_q[p].size() > 0) void'(exp_q[p].pop_front());
        if (m_last && exp_port.size() > 0) void'(exp_port.pop_front());
      end
    end
    m_ready <= 6'($urandom());
  end

  task automatic send_packet(input int port, input int len);
    exp_port.push_back(port);
    for (int i = 0; i < len; i++) begin
      automatic logic [63:0] d = {$urandom(), $urandom()};
      automatic int f0;
      exp_q[port].push_back(d);
      while ($urandom_range(3) == 0) begin s_valid = 0; @(negedge clk); end
      s_valid = 1; s_data = d; s_last = (i == len - 1);
      f0 = fires;
      do @(negedge clk); while (fires == f0);
    end
    s_valid = 0; s_last = 0;
  endtask

  task automatic stage(input int nifm, input int first, input int period, input int reloads);
    int next, done_r;
    n_ifm = 16'(nifm); pw_first = 16'(first); pw_period = 16'(period); pw_reloads = 16'(reloads);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int p = 0; p < 5; p++) send_packet(p, $urandom_range(1, 12));
    next = first; done_r = 0;
    for (int t = 0; t < nifm; t++) begin
      if (done_r < reloads && t == next) begin
        send_packet(3, $urandom_range(1, 8));
        send_packet(4, $urandom_range(1, 8));
        done_r++; next += period;
      end
      send_packet(5, $urandom_range(1, 20));
    end
    repeat (5) @(posedge clk);
    chk(exp_port.size() == 0, $sformatf("%0d packets not delivered", exp_port.size()));
    chk(!busy, "connector idle after the stage");
  endtask

  initial begin
    int st = 0;
    n_ifm = 0; pw_first = 0; pw_period = 0; pw_reloads = 0; s_data = 0; m_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    stage(1, 0, 0, 0);            // one tile, no reload
    stage(8, 0, 0, 0);            // several tiles
    stage(4, 1, 2, 1);            // a reload before tile 1
    stage(12, 2, 3, 3);           // reloads before tiles 2, 5, 8
    for (int n = 0; n < 10; n++) begin
      automatic int ni = $urandom_range(1, 12), pe = $urandom_range(1, 4);
      stage(ni, $urandom_range(1, ni), pe, $urandom_range(0, 3));
    end
    st = 14;
    chk(dones == st, $sformatf("stage_done pulsed %0d times", dones));
    chk(held > 0, "a port held the stream");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
