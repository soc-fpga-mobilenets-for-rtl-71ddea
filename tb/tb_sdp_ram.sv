// Simple dual-port RAM test for the three port shapes the accelerator uses:
// wide write / narrow read (64 -> 8), narrow write / wide read (16 -> 512 and
// 72 -> 144) and equal widths (32 -> 32). Random data are written through the
// write port and read back through the read port in random order, compared
// with a byte-level model; also checks read-during-write returns old data
// and that rdata holds while re is low.
// Read-before-write and the unit order are this design's conventions.
module tb_sdp_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  // 64 -> 8, 128 words
  logic we_a = 0, re_a = 0; logic [6:0] wa_a; logic [63:0] wd_a; logic [9:0] ra_a; logic [7:0] rd_a;
  sdp_ram #(.WR_W(64), .RD_W(8), .WORDS(128)) u_a (.clk, .we(we_a), .waddr(wa_a), .wdata(wd_a),
    .re(re_a), .raddr(ra_a), .rdata(rd_a));
  // 16 -> 512, 256 words
  logic we_b = 0, re_b = 0; logic [7:0] wa_b; logic [15:0] wd_b; logic [2:0] ra_b; logic [511:0] rd_b;
  sdp_ram #(.WR_W(16), .RD_W(512), .WORDS(256)) u_b (.clk, .we(we_b), .waddr(wa_b), .wdata(wd_b),
    .re(re_b), .raddr(ra_b), .rdata(rd_b));
  // 72 -> 144, 64 words
  logic we_c = 0, re_c = 0; logic [5:0] wa_c; logic [71:0] wd_c; logic [4:0] ra_c; logic [143:0] rd_c;
  sdp_ram #(.WR_W(72), .RD_W(144), .WORDS(64)) u_c (.clk, .we(we_c), .waddr(wa_c), .wdata(wd_c),
    .re(re_c), .raddr(ra_c), .rdata(rd_c));
  // 32 -> 32, 100 words
  logic we_d = 0, re_d = 0; logic [6:0] wa_d; logic [31:0] wd_d; logic [6:0] ra_d; logic [31:0] rd_d;
  sdp_ram #(.WR_W(32), .RD_W(32), .WORDS(100)) u_d (.clk, .we(we_d), .waddr(wa_d), .wdata(wd_d),
    .re(re_d), .raddr(ra_d), .rdata(rd_d));

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [7:0]  ma [1024];
  logic [15:0] mb [256];
  logic [71:0] mc [64];
  logic [31:0] md [100];

  initial begin
    // fill
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we_a = (i < 128); wa_a = 7'(i); wd_a = {$urandom(), $urandom()};
      we_b = 1; wa_b = 8'(i); wd_b = 16'($urandom());
      we_c = (i < 64); wa_c = 6'(i); wd_c = {8'($urandom()), $urandom(), $urandom()};
      we_d = (i < 100); wa_d = 7'(i); wd_d = $urandom();
      if (we_a) for (int k = 0; k < 8; k++) ma[i*8+k] = wd_a[k*8 +: 8];
      mb[i] = wd_b;
      if (we_c) mc[i] = wd_c;
      if (we_d) md[i] = wd_d;
    end
    @(negedge clk); we_a = 0; we_b = 0; we_c = 0; we_d = 0;
    // random reads
    for (int n = 0; n < 600; n++) begin
      automatic int a = $urandom_range(1023), b = $urandom_range(7), c = $urandom_range(31),
                    d = $urandom_range(99);
      re_a = 1; ra_a = 10'(a); re_b = (b < 8); ra_b = 3'(b); re_c = 1; ra_c = 5'(c); re_d = 1; ra_d = 7'(d);
      @(negedge clk);
      chk(rd_a == ma[a], $sformatf("64->8 addr %0d", a));
      begin
        automatic logic [511:0] e;
        for (int k = 0; k < 32; k++) e[k*16 +: 16] = mb[b*32+k];
        chk(rd_b == e, $sformatf("16->512 addr %0d", b));
      end
      chk(rd_c == {mc[2*c+1], mc[2*c]}, $sformatf("72->144 addr %0d", c));
      chk(rd_d == md[d], $sformatf("32->32 addr %0d", d));
    end
    // read during write returns the old word
    re_d = 1; ra_d = 7'd5; we_d = 1; wa_d = 7'd5; wd_d = ~md[5];
    @(negedge clk);
    chk(rd_d == md[5], "read during write gives old data");
    md[5] = ~md[5]; we_d = 0;
    // hold while re is low: still the word read above
    re_d = 0; ra_d = 7'd6;
    @(negedge clk);
    chk(rd_d == ~md[5], "rdata holds while re is low");
    re_d = 1;
    @(negedge clk);
    chk(rd_d == md[6], "read after hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
