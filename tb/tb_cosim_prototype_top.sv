// End-to-end testbench for cosim_prototype_top, at the top's default sizes.
//
// The testbench plays the host software of each prototype:
//  * Differential equation: it runs the solver loop of y'' + 3xy' + 3y = 0
//    in 32-bit integers. Each step writes u, dx and x over the E-channel
//    (two 16-bit words each), reads t6 = u - 3*x*u*dx back in two words and
//    finishes the step in software; the trajectory must equal that of an
//    all-software loop.
//  * Compression prototype 1 (E-channel, 16-symbol buffer) and 2 (ISA bus,
//    32-symbol buffer): it runs an LZ77 coder whose parsing step is done by
//    the hardware: write the buffer, read the (pointer, length, symbol)
//    codeword, check it against a software longest-match search, shift the
//    buffer. The codewords are then decoded and must give back the text.
// It counts the mechanisms the design has and fails if one never happened:
// E-channel writes, reads and ready waits, ISA writes and reads, ISA cycles
// ignored (foreign base address, DMA), codewords with no match, with the
// longest possible match and with a match running into the lookahead.
module tb_cosim_prototype_top;
  localparam int N1 = 16, N2 = 32, SYM_W = 8;
  localparam int TEXT_LEN = 400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;

  // two E-channel masters: 0 = differential equation, 1 = compression 1
  logic        e_cs [2], e_das [2], e_read [2];
  logic        e_rdy [2], e_oe [2];
  logic [2:0]  e_spa [2];
  logic [15:0] e_din [2], e_dout [2];
  // ISA master
  logic [9:0]  sa;
  logic        aen, iow_n, ior_n, iocs16_n, sd_oe;
  logic [15:0] sd_in, sd_out;

  int checks = 0, failures = 0;
  int n_ewrite = 0, n_eread = 0, n_ewait = 0, n_iwrite = 0, n_iread = 0, n_iignored = 0;
  int n_nomatch = 0, n_maxmatch = 0, n_overlap = 0, n_desteps = 0;

  cosim_prototype_top dut (
    .clk, .rst_n,
    .de_cs(e_cs[0]), .de_das(e_das[0]), .de_read(e_read[0]), .de_rdy(e_rdy[0]),
    .de_spa(e_spa[0]), .de_ad_in(e_din[0]), .de_ad_out(e_dout[0]), .de_ad_oe(e_oe[0]),
    .lz1_cs(e_cs[1]), .lz1_das(e_das[1]), .lz1_read(e_read[1]), .lz1_rdy(e_rdy[1]),
    .lz1_spa(e_spa[1]), .lz1_ad_in(e_din[1]), .lz1_ad_out(e_dout[1]), .lz1_ad_oe(e_oe[1]),
    .lz2_sa(sa), .lz2_aen(aen), .lz2_iow_n(iow_n), .lz2_ior_n(ior_n),
    .lz2_iocs16_n(iocs16_n), .lz2_sd_in(sd_in), .lz2_sd_out(sd_out), .lz2_sd_oe(sd_oe)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // ---------------- bus masters ----------------
  task automatic e_access(int dev, logic is_read, logic [2:0] a, logic [15:0] d,
                          output logic [15:0] q);
    int waits = 0;
    @(negedge clk);
    e_spa[dev] = a; e_din[dev] = d; e_read[dev] = is_read;
    e_cs[dev] = 1'b1; e_das[dev] = 1'b1;
    @(negedge clk);
    while (!e_rdy[dev] && waits < 10) begin
      waits++;
      @(negedge clk);
    end
    check(e_rdy[dev], "E-channel access acknowledged");
    if (waits > 0) n_ewait++;
    q = e_dout[dev];
    if (is_read) begin n_eread++; check(e_oe[dev], "E-channel read drives data"); end
    else n_ewrite++;
    e_cs[dev] = 1'b0; e_das[dev] = 1'b0;
  endtask

  task automatic e_write32(int dev, int port, logic [31:0] v);
    logic [15:0] q;
    e_access(dev, 1'b0, 3'(2*port),     v[31:16], q);  // first word: upper half
    e_access(dev, 1'b0, 3'(2*port + 1), v[15:0],  q);
  endtask

  task automatic e_read32(int dev, output logic [31:0] v);
    logic [15:0] hi, lo;
    e_access(dev, 1'b1, 3'd0, 16'h0, hi);
    e_access(dev, 1'b1, 3'd1, 16'h0, lo);
    v = {hi, lo};
  endtask

  task automatic isa_write(logic [9:0] a, logic [15:0] d, logic dma);
    @(negedge clk);
    sa = a; sd_in = d; aen = dma; iow_n = 1'b0;
    repeat (4) @(negedge clk);
    iow_n = 1'b1;
    @(negedge clk);
    aen = 1'b0;
    if (dma || a[9:4] != 6'h30) n_iignored++; else n_iwrite++;
  endtask

  task automatic isa_read(logic [9:0] a, output logic [15:0] q);
    @(negedge clk);
    sa = a; ior_n = 1'b0;
    @(negedge clk);
    check(sd_oe && !iocs16_n, "ISA read drives 16-bit data");
    q = sd_out;
    ior_n = 1'b1;
    n_iread++;
  endtask

  task automatic isa_write32(int port, logic [31:0] v);
    isa_write(10'h300 + 10'(2*port),     v[15:0],  1'b0);  // first word: lower half
    isa_write(10'h300 + 10'(2*port + 1), v[31:16], 1'b0);
  endtask

  task automatic isa_read32(output logic [31:0] v);
    logic [15:0] lo, hi;
    isa_read(10'h300, lo);
    isa_read(10'h301, hi);
    v = {hi, lo};
  endtask

  // ---------------- differential equation ----------------
  task automatic run_diffeq();
    int x = 0, y = 1000, u = 50, dx = 3, a = 60;
    int xs = 0, ys = 1000, us = 50;
    logic [31:0] t6;
    while (x < a) begin
      int x1, u1, y1;
      e_write32(0, 0, 32'(u));
      e_write32(0, 1, 32'(dx));
      e_write32(0, 2, 32'(x));
      e_read32(0, t6);
      check(t6 == 32'(u - 3 * x * u * dx), "hardware t6");
      x1 = x + dx;
      u1 = int'(t6) - 3 * y * dx;
      y1 = y + u * dx;
      x = x1; u = u1; y = y1;
      // all-software reference
      begin
        int xs1 = xs + dx, us1 = us - 3 * xs * us * dx - 3 * ys * dx, ys1 = ys + us * dx;
        xs = xs1; us = us1; ys = ys1;
      end
      check(x == xs && u == us && y == ys, "cosimulated step equals software step");
      n_desteps++;
    end
    check(n_desteps == 20, "solver loop length");
  endtask

  // ---------------- LZ77 with hardware parsing ----------------
  task automatic run_lz(int dev_isa, int n);
    int la = n / 2, ns = n - n / 2;
    int len_w = $clog2(n / 2), ptr_w = $clog2(n - n / 2);
    byte unsigned text [];
    byte unsigned b [];
    byte unsigned hist [$];
    int cw_p [$], cw_l [$], cw_s [$];
    int next = 0, consumed = 0;
    text = new[TEXT_LEN + n];
    // text with repeats: runs, copies of earlier fragments and fresh symbols
    for (int i = 0; i < TEXT_LEN + n; ) begin
      int kind = $urandom_range(2);
      if (kind == 0 || i < 8) begin text[i] = 8'($urandom_range(5) + 97); i++; end
      else if (kind == 1) begin
        int r = $urandom_range(12);
        for (int k = 0; k < r && i < TEXT_LEN + n; k++) begin text[i] = text[i-1]; i++; end
      end else begin
        int src = $urandom_range(i - 1), r = $urandom_range(10);
        for (int k = 0; k < r && i < TEXT_LEN + n; k++) begin text[i] = text[src + k]; i++; end
      end
    end
    // buffer: search part starts as zeros, lookahead holds the first symbols
    b = new[n];
    for (int i = 0; i < ns; i++) b[i] = 0;
    for (int i = 0; i < la; i++) b[ns + i] = text[next++];
    while (consumed < TEXT_LEN) begin
      logic [31:0] r;
      int p, l, s, ep, el;
      for (int port = 0; port < n / 4; port++) begin
        logic [31:0] w = {b[4*port+3], b[4*port+2], b[4*port+1], b[4*port]};
        if (dev_isa) isa_write32(port, w);
        else         e_write32(1, port, w);
      end
      if (dev_isa && consumed % 16 == 0) begin
        isa_write(10'h310 | 10'($urandom_range(15)), 16'($urandom), 1'b0);
        isa_write(10'h300 | 10'($urandom_range(15)), 16'($urandom), 1'b1);
      end
      if (dev_isa) isa_read32(r);
      else         e_read32(1, r);
      s = int'(r[7:0]);
      l = int'((r >> 8) & ((1 << len_w) - 1));
      p = int'((r >> (8 + len_w)) & ((1 << ptr_w) - 1));
      // software longest-match search
      ep = 0; el = 0;
      for (int i = 0; i < ns; i++) begin
        int k = 0;
        while (k < la - 1 && b[i + k] == b[ns + k]) k++;
        if (k > el) begin el = k; ep = i; end
      end
      check(l == el && p == ep && s == int'(b[ns + el]) && (r >> (8 + len_w + ptr_w)) == 0,
            $sformatf("codeword (%0d,%0d,%0d) expected (%0d,%0d,%0d)", p, l, s, ep, el, b[ns + el]));
      if (l == 0) n_nomatch++;
      if (l == la - 1) n_maxmatch++;
      if (l > 0 && p + l > ns) n_overlap++;
      cw_p.push_back(p); cw_l.push_back(l); cw_s.push_back(s);
      // shift the buffer by l+1
      for (int i = 0; i < n - (l + 1); i++) b[i] = b[i + l + 1];
      for (int i = n - (l + 1); i < n; i++) b[i] = text[next++];
      consumed += l + 1;
    end
    // decode
    for (int i = 0; i < ns; i++) hist.push_back(0);
    for (int c = 0; c < cw_p.size(); c++) begin
      int w = hist.size() - ns;
      for (int k = 0; k < cw_l[c]; k++) hist.push_back(hist[w + cw_p[c] + k]);
      hist.push_back(byte'(cw_s[c]));
    end
    begin
      int bad = 0;
      for (int i = 0; i < consumed; i++) if (hist[ns + i] != text[i]) bad++;
      check(bad == 0, $sformatf("decoded text differs in %0d symbols", bad));
    end
    check(cw_p.size() < consumed, "compression used matches");
    $display("LZ n=%0d: %0d symbols coded in %0d codewords", n, consumed, cw_p.size());
  endtask

  initial begin
    for (int d = 0; d < 2; d++) begin
      e_cs[d] = 0; e_das[d] = 0; e_read[d] = 0; e_spa[d] = '0; e_din[d] = '0;
    end
    sa = '0; aen = 0; iow_n = 1; ior_n = 1; sd_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      run_diffeq();
      run_lz(0, N1);
      run_lz(1, N2);
    join
    check(n_ewrite > 0, "E-channel writes happened");
    check(n_eread > 0, "E-channel reads happened");
    check(n_ewait > 0, "E-channel ready waits happened");
    check(n_iwrite > 0, "ISA writes happened");
    check(n_iread > 0, "ISA reads happened");
    check(n_iignored > 0, "ignored ISA cycles happened");
    check(n_nomatch > 0, "codewords without match");
    check(n_maxmatch > 0, "codewords with longest match");
    check(n_overlap > 0, "matches running into the lookahead");
    $display("counts: ewrite=%0d eread=%0d ewait=%0d iwrite=%0d iread=%0d iignored=%0d nomatch=%0d maxmatch=%0d overlap=%0d desteps=%0d",
             n_ewrite, n_eread, n_ewait, n_iwrite, n_iread, n_iignored, n_nomatch, n_maxmatch, n_overlap, n_desteps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
