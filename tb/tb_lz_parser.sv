// Self-checking testbench for lz_parser.
// A reference model in the testbench searches the buffer with plain loops
// (longest match of the lookahead prefix, lowest start position on ties,
// length capped at LA-1) and packs the expected result word. Buffers come
// from small random alphabets, so that matches of every length occur, plus
// directed cases: all symbols equal (longest match), no symbol shared (no
// match), a match overlapping into the lookahead. The result must appear
// exactly one clock edge after the buffer is applied.
module tb_lz_parser;
  localparam int N = 16, LA = N / 2, NS = N - LA, SYM_W = 8;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [N-1:0][SYM_W-1:0] buf_in;
  logic [31:0] result;
  int checks = 0, failures = 0;
  int len_seen [LA];

  lz_parser dut (.clk, .rst_n, .buf_in, .result);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model(logic [N-1:0][SYM_W-1:0] b, output int blen);
    int bp = 0;
    blen = 0;
    for (int p = 0; p < NS; p++) begin
      int l = 0;
      while (l < LA - 1 && b[p + l] == b[NS + l]) l++;
      if (l > blen) begin blen = l; bp = p; end
    end
    return {21'd0, 3'(bp), 3'(blen), b[NS + blen]};
  endfunction

  task automatic apply_and_check(logic [N-1:0][SYM_W-1:0] b);
    logic [31:0] e;
    int l;
    logic [31:0] prev;
    @(negedge clk);
    buf_in = b;
    e = model(b, l);
    prev = result;
    #1;
    // not yet registered
    checks++;
    if (result !== prev) begin failures++; $display("result changed before the clock edge"); end
    @(posedge clk); #1;
    checks++;
    len_seen[l]++;
    if (result !== e) begin
      failures++;
      if (failures < 10) $display("mismatch: got %h expected %h", result, e);
    end
  endtask

  initial begin
    logic [N-1:0][SYM_W-1:0] b;
    buf_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // all equal: match of LA-1 at position 0
    for (int i = 0; i < N; i++) b[i] = 8'h41;
    apply_and_check(b);
    // nothing shared
    for (int i = 0; i < N; i++) b[i] = 8'(i + 1);
    apply_and_check(b);
    // overlapping match: search "....ab" lookahead "ababab.."
    for (int i = 0; i < N; i++) b[i] = 8'h30;
    b[NS-2] = 8'h61; b[NS-1] = 8'h62;
    for (int i = NS; i < N; i++) b[i] = ((i - NS) % 2 == 0) ? 8'h61 : 8'h62;
    apply_and_check(b);
    for (int n = 0; n < 4000; n++) begin
      automatic int alpha = 2 + (n % 4);
      for (int i = 0; i < N; i++) b[i] = 8'($urandom_range(alpha - 1));
      apply_and_check(b);
    end
    for (int l = 0; l < LA; l++) begin
      checks++;
      if (len_seen[l] == 0) begin failures++; $display("match length %0d never exercised", l); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
