// Self-checking testbench for diffeq_core.
// Streams a new random (u, dx, x) triple every clock and checks that t6
// equals u - (u*dx)*(3*x) of the triple applied two edges earlier, which
// checks the arithmetic and the two-cycle latency together. Directed cases
// cover zero, one, negative values and products that overflow 32 bits.
module tb_diffeq_core;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [31:0] u, dx, x, t6;
  int checks = 0, failures = 0;

  diffeq_core dut (.clk, .rst_n, .u, .dx, .x, .t6);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model(logic [31:0] a, logic [31:0] d, logic [31:0] b);
    int sa = int'(a), sd = int'(d), sb = int'(b);
    int prod = (sa * sd) * (3 * sb);
    return 32'(sa - prod);
  endfunction

  logic [31:0] exp_q [$];

  initial begin
    u = '0; dx = '0; x = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // pipeline is full of zeros after reset
    exp_q.push_back(32'd0);
    exp_q.push_back(32'd0);
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // check output produced by the inputs of two edges ago
      checks++;
      if (t6 !== exp_q.pop_front()) begin
        failures++;
        if (failures < 10) $display("mismatch at step %0d: t6=%h", n, t6);
      end
      case (n)
        0: begin u = 32'd5; dx = 32'd1; x = 32'd1; end          // 5 - 15 = -10
        1: begin u = 32'd0; dx = 32'd7; x = 32'd9; end
        2: begin u = -32'sd3; dx = 32'd2; x = -32'sd4; end
        3: begin u = 32'h7fff_ffff; dx = 32'h1234_5678; x = 32'h0abc_def0; end
        default: begin u = $urandom; dx = $urandom; x = $urandom; end
      endcase
      exp_q.push_back(model(u, dx, x));
    end
    // directed value with a known answer
    @(negedge clk);
    u = 32'd10; dx = 32'd2; x = 32'd3;   // 10 - 20*9 = -170
    @(posedge clk); @(posedge clk); #1;
    checks++;
    if (t6 !== -32'sd170) begin failures++; $display("directed case wrong: %0d", int'(t6)); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
