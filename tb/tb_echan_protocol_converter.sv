// Self-checking testbench for echan_protocol_converter.
// Performs write and read accesses with random hold times of the data
// strobe and checks, cycle by cycle, that: a write gives exactly one wr pulse
// in the cycle after the strobe is sampled; e_rdy rises one cycle after that
// (two edges after the strobe) and stays until the strobe drops; a read keeps
// rd high from that same cycle until the strobe drops, with no wr; nothing
// happens without chip select.
module tb_echan_protocol_converter;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic e_cs, e_das, e_read, e_rdy, wr, rd;
  int checks = 0, failures = 0;

  echan_protocol_converter dut (.clk, .rst_n, .e_cs, .e_das, .e_read, .e_rdy, .wr, .rd);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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

  // One access; `hold` extra cycles of strobe after ready.
  task automatic access(logic is_read, int hold);
    int wr_pulses = 0, cyc = 0, rdy_cycle = -1;
    @(negedge clk);
    e_cs = 1'b1; e_das = 1'b1; e_read = is_read;
    // cycle 0: strobe present, nothing yet
    #1 check(!wr && !rd && !e_rdy, "quiet in the strobe's first cycle");
    while (!e_rdy) begin
      @(negedge clk);
      cyc++;
      if (wr) wr_pulses++;
      if (cyc == 1) check(is_read ? (rd && !wr) : (wr && !rd), "command in the cycle after the strobe");
      if (cyc > 5) break;
    end
    rdy_cycle = cyc;
    check(rdy_cycle == 2, $sformatf("ready two cycles after the strobe (got %0d)", rdy_cycle));
    for (int h = 0; h < hold; h++) begin
      check(e_rdy && !wr && (rd == is_read), "ready held, no further write");
      @(negedge clk);
    end
    e_das = 1'b0; e_cs = 1'b0;
    @(negedge clk);
    check(!e_rdy && !rd && !wr, "idle after strobe drops");
    check(wr_pulses == (is_read ? 0 : 1), "exactly one write pulse per write");
  endtask

  initial begin
    e_cs = 1'b0; e_das = 1'b0; e_read = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) access(1'($urandom_range(1)), $urandom_range(3));
    // strobe without chip select is ignored
    @(negedge clk);
    e_das = 1'b1; e_read = 1'b0;
    repeat (4) begin
      @(negedge clk);
      check(!wr && !rd && !e_rdy, "no access without chip select");
    end
    e_das = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
