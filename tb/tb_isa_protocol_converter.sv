// Self-checking testbench for isa_protocol_converter (base 0x300, 4
// register address bits). Checks that an I/O write to the board gives
// exactly one wr pulse, in the cycle after iow_n has been sampled low at two
// edges, whatever the strobe length; that reads raise rd and sd_oe at once;
// that iocs16_n marks selection; and that accesses to another base address or
// with aen high are ignored.
module tb_isa_protocol_converter;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [9:0] sa;
  logic aen, iow_n, ior_n, iocs16_n, sd_oe, wr, rd;
  int checks = 0, failures = 0;

  isa_protocol_converter dut (.clk, .rst_n, .sa, .aen, .iow_n, .ior_n, .iocs16_n,
                              .sd_oe, .wr, .rd);

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

  task automatic io_write(logic [9:0] a, logic dma, int len, logic expect_sel);
    int pulses = 0, first = -1;
    @(negedge clk);
    sa = a; aen = dma; iow_n = 1'b0;
    #1 check(iocs16_n == !expect_sel, "iocs16_n follows selection");
    for (int c = 1; c <= len; c++) begin
      @(negedge clk);
      if (wr) begin pulses++; if (first < 0) first = c; end
    end
    iow_n = 1'b1;
    repeat (2) begin @(negedge clk); if (wr) pulses++; end
    check(pulses == (expect_sel ? 1 : 0), $sformatf("write pulses %0d", pulses));
    if (expect_sel) check(first == 2, $sformatf("write pulse in cycle %0d", first));
    aen = 1'b0;
  endtask

  initial begin
    sa = '0; aen = 1'b0; iow_n = 1'b1; ior_n = 1'b1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      automatic int kind = $urandom_range(3);
      automatic logic [9:0] a = 10'h300 | 10'($urandom_range(15));
      case (kind)
        0, 1: io_write(a, 1'b0, 3 + $urandom_range(5), 1'b1);
        2:    io_write(10'h310 | 10'($urandom_range(15)), 1'b0, 4, 1'b0);
        default: io_write(a, 1'b1, 4, 1'b0);
      endcase
      // read
      @(negedge clk);
      sa = a; ior_n = 1'b0; #1;
      check(rd && sd_oe && !wr, "read strobe gives rd and sd_oe");
      @(negedge clk);
      check(rd && !wr, "rd held during read");
      ior_n = 1'b1; #1;
      check(!rd && !sd_oe, "rd released with the strobe");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
