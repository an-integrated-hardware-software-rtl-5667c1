// Self-checking testbench for isa_hw_interface_module (base 0x300, eight
// 32-bit core inputs, one 32-bit core output, first word = lower half).
// ISA I/O write and read cycles are driven by tasks. The core side is a test
// function of all inputs computed in the testbench. Each round writes all
// sixteen registers, checks the core inputs, reads the result back, and
// checks that writes to another base address or during DMA (aen high) are
// ignored.
module tb_isa_hw_interface_module;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [9:0] sa;
  logic aen, iow_n, ior_n, iocs16_n, sd_oe;
  logic [15:0] sd_in, sd_out;
  logic [7:0][31:0] core_in;
  logic [0:0][31:0] core_out;
  int checks = 0, failures = 0;

  isa_hw_interface_module dut (.clk, .rst_n, .sa, .aen, .iow_n, .ior_n, .iocs16_n,
                               .sd_in, .sd_out, .sd_oe, .core_in, .core_out);

  function automatic logic [31:0] core_fn(logic [7:0][31:0] v);
    logic [31:0] acc = 32'h1234_5678;
    for (int i = 0; i < 8; i++) acc = {acc[30:0], acc[31]} ^ v[i];
    return acc;
  endfunction
  assign core_out[0] = core_fn(core_in);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic io_write(logic [9:0] a, logic [15:0] d, logic dma);
    @(negedge clk);
    sa = a; sd_in = d; aen = dma; iow_n = 1'b0;
    repeat (4) @(negedge clk);
    iow_n = 1'b1;
    @(negedge clk);
    aen = 1'b0;
  endtask

  task automatic io_read(logic [9:0] a, output logic [15:0] q);
    @(negedge clk);
    sa = a; ior_n = 1'b0;
    @(negedge clk);
    check(sd_oe && !iocs16_n, "board drives a 16-bit read");
    q = sd_out;
    ior_n = 1'b1;
  endtask

  initial begin
    logic [7:0][31:0] v;
    logic [15:0] lo, hi;
    sa = '0; aen = 0; iow_n = 1; ior_n = 1; sd_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 60; n++) begin
      for (int p = 0; p < 8; p++) begin
        v[p] = $urandom;
        io_write(10'h300 + 10'(2*p),   v[p][15:0],  1'b0);
        io_write(10'h300 + 10'(2*p+1), v[p][31:16], 1'b0);
      end
      check(core_in == v, "all core inputs loaded");
      io_write(10'h310 + 10'($urandom_range(15)), 16'($urandom), 1'b0);
      io_write(10'h300 + 10'($urandom_range(15)), 16'($urandom), 1'b1);
      check(core_in == v, "foreign and DMA cycles ignored");
      io_read(10'h300, lo);
      io_read(10'h301, hi);
      check({hi, lo} == core_fn(v), "result read back");
      @(negedge clk);
      check(!sd_oe, "buffer off when idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
