// Self-checking testbench for hw_interface_module (E-channel interface with
// three 32-bit core inputs and one 32-bit core output).
// A bus-master task performs complete E-channel accesses (strobe, wait for
// ready, release). The core side is a test function computed in the
// testbench, out = in0 ^ (in1 + in2), so every register is observed. Each
// round writes three random 32-bit values as two 16-bit words each, checks
// the core inputs, reads the two result words back and checks them and the
// number of cycles each access took.
module tb_hw_interface_module;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic e_cs, e_das, e_read, e_rdy, e_ad_oe;
  logic [2:0] spa;
  logic [15:0] e_ad_in, e_ad_out;
  logic [2:0][31:0] core_in;
  logic [0:0][31:0] core_out;
  int checks = 0, failures = 0;

  hw_interface_module dut (.clk, .rst_n, .e_cs, .e_das, .e_read, .e_rdy, .spa,
                           .e_ad_in, .e_ad_out, .e_ad_oe, .core_in, .core_out);

  assign core_out[0] = core_in[0] ^ (core_in[1] + core_in[2]);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic bus_access(logic is_read, logic [2:0] a, logic [15:0] d, output logic [15:0] q);
    int cyc = 0;
    @(negedge clk);
    spa = a; e_ad_in = d; e_read = is_read; e_cs = 1'b1; e_das = 1'b1;
    do begin
      @(negedge clk);
      cyc++;
    end while (!e_rdy && cyc < 10);
    check(e_rdy && cyc == 2, $sformatf("access acknowledged after two cycles (%0d)", cyc));
    q = e_ad_out;
    if (is_read) check(e_ad_oe, "data buffer on during read");
    else         check(!e_ad_oe, "data buffer off during write");
    e_cs = 1'b0; e_das = 1'b0;
  endtask

  initial begin
    logic [31:0] v [3];
    logic [15:0] hi, lo, dummy;
    e_cs = 0; e_das = 0; e_read = 0; spa = '0; e_ad_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      for (int p = 0; p < 3; p++) begin
        v[p] = $urandom;
        bus_access(1'b0, 3'(2*p),   v[p][31:16], dummy);
        bus_access(1'b0, 3'(2*p+1), v[p][15:0],  dummy);
      end
      @(negedge clk);
      for (int p = 0; p < 3; p++) check(core_in[p] == v[p], $sformatf("core input %0d", p));
      bus_access(1'b1, 3'd0, 16'h0, hi);
      bus_access(1'b1, 3'd1, 16'h0, lo);
      check({hi, lo} == (v[0] ^ (v[1] + v[2])), "result read back in two words");
      @(negedge clk);
      check(!e_ad_oe, "data buffer off when idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
