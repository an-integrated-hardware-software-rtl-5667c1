// Self-checking testbench for signal_register (three 32-bit core inputs,
// one 32-bit core output, 16-bit bus: registers r0..r5, multiplexer m0/m1).
// Writes random words to every register address and checks each core input
// port against the expected word order (first word = upper half); checks
// that writes to unused addresses change nothing; reads every multiplexer
// input and checks the slice, the output enable and that reads of unused
// addresses or with rd low return zero.
module tb_signal_register;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [2:0] addr;
  logic [15:0] wdata, rdata;
  logic wr, rd, data_oe;
  logic [2:0][31:0] core_in;
  logic [0:0][31:0] core_out;
  int checks = 0, failures = 0;

  signal_register dut (.clk, .rst_n, .addr, .wdata, .wr, .rd, .rdata, .data_oe,
                       .core_in, .core_out);

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
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic write(int a, logic [15:0] d);
    @(negedge clk);
    addr = 3'(a); wdata = d; wr = 1'b1;
    @(negedge clk);
    wr = 1'b0;
  endtask

  initial begin
    logic [15:0] model [6];
    addr = '0; wdata = '0; wr = 1'b0; rd = 1'b0; core_out = '0;
    repeat (2) @(posedge clk);
    #1;
    check(core_in == '0, "registers reset to zero");
    rst_n = 1'b1;
    for (int i = 0; i < 6; i++) model[i] = '0;
    for (int n = 0; n < 300; n++) begin
      automatic int a = $urandom_range(7);
      automatic logic [15:0] d = 16'($urandom);
      write(a, d);
      if (a < 6) model[a] = d;
      for (int p = 0; p < 3; p++)
        check(core_in[p] == {model[2*p], model[2*p+1]}, $sformatf("core_in[%0d] after write to %0d", p, a));
      // read side
      core_out[0] = $urandom;
      @(negedge clk);
      rd = 1'b0; addr = 3'($urandom_range(7)); #1;
      check(rdata == 16'd0 && !data_oe, "bus idle while rd is low");
      rd = 1'b1;
      for (int m = 0; m < 8; m++) begin
        addr = 3'(m); #1;
        check(data_oe, "output enable while rd");
        case (m)
          0: check(rdata == core_out[0][31:16], "m0 is upper half");
          1: check(rdata == core_out[0][15:0], "m1 is lower half");
          default: check(rdata == 16'd0, "unused read address returns zero");
        endcase
      end
      rd = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
