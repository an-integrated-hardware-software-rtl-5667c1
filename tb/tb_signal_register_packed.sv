// Self-checking testbench for the register allocation of signal_register
// with ports of mixed widths on a 16-bit bus: inputs of 8, 40, 8 and 16
// bits, outputs of 24 and 8 bits. Worked out by hand from the allocation
// rule, the layout is
//   in0  (8)  = r0[7:0]
//   in1  (40) = r1, r2 (whole) + r0[15:8] (shares r0 with in0)
//   in2  (8)  = r3[7:0]
//   in3  (16) = r4
//   out0 (24) = m0 (whole) + m1[7:0]
//   out1 (8)  = m1[15:8]     (shares m1 with out0)
// Two instances check both word orders: with the first word most
// significant, in1 = {r1, r2, r0[15:8]} and out0 = {m0, m1[7:0]}; with the
// first word least significant, in1 = {r0[15:8], r2, r1} and
// out0 = {m1[7:0], m0}. Random writes and reads compare every port and
// every multiplexer word with these expressions.
module tb_signal_register_packed;
  localparam if_pkg::width_list_t IW = '{0: 8, 1: 40, 2: 8, 3: 16, default: 0};
  localparam if_pkg::width_list_t OW = '{0: 24, 1: 8, default: 0};
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [2:0] addr;
  logic [15:0] wdata;
  logic wr, rd;
  logic [15:0] rdata_m, rdata_l;
  logic oe_m, oe_l;
  logic [71:0] in_m, in_l;
  logic [31:0] core_out;
  int checks = 0, failures = 0;

  signal_register #(.N_IN(4), .N_OUT(2), .IN_W(IW), .OUT_W(OW), .MSW_FIRST(1'b1)) dut_m (
    .clk, .rst_n, .addr, .wdata, .wr, .rd, .rdata(rdata_m), .data_oe(oe_m),
    .core_in(in_m), .core_out);
  signal_register #(.N_IN(4), .N_OUT(2), .IN_W(IW), .OUT_W(OW), .MSW_FIRST(1'b0)) dut_l (
    .clk, .rst_n, .addr, .wdata, .wr, .rd, .rdata(rdata_l), .data_oe(oe_l),
    .core_in(in_l), .core_out);

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

  initial begin
    logic [15:0] r [8];
    logic [23:0] o0;
    logic [7:0]  o1;
    addr = '0; wdata = '0; wr = 1'b0; rd = 1'b0; core_out = '0;
    for (int i = 0; i < 8; i++) r[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      automatic int a = $urandom_range(7);
      automatic logic [15:0] d = 16'($urandom);
      @(negedge clk);
      addr = 3'(a); wdata = d; wr = 1'b1;
      @(negedge clk);
      wr = 1'b0;
      if (a < 5) r[a] = d;
      check(in_m == {r[4], r[3][7:0], r[1], r[2], r[0][15:8], r[0][7:0]}, "input ports, first word most significant");
      check(in_l == {r[4], r[3][7:0], r[0][15:8], r[2], r[1], r[0][7:0]}, "input ports, first word least significant");
      o0 = 24'($urandom);
      o1 = 8'($urandom);
      core_out = {o1, o0};
      rd = 1'b1;
      for (int m = 0; m < 8; m++) begin
        addr = 3'(m); #1;
        check(oe_m && oe_l, "buffer enabled during read");
        case (m)
          0: begin
            check(rdata_m == o0[23:8], "m0, msw first");
            check(rdata_l == o0[15:0], "m0, lsw first");
          end
          1: begin
            check(rdata_m == {o1, o0[7:0]}, "m1 shared, msw first");
            check(rdata_l == {o1, o0[23:16]}, "m1 shared, lsw first");
          end
          default: check(rdata_m == 16'd0 && rdata_l == 16'd0, "unused read address");
        endcase
      end
      rd = 1'b0; #1;
      check(!oe_m && !oe_l && rdata_m == 16'd0, "bus released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
