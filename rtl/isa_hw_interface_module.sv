// Generated hardware interface module for an ISA-bus I/O slave.
//
// Same structure as the E-channel interface: a protocol converter, here for
// ISA I/O cycles, in front of a signal register that holds the words passed
// between the host and the hardware core. The low ADDR_W address lines go to
// the signal register's decoder, the upper ones are matched against the
// board's base address by the converter. The bidirectional data lines SD are
// split into sd_in, sd_out and the buffer enable sd_oe. Core ports are flat
// vectors as in the E-channel interface.
//
// One access: the host puts an I/O address and (for a write) data on the
// bus, pulls iow_n or ior_n low for at least three clock periods, and
// releases it. A write lands in its register two to three clock cycles after
// iow_n falls; read data follows the address combinationally while ior_n is
// low.
module isa_hw_interface_module #(
  parameter int unsigned BUS_W     = 16,
  parameter int unsigned N_IN      = 8,
  parameter int unsigned N_OUT     = 1,
  parameter bit          MSW_FIRST = 1'b0,
  parameter int unsigned SA_W      = 10,
  parameter logic [SA_W-1:0] BASE  = 10'h300,
  parameter if_pkg::width_list_t IN_W  = if_pkg::uniform(N_IN, if_pkg::CORE_PORT_W),
  parameter if_pkg::width_list_t OUT_W = if_pkg::uniform(N_OUT, if_pkg::CORE_PORT_W),
  parameter int unsigned N_REGS    = if_pkg::n_regs(IN_W, N_IN, BUS_W),
  parameter int unsigned N_MUX     = if_pkg::n_regs(OUT_W, N_OUT, BUS_W),
  parameter int unsigned ADDR_W    = if_pkg::addr_bits(N_REGS > N_MUX ? N_REGS : N_MUX),
  parameter int unsigned IN_TOTAL  = if_pkg::total_width(IN_W, N_IN),
  parameter int unsigned OUT_TOTAL = if_pkg::total_width(OUT_W, N_OUT)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // ISA bus
  input  logic [SA_W-1:0]               sa,
  input  logic                          aen,
  input  logic                          iow_n,
  input  logic                          ior_n,
  output logic                          iocs16_n,
  input  logic [BUS_W-1:0]              sd_in,
  output logic [BUS_W-1:0]              sd_out,
  output logic                          sd_oe,
  // hardware core
  output logic [IN_TOTAL-1:0]           core_in,
  input  logic [OUT_TOTAL-1:0]          core_out
);

  logic wr, rd;
  logic unused_oe;

  isa_protocol_converter #(.SA_W(SA_W), .ADDR_W(ADDR_W), .BASE(BASE)) u_conv (
    .clk, .rst_n,
    .sa, .aen, .iow_n, .ior_n, .iocs16_n, .sd_oe,
    .wr, .rd
  );

  signal_register #(
    .BUS_W(BUS_W), .N_IN(N_IN), .N_OUT(N_OUT), .IN_W(IN_W), .OUT_W(OUT_W),
    .MSW_FIRST(MSW_FIRST), .N_REGS(N_REGS), .N_MUX(N_MUX), .ADDR_W(ADDR_W),
    .IN_TOTAL(IN_TOTAL), .OUT_TOTAL(OUT_TOTAL)
  ) u_sreg (
    .clk, .rst_n,
    .addr(sa[ADDR_W-1:0]), .wdata(sd_in), .wr, .rd,
    .rdata(sd_out), .data_oe(unused_oe),
    .core_in, .core_out
  );

endmodule
