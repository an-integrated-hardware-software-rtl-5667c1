// Prototype hardware of the cosimulation environment's examples.
//
// Three independent prototypes stand side by side, each a hardware core
// behind its own generated hardware interface module and with its own bus
// ports; they share only the clock and reset inputs:
//
//   de_*   differential equation example: diffeq_core (t6 = u - 3*x*u*dx)
//          behind an E-channel interface with six 16-bit input registers
//          (u, dx, x, two words each) and a two-input read multiplexer (t6).
//   lz1_*  compression prototype on the E-channel: an LZ77 parsing unit with
//          a 16-symbol buffer. The buffer (LZ1_N 8-bit symbols) is written
//          as 32-bit ports, two 16-bit transfers each; the codeword word is
//          read back the same way.
//   lz2_*  compression prototype on the ISA bus: the same parsing unit with a
//          32-symbol buffer behind an ISA I/O interface.
//
// The sizes (16-bit transfers, 32-bit core ports, buffers of 16 and 32) are
// those of the examples. Core port layout: buffer symbol i of an LZ parser is
// bits [8*(i%4) +: 8] of core input port i/4. Timing of each bus is given in
// its interface module; each core's result is valid a few cycles after its
// last input word is written (two cycles for the differential equation core,
// one for the parsing units). The codeword of lz1 has only 14 significant
// bits, so bits 15:14 of lz1_ad_out are always zero.
module cosim_prototype_top #(
  parameter int unsigned LZ1_N  = 16,
  parameter int unsigned LZ2_N  = 32,
  parameter int unsigned SYM_W  = 8,
  parameter int unsigned PORT_W = if_pkg::CORE_PORT_W,
  parameter int unsigned BUS_W  = if_pkg::ECHAN_BUS_W,
  parameter int unsigned DE_AW  = if_pkg::addr_bits(if_pkg::n_regs(if_pkg::uniform(3, PORT_W), 3, BUS_W)),
  parameter int unsigned LZ1_IN = (LZ1_N * SYM_W) / PORT_W,
  parameter int unsigned LZ1_AW = if_pkg::addr_bits(if_pkg::n_regs(if_pkg::uniform(LZ1_IN, PORT_W), LZ1_IN, BUS_W)),
  parameter int unsigned LZ2_IN = (LZ2_N * SYM_W) / PORT_W,
  parameter int unsigned SA_W   = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  // differential equation prototype, E-channel
  input  logic              de_cs,
  input  logic              de_das,
  input  logic              de_read,
  output logic              de_rdy,
  input  logic [DE_AW-1:0]  de_spa,
  input  logic [BUS_W-1:0]  de_ad_in,
  output logic [BUS_W-1:0]  de_ad_out,
  output logic              de_ad_oe,
  // compression prototype 1, E-channel
  input  logic              lz1_cs,
  input  logic              lz1_das,
  input  logic              lz1_read,
  output logic              lz1_rdy,
  input  logic [LZ1_AW-1:0] lz1_spa,
  input  logic [BUS_W-1:0]  lz1_ad_in,
  output logic [BUS_W-1:0]  lz1_ad_out,
  output logic              lz1_ad_oe,
  // compression prototype 2, ISA bus
  input  logic [SA_W-1:0]   lz2_sa,
  input  logic              lz2_aen,
  input  logic              lz2_iow_n,
  input  logic              lz2_ior_n,
  output logic              lz2_iocs16_n,
  input  logic [BUS_W-1:0]  lz2_sd_in,
  output logic [BUS_W-1:0]  lz2_sd_out,
  output logic              lz2_sd_oe
);

  // ---------------- differential equation example ----------------
  logic [2:0][PORT_W-1:0] de_core_in;
  logic [0:0][PORT_W-1:0] de_core_out;

  hw_interface_module #(.BUS_W(BUS_W), .N_IN(3), .N_OUT(1),
                        .IN_W(if_pkg::uniform(3, PORT_W)), .OUT_W(if_pkg::uniform(1, PORT_W)),
                        .ADDR_W(DE_AW)) u_de_if (
    .clk, .rst_n,
    .e_cs(de_cs), .e_das(de_das), .e_read(de_read), .e_rdy(de_rdy),
    .spa(de_spa), .e_ad_in(de_ad_in), .e_ad_out(de_ad_out), .e_ad_oe(de_ad_oe),
    .core_in(de_core_in), .core_out(de_core_out)
  );

  diffeq_core #(.W(PORT_W)) u_de_core (
    .clk, .rst_n,
    .u(de_core_in[0]), .dx(de_core_in[1]), .x(de_core_in[2]),
    .t6(de_core_out[0])
  );

  // ---------------- compression prototype 1 (E-channel) ----------------
  logic [LZ1_IN-1:0][PORT_W-1:0] lz1_core_in;
  logic [0:0][PORT_W-1:0]        lz1_core_out;

  hw_interface_module #(.BUS_W(BUS_W), .N_IN(LZ1_IN), .N_OUT(1),
                        .IN_W(if_pkg::uniform(LZ1_IN, PORT_W)), .OUT_W(if_pkg::uniform(1, PORT_W)),
                        .ADDR_W(LZ1_AW)) u_lz1_if (
    .clk, .rst_n,
    .e_cs(lz1_cs), .e_das(lz1_das), .e_read(lz1_read), .e_rdy(lz1_rdy),
    .spa(lz1_spa), .e_ad_in(lz1_ad_in), .e_ad_out(lz1_ad_out), .e_ad_oe(lz1_ad_oe),
    .core_in(lz1_core_in), .core_out(lz1_core_out)
  );

  lz_parser #(.N(LZ1_N), .SYM_W(SYM_W), .RES_W(PORT_W)) u_lz1_core (
    .clk, .rst_n,
    .buf_in(lz1_core_in),
    .result(lz1_core_out[0])
  );

  // ---------------- compression prototype 2 (ISA) ----------------
  logic [LZ2_IN-1:0][PORT_W-1:0] lz2_core_in;
  logic [0:0][PORT_W-1:0]        lz2_core_out;

  isa_hw_interface_module #(.BUS_W(BUS_W), .N_IN(LZ2_IN), .N_OUT(1),
                            .IN_W(if_pkg::uniform(LZ2_IN, PORT_W)), .OUT_W(if_pkg::uniform(1, PORT_W)),
                            .SA_W(SA_W)) u_lz2_if (
    .clk, .rst_n,
    .sa(lz2_sa), .aen(lz2_aen), .iow_n(lz2_iow_n), .ior_n(lz2_ior_n),
    .iocs16_n(lz2_iocs16_n),
    .sd_in(lz2_sd_in), .sd_out(lz2_sd_out), .sd_oe(lz2_sd_oe),
    .core_in(lz2_core_in), .core_out(lz2_core_out)
  );

  lz_parser #(.N(LZ2_N), .SYM_W(SYM_W), .RES_W(PORT_W)) u_lz2_core (
    .clk, .rst_n,
    .buf_in(lz2_core_in),
    .result(lz2_core_out[0])
  );

endmodule
