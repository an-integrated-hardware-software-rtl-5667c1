// Generated hardware interface module for an E-channel system bus.
//
// It joins a protocol converter and a signal register: the converter turns
// the bus strobes into write/read commands, and the signal register holds
// the words that pass between the host and the hardware core. The bus
// address lines go straight to the signal register's decoder and the bus
// data lines straight to its registers and from its output buffer, as in the
// example interface. The bidirectional bus data lines are split into
// e_ad_in, e_ad_out and the buffer enable e_ad_oe. The core ports are flat
// vectors, port 0 in the lowest bits, with the widths listed in IN_W and
// OUT_W; the signal register lays its registers out by the allocation rule.
//
// One bus access: the master sets spa, e_read and (for a write) e_ad_in,
// raises e_cs and e_das, waits for e_rdy, takes e_ad_out on a read, and drops
// e_das. Address and write data must stay stable until e_rdy. The write
// lands in its register one cycle after the strobe is sampled.
module hw_interface_module #(
  parameter int unsigned BUS_W     = if_pkg::ECHAN_BUS_W,
  parameter int unsigned N_IN      = 3,
  parameter int unsigned N_OUT     = 1,
  parameter bit          MSW_FIRST = 1'b1,
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
  // E-channel
  input  logic                          e_cs,
  input  logic                          e_das,
  input  logic                          e_read,
  output logic                          e_rdy,
  input  logic [ADDR_W-1:0]             spa,
  input  logic [BUS_W-1:0]              e_ad_in,
  output logic [BUS_W-1:0]              e_ad_out,
  output logic                          e_ad_oe,
  // hardware core
  output logic [IN_TOTAL-1:0]           core_in,
  input  logic [OUT_TOTAL-1:0]          core_out
);

  logic wr, rd;

  echan_protocol_converter u_conv (
    .clk, .rst_n,
    .e_cs, .e_das, .e_read, .e_rdy,
    .wr, .rd
  );

  signal_register #(
    .BUS_W(BUS_W), .N_IN(N_IN), .N_OUT(N_OUT), .IN_W(IN_W), .OUT_W(OUT_W),
    .MSW_FIRST(MSW_FIRST), .N_REGS(N_REGS), .N_MUX(N_MUX), .ADDR_W(ADDR_W),
    .IN_TOTAL(IN_TOTAL), .OUT_TOTAL(OUT_TOTAL)
  ) u_sreg (
    .clk, .rst_n,
    .addr(spa), .wdata(e_ad_in), .wr, .rd,
    .rdata(e_ad_out), .data_oe(e_ad_oe),
    .core_in, .core_out
  );

  // The address must not change while an access is in flight.
  logic busy_q;
  logic [ADDR_W-1:0] spa_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      spa_q  <= '0;
    end else begin
      busy_q <= e_cs && e_das && !e_rdy;
      spa_q  <= spa;
    end
  end
  assert property (@(posedge clk) disable iff (!rst_n)
                   (busy_q && e_cs && e_das && !e_rdy) |-> (spa == spa_q));

endmodule
