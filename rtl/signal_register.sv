// Signal register of a generated hardware interface.
//
// It holds the data passed between the host and a hardware core. The core's
// input ports are fed from bus-wide registers (r0, r1, ...) that the host
// loads one transfer at a time; its output ports are cut into bus-wide words
// (m0, m1, ...) that a read multiplexer returns to the host. An address
// decoder picks the register to load on `wr` or the multiplexer input to
// return on `rd`; a buffer puts the selected word on the bus only while `rd`
// is high (`data_oe`).
//
// Which bits of which register serve which port is set by the register
// allocation rule (see if_pkg::alloc): wide ports take whole registers, one
// per transfer, and a last part narrower than the bus shares a register with
// other narrow parts, first fit. Registers and multiplexer inputs are
// allocated separately. With the defaults (three 32-bit inputs, one 32-bit
// output, 16-bit bus) this gives the example interface: r0..r5 feed u, dx
// and x two words each, and m0/m1 return the two halves of t6. The rule,
// the component set (registers, multiplexer, decoder, buffer) and that
// example follow the interface generator; the following are this design's
// own choices:
//   * register i is at write address i, multiplexer input j at read address
//     j (write and read addresses are separate spaces);
//   * a port's words are in transfer order: whole registers first, shared
//     part last; with MSW_FIRST = 1 the first word is the most significant,
//     as for a big-endian host splitting an int into two shorts, with
//     MSW_FIRST = 0 the least significant;
//   * registers reset to zero; writes to unused addresses are ignored and
//     reads from them, or from unallocated bits, return zero;
//   * the three-state buffer is modelled as data plus output enable;
//   * the core ports are flat vectors, port 0 in the lowest bits.
// Registers load on the rising edge where `wr` is high; read data is
// combinational from `addr` while `rd` is high.
module signal_register #(
  parameter int unsigned BUS_W     = if_pkg::ECHAN_BUS_W,
  parameter int unsigned N_IN      = 3,   // core input ports (registers side)
  parameter int unsigned N_OUT     = 1,   // core output ports (multiplexer side)
  parameter if_pkg::width_list_t IN_W  = if_pkg::uniform(N_IN, if_pkg::CORE_PORT_W),
  parameter if_pkg::width_list_t OUT_W = if_pkg::uniform(N_OUT, if_pkg::CORE_PORT_W),
  parameter bit          MSW_FIRST = 1'b1,
  parameter int unsigned N_REGS    = if_pkg::n_regs(IN_W, N_IN, BUS_W),
  parameter int unsigned N_MUX     = if_pkg::n_regs(OUT_W, N_OUT, BUS_W),
  parameter int unsigned ADDR_W    = if_pkg::addr_bits(N_REGS > N_MUX ? N_REGS : N_MUX),
  parameter int unsigned IN_TOTAL  = if_pkg::total_width(IN_W, N_IN),
  parameter int unsigned OUT_TOTAL = if_pkg::total_width(OUT_W, N_OUT)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // bus side
  input  logic [ADDR_W-1:0]    addr,
  input  logic [BUS_W-1:0]     wdata,
  input  logic                 wr,
  input  logic                 rd,
  output logic [BUS_W-1:0]     rdata,
  output logic                 data_oe,
  // core side
  output logic [IN_TOTAL-1:0]  core_in,
  input  logic [OUT_TOTAL-1:0] core_out
);

  import if_pkg::*;

  initial begin
    assert (N_IN <= MAX_PORTS && N_OUT <= MAX_PORTS)
      else $fatal(1, "signal_register: too many ports");
  end

  logic [BUS_W-1:0] regs [N_REGS];

  // Registers r0..r(N_REGS-1), loaded through the address decoder.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_REGS; i++) regs[i] <= '0;
    end else begin
      for (int i = 0; i < N_REGS; i++)
        if (wr && (32'(addr) == i)) regs[i] <= wdata;
    end
  end

  // Register bits bound to the core input ports.
  for (genvar p = 0; p < N_IN; p++) begin : g_in
    localparam int unsigned PW  = IN_W[p];
    localparam int unsigned OFF = port_offset(IN_W, p);
    localparam int unsigned FB  = alloc(IN_W, N_IN, BUS_W, p, F_FULL_BASE);
    localparam int unsigned NF  = alloc(IN_W, N_IN, BUS_W, p, F_N_FULL);
    localparam int unsigned FR  = alloc(IN_W, N_IN, BUS_W, p, F_FRAG_REG);
    localparam int unsigned FO  = alloc(IN_W, N_IN, BUS_W, p, F_FRAG_OFF);
    localparam int unsigned FL  = alloc(IN_W, N_IN, BUS_W, p, F_FRAG_LEN);
    logic [PW-1:0] v;
    for (genvar k = 0; k < NF; k++) begin : g_full
      if (MSW_FIRST) begin : g_msw
        assign v[PW-1-k*BUS_W -: BUS_W] = regs[FB+k];
      end else begin : g_lsw
        assign v[k*BUS_W +: BUS_W] = regs[FB+k];
      end
    end
    if (MSW_FIRST) begin : g_frag_msw
      assign v[FL-1:0] = regs[FR][FO +: FL];
    end else begin : g_frag_lsw
      assign v[PW-1 -: FL] = regs[FR][FO +: FL];
    end
    assign core_in[OFF +: PW] = v;
  end

  // Core output ports cut into multiplexer inputs m0..m(N_MUX-1). Each port
  // contributes its bits to its own words and zeros elsewhere.
  logic [BUS_W-1:0] contrib [N_OUT][N_MUX];
  for (genvar q = 0; q < N_OUT; q++) begin : g_out
    localparam int unsigned PW  = OUT_W[q];
    localparam int unsigned OFF = port_offset(OUT_W, q);
    localparam int unsigned FB  = alloc(OUT_W, N_OUT, BUS_W, q, F_FULL_BASE);
    localparam int unsigned NF  = alloc(OUT_W, N_OUT, BUS_W, q, F_N_FULL);
    localparam int unsigned FR  = alloc(OUT_W, N_OUT, BUS_W, q, F_FRAG_REG);
    localparam int unsigned FO  = alloc(OUT_W, N_OUT, BUS_W, q, F_FRAG_OFF);
    localparam int unsigned FL  = alloc(OUT_W, N_OUT, BUS_W, q, F_FRAG_LEN);
    logic [PW-1:0] v;
    logic [FL-1:0] frag;
    assign v    = core_out[OFF +: PW];
    assign frag = MSW_FIRST ? v[FL-1:0] : v[PW-1 -: FL];
    for (genvar j = 0; j < N_MUX; j++) begin : g_word
      if (j >= FB && j < FB + NF) begin : g_full
        if (MSW_FIRST) begin : g_msw
          assign contrib[q][j] = v[PW-1-(j-FB)*BUS_W -: BUS_W];
        end else begin : g_lsw
          assign contrib[q][j] = v[(j-FB)*BUS_W +: BUS_W];
        end
      end else if (j == FR) begin : g_frag
        assign contrib[q][j] = BUS_W'(frag) << FO;
      end else begin : g_none
        assign contrib[q][j] = '0;
      end
    end
  end

  // Read multiplexer and output buffer.
  always_comb begin
    rdata = '0;
    for (int j = 0; j < N_MUX; j++)
      if (rd && (32'(addr) == j))
        for (int q = 0; q < N_OUT; q++) rdata = rdata | contrib[q][j];
    data_oe = rd;
  end

endmodule
