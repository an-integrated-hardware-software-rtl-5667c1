// Protocol converter for an ISA-bus I/O slave.
//
// The interface of the second compression prototype sits on the ISA bus of
// a PC. This converter decodes the I/O address against the board's base
// address and turns the bus I/O strobes into the signal register's commands:
// a one-cycle `wr` pulse per I/O write and a level `rd` for as long as the
// I/O read strobe is low. While the board is selected it drives `iocs16_n`
// low to announce 16-bit transfers, and `sd_oe` enables its data buffer during
// a read.
//
// Only the use of an ISA bus comes from the prototype description; the
// signal set is that of a standard ISA I/O cycle, and the timing below is
// this design's own choice.
//
// Timing: the strobes are sampled on each rising clock edge. `wr` rises at
// the second edge in a row at which iow_n is sampled low, so the bus data has
// settled for a full clock period, and stays high for one cycle; the register
// loads at the third edge. iow_n must therefore stay low across three rising
// edges, with address and data stable.
// `rd` and `sd_oe` follow ior_n combinationally. Cycles with aen high (DMA)
// are ignored. The low ADDR_W address lines are not used here: they go to
// the signal register's decoder.
module isa_protocol_converter #(
  parameter int unsigned SA_W   = 10,       // ISA I/O address lines used
  parameter int unsigned ADDR_W = 4,        // register address bits inside the board
  parameter logic [SA_W-1:0] BASE = 10'h300 // board base address, aligned to 2**ADDR_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [SA_W-1:0] sa,
  input  logic            aen,
  input  logic            iow_n,
  input  logic            ior_n,
  output logic            iocs16_n,
  output logic            sd_oe,
  output logic            wr,
  output logic            rd
);

  logic sel;
  logic       iow_seen;   // iow_n low (and board selected) at the last edge
  logic       wr_done;    // write of the current strobe already issued

  assign sel = !aen && (sa[SA_W-1:ADDR_W] == BASE[SA_W-1:ADDR_W]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iow_seen <= '0;
      wr_done  <= 1'b0;
      wr       <= 1'b0;
    end else begin
      iow_seen <= sel && !iow_n;
      wr       <= iow_seen && sel && !iow_n && !wr_done && !wr;
      if (iow_n)   wr_done <= 1'b0;
      else if (wr) wr_done <= 1'b1;
    end
  end

  always_comb begin
    rd       = sel && !ior_n;
    sd_oe    = rd;
    iocs16_n = !sel;
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(wr && rd));

endmodule
