// Protocol converter for the E-channel of an SBus DMA controller.
//
// The converter sits between the system bus and the signal register of a
// generated hardware interface. It watches the bus strobes (chip select,
// data strobe, read/write) and turns each bus access into one internal
// access: a single-cycle write pulse `wr` for a write, or a read enable `rd`
// held for as long as the data must stay on the bus. It answers every access
// with `e_rdy`, which stays high until the master drops its data strobe.
// Address and data go from the bus to the signal register directly; this
// block only makes the control signals.
//
// The signal names and the split of work (converter makes WR/RD, signal
// register holds data) follow the example interface. The strobe polarity
// (active high here), the three-state handshake and its cycle timing are
// this design's own choice, since the bus protocol itself is not specified.
//
// Timing, with strobes sampled on the rising clock edge:
//   edge 0  e_cs & e_das seen          -> state ACCESS
//   cycle 1 wr (write) or rd (read) high
//   edge 1                             -> state DONE, e_rdy high, rd held
//   e_das low seen                     -> back to IDLE
// A write therefore takes effect at edge 1 and e_rdy rises one cycle after
// the strobe was seen; read data is valid on the bus while e_rdy is high.
module echan_protocol_converter (
  input  logic clk,
  input  logic rst_n,
  // E-channel side
  input  logic e_cs,    // chip select
  input  logic e_das,   // data strobe of the current transfer
  input  logic e_read,  // 1: read from the device, 0: write to it
  output logic e_rdy,   // transfer acknowledged
  // Signal register side
  output logic wr,      // one-cycle write pulse
  output logic rd       // read enable, drives the data buffer
);

  typedef enum logic [1:0] {IDLE, ACCESS, DONE} state_t;
  state_t state;
  logic   is_read;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      is_read <= 1'b0;
    end else begin
      unique case (state)
        IDLE: if (e_cs && e_das) begin
          state   <= ACCESS;
          is_read <= e_read;
        end
        ACCESS: state <= DONE;
        DONE:   if (!e_das) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    wr    = (state == ACCESS) && !is_read;
    rd    = (state inside {ACCESS, DONE}) && is_read;
    e_rdy = (state == DONE);
  end

  // A write and a read never happen together.
  assert property (@(posedge clk) disable iff (!rst_n) !(wr && rd));
  // The master holds its strobe until the access is acknowledged.
  assert property (@(posedge clk) disable iff (!rst_n) (state == ACCESS) |-> e_das);

endmodule
