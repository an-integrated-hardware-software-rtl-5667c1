// Hardware core of the differential equation example.
//
// The solver of y'' + 3xy' + 3y = 0 is split between software and
// hardware; the hardware part takes u, dx and x and returns
//   t1 = u * dx,  t2 = 3 * x,  t4 = t1 * t2,  t6 = u - t4,
// all in 32-bit two's-complement integers (products keep their low 32 bits,
// as C int arithmetic does). The operations and their names follow the
// hardware data-flow graph of the example; the order of the subtraction
// (u minus the product) is that of the classic solver loop.
//
// The core is free running: it is a two-stage pipeline, so t6 reflects the
// inputs present two rising clock edges earlier. Stage 1 holds t1, t2 and u;
// stage 2 holds t6. The pipelining and reset to zero are this design's own
// choice. The host reads t6 many cycles after its last write, so no
// handshake with the interface is needed.
module diffeq_core #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] u,
  input  logic [W-1:0] dx,
  input  logic [W-1:0] x,
  output logic [W-1:0] t6
);

  logic [W-1:0] t1_q, t2_q, u_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t1_q <= '0;
      t2_q <= '0;
      u_q  <= '0;
      t6   <= '0;
    end else begin
      t1_q <= u * dx;
      t2_q <= W'(3) * x;
      u_q  <= u;
      t6   <= u_q - t1_q * t2_q;
    end
  end

endmodule
