// Parsing unit of a Lempel-Ziv (LZ77) compressor.
//
// The compressor keeps a buffer of N symbols: the first N-LA are already
// coded (the search part), the last LA are still to be coded (the
// lookahead). The parsing step finds the longest prefix of the lookahead that
// also starts at some position of the search part, the copy being allowed to
// run on into the lookahead. It returns the codeword fields
//   pointer  start position of that match in the search part,
//   length   its length, at most LA-1,
//   symbol   the lookahead symbol right after the match,
// so that the host can emit (pointer, length, symbol) and shift the buffer by
// length+1. Buffer update, coding and file handling stay with the host.
//
// The split of work (hardware parses, host does the rest) and the buffer
// size N = 16 follow the compression prototype; the lookahead length N/2,
// 8-bit symbols, the tie rule (lowest pointer wins) and the packing of the
// result word are this design's own choices.
//
// How it works: for every search position all LA-1 symbol pairs are
// compared at once; the match length of a position is the count of leading
// equal pairs; a priority search picks the longest. All of this is
// combinational and the result word is registered, so `result` reflects the
// buffer present one rising edge earlier.
//
// Buffer symbol i is buf_in[i]; symbol 0 is the oldest. Result word, from
// bit 0 up: symbol (SYM_W bits), length (LEN_W bits), pointer (PTR_W bits),
// zeros above (the result travels through a 32-bit core port, so with the
// default sizes its upper 18 bits are constant zero).
module lz_parser #(
  parameter int unsigned N      = 16,
  parameter int unsigned LA     = N / 2,
  parameter int unsigned SYM_W  = 8,
  parameter int unsigned RES_W  = 32,
  parameter int unsigned PTR_W  = (N - LA) <= 2 ? 1 : $clog2(N - LA),
  parameter int unsigned LEN_W  = $clog2(LA)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [N-1:0][SYM_W-1:0]   buf_in,
  output logic [RES_W-1:0]          result
);

  localparam int unsigned NS = N - LA;   // search positions

  initial begin
    assert (PTR_W + LEN_W + SYM_W <= RES_W)
      else $fatal(1, "lz_parser: result fields do not fit in RES_W bits");
  end

  logic [PTR_W-1:0] best_ptr;
  logic [LEN_W-1:0] best_len;
  logic [SYM_W-1:0] next_sym;

  always_comb begin
    logic [LEN_W-1:0] len;
    logic             run;
    best_ptr = '0;
    best_len = '0;
    for (int i = 0; i < NS; i++) begin
      len = '0;
      run = 1'b1;
      for (int k = 0; k < LA - 1; k++) begin
        run = run && (buf_in[i + k] == buf_in[NS + k]);
        if (run) len = len + 1'b1;
      end
      if (len > best_len) begin
        best_len = len;
        best_ptr = PTR_W'(i);
      end
    end
    next_sym = buf_in[NS + 32'(best_len)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) result <= '0;
    else        result <= RES_W'({best_ptr, best_len, next_sym});
  end

endmodule
