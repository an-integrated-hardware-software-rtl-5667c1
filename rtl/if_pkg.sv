// Shared types, constants and elaboration-time helpers for the generated
// hardware interface modules.
//
// The signal register of an interface is laid out by the register allocation
// rule of the interface generator, which the functions below replay at
// elaboration time. Ports are handled in order. A port wider than one bus
// transfer (W bits) takes fresh W-bit registers, one per transfer, until at
// most W bits remain. The remaining `rem` bits then go into the first
// register that still has `rem` free bits (first fit, lowest register
// first); if there is none, a fresh register is opened and its unused upper
// bits are left free for later ports. A remainder of exactly W bits always
// takes a fresh register. For ports that are multiples of W wide, as in the
// example interfaces, this gives each port consecutive whole registers.
//
// Every port p is then described by:
//   full_base(p), n_full(p)     its whole registers, in transfer order
//   frag_reg(p), frag_off(p)    the register and bit offset of its last part
//   frag_len(p)                 the width of that part (1..W)
// The same rule, on its own pool, lays out the read-multiplexer inputs that
// the core output ports are cut into.
package if_pkg;

  // Width of one E-channel data transfer (16 bits in the example interface).
  localparam int unsigned ECHAN_BUS_W = 16;
  // Width of every core port in the examples: all data-flow edges are 32-bit integers.
  localparam int unsigned CORE_PORT_W = 32;
  // Most ports one signal register can serve.
  localparam int unsigned MAX_PORTS = 32;

  typedef int unsigned width_list_t [MAX_PORTS];

  // Field selectors for alloc().
  typedef enum int unsigned {
    F_FULL_BASE, F_N_FULL, F_FRAG_REG, F_FRAG_OFF, F_FRAG_LEN, F_N_REGS
  } alloc_field_e;

  // Replay the allocation of ports 0..n-1 of widths w on a bus of bus_w bits
  // and return one field of port p (or, for F_N_REGS, the register count).
  function automatic int unsigned alloc(width_list_t w, int unsigned n, int unsigned bus_w,
                                        int unsigned p, alloc_field_e f);
    int unsigned free_off [MAX_PORTS];   // per open register: first free bit
    int unsigned free_reg [MAX_PORTS];
    int unsigned n_open = 0;
    int unsigned next_reg = 0;
    for (int unsigned i = 0; i < n; i++) begin
      int unsigned nf   = (w[i] - 1) / bus_w;
      int unsigned rem  = w[i] - nf * bus_w;
      int unsigned base = next_reg;
      int unsigned freg = 0, foff = 0;
      bit          found = 1'b0;
      next_reg += nf;
      if (rem < bus_w) begin
        for (int unsigned j = 0; j < n_open; j++) begin
          if (!found && (bus_w - free_off[j] >= rem)) begin
            found = 1'b1;
            freg  = free_reg[j];
            foff  = free_off[j];
            free_off[j] += rem;
          end
        end
      end
      if (!found) begin
        freg = next_reg;
        foff = 0;
        next_reg++;
        if (rem < bus_w) begin
          free_reg[n_open] = freg;
          free_off[n_open] = rem;
          n_open++;
        end
      end
      if (i == p) begin
        case (f)
          F_FULL_BASE: return base;
          F_N_FULL:    return nf;
          F_FRAG_REG:  return freg;
          F_FRAG_OFF:  return foff;
          F_FRAG_LEN:  return rem;
          default:     ;
        endcase
      end
    end
    return next_reg;
  endfunction

  // Number of registers the allocation uses for ports 0..n-1.
  function automatic int unsigned n_regs(width_list_t w, int unsigned n, int unsigned bus_w);
    return alloc(w, n, bus_w, MAX_PORTS, F_N_REGS);
  endfunction

  // Bit offset of port p in a flat vector holding ports 0..n-1, port 0 lowest.
  function automatic int unsigned port_offset(width_list_t w, int unsigned p);
    int unsigned s = 0;
    for (int unsigned i = 0; i < p; i++) s += w[i];
    return s;
  endfunction

  // Total width of ports 0..n-1.
  function automatic int unsigned total_width(width_list_t w, int unsigned n);
    return port_offset(w, n);
  endfunction

  // Address bits needed to select one of `n` registers (at least one bit).
  function automatic int unsigned addr_bits(int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

  // Width list with the first n entries equal to `width` (rest zero).
  function automatic width_list_t uniform(int unsigned n, int unsigned width);
    width_list_t w;
    for (int unsigned i = 0; i < MAX_PORTS; i++) w[i] = (i < n) ? width : 0;
    return w;
  endfunction

endpackage
