// lookup_pkg: constants, types and the logical-to-physical stage mapping
// shared by the k-multibit trie lookup engines.
//
// Table entry format (both engines): an entry is M+1 bits wide, the most
// significant bit is is_pointer and the low M bits are result/pointer. With
// is_pointer = 1 the low bits are the index of a 2^k-entry chunk in the next
// stage's memory; with is_pointer = 0 they are the lookup result (action
// pointer / output port). The default sizes W = 32, k = 4, m = 15 are the IPv4
// configuration worked out for the largest evaluated table; everything else
// here (the scheme encoding, the stride encoding) is this design's own choice.
package lookup_pkg;

  // Address width W, stride k and result/pointer width m of the main design.
  localparam int unsigned ADDR_W  = 32;
  localparam int unsigned STRIDE  = 4;
  localparam int unsigned PTR_W   = 15;

  // Hardware multiplexing schemes of the multiplexed engine. With a reuse
  // factor R = 2 "mirroring" folds the path once (p0..pP-1, pP-1..p0); with
  // R = 4 the same rule folds it three times, which is "double mirroring".
  typedef enum logic [1:0] {
    SCHEME_MIRROR = 2'd0,
    SCHEME_SERIAL = 2'd1,
    SCHEME_LOOP   = 2'd2
  } mux_scheme_e;

  // Input-multiplexer source of a physical stage.
  typedef enum logic [1:0] {
    SRC_PREV = 2'd0,  // stage p-1, or the new lookup for stage 0
    SRC_SELF = 2'd1,  // own output (serial reuse, fold points)
    SRC_NEXT = 2'd2,  // stage p+1 (return path of mirroring)
    SRC_WRAP = 2'd3   // last stage back to stage 0 (full loops)
  } mux_src_e;

  // Physical stage that executes logical stage l for a scheme, P physical
  // stages and reuse factor R = 2**rshift (the engine holds W/k = P*R
  // logical stages). With R = 1 every scheme maps l to l.
  function automatic int unsigned phys_of(mux_scheme_e scheme, int unsigned rshift,
                                          int unsigned p_count, int unsigned l);
    int unsigned seg, off;
    seg = l / p_count;
    off = l % p_count;
    unique case (scheme)
      SCHEME_MIRROR: return seg[0] ? (p_count - 1 - off) : off;
      SCHEME_SERIAL: return l >> rshift;
      default:       return off;
    endcase
  endfunction

endpackage
