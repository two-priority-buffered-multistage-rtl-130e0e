// min_pkg: constants and helper functions shared by the dual priority
// multistage interconnection network (MIN).
//
// The network is a delta-2 network: n stages of N/2 2x2 switching elements
// (SEs), N = 2**n. A packet word is {destination address, payload}; the
// destination address has n bits. Links of one stage are numbered
// l = 2*j + p, where j is the SE index in the stage and p its port (0 or 1).
//
// Interstage wiring: between stage s and stage s+1 (stages counted 1..n)
// output link l feeds input link l with bit 0 and bit (n-s) exchanged. This is
// the wiring drawn for the 8x8 example (stage 1 SE j paired with SE j+2,
// stage 2 SE j paired with SE j+1), generalised to any n. With this wiring a
// packet is self-routed by using destination bit (n-s) at stage s, i.e. the
// most significant address bit first; after the last stage the output link
// index equals the destination address.
package min_pkg;

  // Priority class of a packet on a link or in a queue.
  typedef enum logic {
    PRIO_LOW  = 1'b0,
    PRIO_HIGH = 1'b1
  } prio_e;

  // Input link, at stage s+1, fed by output link l of stage s (s = 1..n-1).
  function automatic int unsigned next_link(int unsigned n, int unsigned s,
                                            int unsigned l);
    int unsigned b;
    int unsigned lo;
    int unsigned hi;
    b  = n - s;
    lo = l & 1;
    hi = (l >> b) & 1;
    return (l & ~((32'd1 << b) | 32'd1)) | (lo << b) | hi;
  endfunction

  // Destination address bit that steers a packet at stage s (s = 1..n).
  function automatic int unsigned route_bit(int unsigned n, int unsigned s);
    return n - s;
  endfunction

  // Non-zero 16-bit LFSR seed for SE number idx of the whole network.
  function automatic logic [15:0] se_seed(logic [15:0] base, int unsigned idx);
    logic [15:0] v;
    v = base ^ 16'(idx * 40503) ^ 16'(idx << 7);
    return (v == 16'd0) ? 16'h0001 : v;
  endfunction

endpackage
