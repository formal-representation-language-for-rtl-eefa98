// puf_pkg: types and constants shared by the PUF constructions.
//
// Every delay-based PUF here is modelled at the level of edge arrival times: the wires
// of a delay chain carry the time (in integer delay units) at which the rising launch
// edge reaches them, and an arbiter compares two such times. Process variation is
// represented by a per-instance SEED parameter: sw_delay() and ro_delay() hash the seed and the
// index of a gate input into a fixed delay NOM + [0, 2^VAR_BITS). The construction of
// the PUFs follows the structural descriptions they come from; the hash, the delay
// ranges and the arrival-time encoding are this model's own choices.
package puf_pkg;

  // Width of an arrival time. A 64-stage chain of at most 131-unit stages needs 14 bits.
  localparam int unsigned TW = 20;
  typedef logic [TW-1:0] arr_t;

  // Delay of one mux input of a switch stage: 100..131 units.
  localparam int unsigned SW_NOM      = 100;
  localparam int unsigned SW_VAR_BITS = 5;
  // Delay of one inverter of a ring oscillator, counted in clock cycles: 4..7.
  localparam int unsigned RO_NOM      = 4;
  localparam int unsigned RO_VAR_BITS = 2;
  // Clock-to-output delay of a Pico-PUF arbiter, counted in clock cycles: 4..19.
  localparam int unsigned PICO_NOM      = 4;
  localparam int unsigned PICO_VAR_BITS = 4;
  // Clock cycles from the first enable to a settled Pico-PUF latch (worst case).
  localparam int unsigned PICO_SETTLE   = PICO_NOM + (1 << PICO_VAR_BITS) + 2;

  // 32-bit integer hash (multiply / xor-shift finaliser) of a seed and an index.
  function automatic logic [31:0] puf_hash(input logic [31:0] seed, input logic [31:0] idx);
    logic [31:0] h;
    h = (seed * 32'h9E37_79B1) ^ ((idx + 32'h7F4A_7C15) * 32'h85EB_CA77);
    h = h ^ (h >> 15);
    h = h * 32'h2C1B_3C6D;
    h = h ^ (h >> 12);
    h = h * 32'h297A_2D39;
    h = h ^ (h >> 15);
    return h;
  endfunction

  // Delay of switch stage `stage` (1-based), mux input `path` (0..3):
  // 0: top output from top input, 1: top output from bottom input,
  // 2: bottom output from bottom input, 3: bottom output from top input.
  function automatic int unsigned sw_delay(input logic [31:0] seed, input int unsigned stage,
                                           input int unsigned path);
    logic [31:0] h;
    h = puf_hash(seed, stage * 4 + path);
    return SW_NOM + int'(h & ((32'd1 << SW_VAR_BITS) - 1));
  endfunction

  // Delay of inverter `idx` (alternative `alt`) of a ring oscillator, in clock cycles.
  function automatic int unsigned ro_delay(input logic [31:0] seed, input int unsigned idx,
                                           input int unsigned alt);
    logic [31:0] h;
    h = puf_hash(seed ^ 32'h5A5A_0000, idx * 2 + alt);
    return RO_NOM + int'(h & ((32'd1 << RO_VAR_BITS) - 1));
  endfunction

  // Clock-to-output delay of arbiter `k` (0 or 1) of a Pico-PUF cell, in clock cycles.
  function automatic int unsigned pico_delay(input logic [31:0] seed, input int unsigned k);
    logic [31:0] h;
    h = puf_hash(seed ^ 32'h3C3C_0000, k);
    return PICO_NOM + int'(h & ((32'd1 << PICO_VAR_BITS) - 1));
  endfunction

  // Seed of child instance `i` of a construction whose own seed is `seed`.
  function automatic logic [31:0] child_seed(input logic [31:0] seed, input int unsigned i);
    return seed * 32'd37 + 32'(i) + 32'd1;
  endfunction

endpackage
