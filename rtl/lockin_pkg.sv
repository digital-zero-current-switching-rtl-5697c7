// lockin_pkg: types, constants and helper functions shared by the lock-in
// controller.
//
// Time inside the controller is kept as a mixed-radix on-time word (ton_t):
// a coarse part counted in periods of the 20 MHz internal clock and a fine
// part counted in delay-line elements of 200 ps. With those two figures one
// clock period holds FINE_STEPS = 50 ns / 200 ps = 250 elements, so the fine
// field runs 0..249 and carries into the coarse field. Adding and subtracting
// on-times therefore needs the small carry/borrow functions below instead of a
// plain '+'. The 20 MHz clock and the 200 ps buffer delay are the figures the
// controller was built with; the field widths are this design's choice.
//
// The ZCD code follows the two-comparator sensor: 2'b00 late switching,
// 2'b01 zero-current switching, 2'b11 early switching. 2'b10 cannot come out
// of a thermometer coder and is treated as "no information" (like ZCS, the
// on-time is left as it is).
`timescale 1ns / 1ps
package lockin_pkg;

  localparam int unsigned FINE_STEPS  = 250;  // 50 ns clock / 200 ps element
  localparam int unsigned FINE_BITS   = 8;
  localparam int unsigned COARSE_BITS = 8;    // up to 255 clocks = 12.75 us

  typedef struct packed {
    logic [COARSE_BITS-1:0] coarse;  // whole clock periods
    logic [FINE_BITS-1:0]   fine;    // delay elements, 0 .. FINE_STEPS-1
  } ton_t;

  typedef enum logic [1:0] {
    ZCD_LATE  = 2'b00,
    ZCD_ZCS   = 2'b01,
    ZCD_BAD   = 2'b10,
    ZCD_EARLY = 2'b11
  } zcd_t;

  typedef enum logic [2:0] {
    GOV_OFF,       // converter off, all gates low
    GOV_WAIT_CFG,  // waiting for the first OP conversion
    GOV_EST,       // inherent-delay estimation at a fixed early on-time
    GOV_LOCKIN,    // lock-in: large tuning step
    GOV_RUN,       // locked: fine tuning with the smallest step
    GOV_STOP       // turn-off: let the running sequence complete
  } gov_state_t;

  // Build an on-time from a coarse and fine count.
  function automatic ton_t mk_ton(logic [COARSE_BITS-1:0] c,
                                  logic [FINE_BITS-1:0] f);
    ton_t t;
    t.coarse = c;
    t.fine   = f;
    return t;
  endfunction

  // a + b, saturating at the largest representable on-time.
  function automatic ton_t ton_add(ton_t a, ton_t b);
    logic [FINE_BITS:0]   f;
    logic [COARSE_BITS+1:0] c;
    ton_t r;
    f = {1'b0, a.fine} + {1'b0, b.fine};
    c = {2'b00, a.coarse} + {2'b00, b.coarse};
    if (f >= (FINE_BITS+1)'(FINE_STEPS)) begin
      f = f - (FINE_BITS+1)'(FINE_STEPS);
      c = c + 1'b1;
    end
    if (c > (COARSE_BITS+2)'({COARSE_BITS{1'b1}})) begin
      r.coarse = '1;
      r.fine   = FINE_BITS'(FINE_STEPS - 1);
    end else begin
      r.coarse = c[COARSE_BITS-1:0];
      r.fine   = f[FINE_BITS-1:0];
    end
    return r;
  endfunction

  // a - b, saturating at zero.
  function automatic ton_t ton_sub(ton_t a, ton_t b);
    logic [FINE_BITS:0]   f;
    logic [COARSE_BITS:0] c;
    ton_t r;
    f = {1'b0, a.fine} - {1'b0, b.fine};
    c = {1'b0, a.coarse} - {1'b0, b.coarse};
    if (f[FINE_BITS]) begin  // borrow
      f = f + (FINE_BITS+1)'(FINE_STEPS);
      c = c - 1'b1;
    end
    if (c[COARSE_BITS]) r = '0;
    else begin
      r.coarse = c[COARSE_BITS-1:0];
      r.fine   = f[FINE_BITS-1:0];
    end
    return r;
  endfunction

  // Clamp t into [lo, hi] (struct compares as one unsigned number, which
  // orders mixed-radix values correctly because fine < FINE_STEPS).
  function automatic ton_t ton_clamp(ton_t t, ton_t lo, ton_t hi);
    if (t < lo) return lo;
    if (t > hi) return hi;
    return t;
  endfunction

  // On-time in picoseconds, for testbenches and assertions.
  function automatic int unsigned ton_ps(ton_t t);
    return int'(t.coarse) * 50000 + int'(t.fine) * 200;
  endfunction

endpackage
