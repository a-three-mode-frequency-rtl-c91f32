// ffc_pkg - shared types and constants of the three mode frequency feedback
// controller.
//
// Every counter in the controller (counters A, B, C and the accumulator) is a
// three-decade BCD up/down counter with a sign bit. A positive number is held
// in plain BCD with the sign bit set. A negative number -x is held as the
// complement 1000-x with the sign bit clear, which is what a decade counter
// holds after counting down through zero. Zero is always held as positive.
// The nine states of the sequence generator are numbered here, in the order in
// which one sample period visits them.
package ffc_pkg;

  // Number of decades in every counter (three in the original design).
  localparam int unsigned DECADES = 3;
  // 10**DECADES: the modulus of the complement used for negative numbers.
  localparam int          MODULUS = 1000;

  // Unsigned BCD number, digit [0] is the units decade.
  typedef logic [DECADES-1:0][3:0] bcd_t;

  // Signed counter contents: pos = 1 for zero and positive numbers.
  typedef struct packed {
    logic pos;
    bcd_t mag;   // value when pos, MODULUS - |value| when not pos
  } sbcd_t;

  // States of the sequence generator, one sample period in order.
  localparam int unsigned NSTATES = 9;
  typedef enum logic [3:0] {
    ST_AP1   = 4'd0,  // aperture at t(s-1): A = r - c, B = c
    ST_INT   = 4'd1,  // integral term: A x Gi into the accumulator
    ST_WAIT1 = 4'd2,  // rest of the first delay alpha
    ST_AP2   = 4'd3,  // aperture at mid period: A = c(mid)
    ST_WAIT2 = 4'd4,  // second delay alpha
    ST_AP3   = 4'd5,  // aperture at t(s): A and B count c(s) down
    ST_HALF  = 4'd6,  // B into the accumulator, B/2 out of A
    ST_DER   = 4'd7,  // derivative term: A x beta into the accumulator
    ST_OUT   = 4'd8   // accumulator strobed into counter C
  } seq_state_e;

  // BCD constant 10 for the fixed divide-by-10 counter.
  localparam bcd_t BCD_TEN = bcd_t'(12'h010);

  // Add one to a BCD number, wrapping 999 -> 000.
  function automatic bcd_t bcd_inc(bcd_t v);
    bcd_t r = v;
    for (int i = 0; i < DECADES; i++) begin
      if (r[i] == 4'd9) r[i] = 4'd0;
      else begin
        r[i] = r[i] + 4'd1;
        break;
      end
    end
    return r;
  endfunction

  // Subtract one from a BCD number, wrapping 000 -> 999.
  function automatic bcd_t bcd_dec(bcd_t v);
    bcd_t r = v;
    for (int i = 0; i < DECADES; i++) begin
      if (r[i] == 4'd0) r[i] = 4'd9;
      else begin
        r[i] = r[i] - 4'd1;
        break;
      end
    end
    return r;
  endfunction

  // All digits nine: the largest magnitude.
  function automatic logic bcd_is_max(bcd_t v);
    logic m = 1'b1;
    for (int i = 0; i < DECADES; i++) m &= (v[i] == 4'd9);
    return m;
  endfunction

  // Binary value of a BCD number.
  function automatic int bcd2int(bcd_t v);
    int r = 0;
    for (int i = DECADES - 1; i >= 0; i--) r = r * 10 + int'(v[i]);
    return r;
  endfunction

  // BCD digits of a value 0 .. MODULUS-1.
  function automatic bcd_t int2bcd(int v);
    bcd_t r;
    int   x = v;
    for (int i = 0; i < DECADES; i++) begin
      r[i] = 4'(x % 10);
      x    = x / 10;
    end
    return r;
  endfunction

  // Signed value of counter contents.
  function automatic int sbcd2int(sbcd_t v);
    return v.pos ? bcd2int(v.mag) : bcd2int(v.mag) - MODULUS;
  endfunction

  // Counter contents for a value -(MODULUS-1) .. MODULUS-1.
  function automatic sbcd_t int2sbcd(int v);
    sbcd_t r;
    r.pos = (v >= 0);
    r.mag = int2bcd(v >= 0 ? v : v + MODULUS);
    return r;
  endfunction

endpackage
