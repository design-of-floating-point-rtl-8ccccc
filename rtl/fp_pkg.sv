// fp_pkg: shared types, constants and helper functions for the IEEE-754
// single-precision (binary32) datapath of the current PI controller.
//
// All arithmetic units of the controller work on 32-bit binary32 words. The
// units follow the usual behaviour of FPGA floating-point cores: denormal
// inputs are read as zero and results that would be denormal are flushed to
// a signed zero; rounding is round-to-nearest-even; any NaN input gives the
// quiet NaN 32'h7FC00000. The pipeline latencies of the units are collected
// here so that every module that balances paths sees the same numbers. The
// 7-cycle adder latency is the figure quoted for the adder core in the
// design description; the other latencies are this design's choice, set to
// common settings of such cores.
package fp_pkg;

  typedef logic [31:0] float32_t;

  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] frac;
  } fp32_fields_t;

  localparam float32_t FP_ZERO    = 32'h0000_0000;
  localparam float32_t FP_POS_INF = 32'h7F80_0000;
  localparam float32_t FP_QNAN    = 32'h7FC0_0000;

  // Pipeline latencies in clock cycles.
  localparam int unsigned LAT_ADD  = 7;  // add / subtract
  localparam int unsigned LAT_MUL  = 5;  // multiply
  localparam int unsigned LAT_CONV = 6;  // integer / fixed point to float
  localparam int unsigned LAT_CMP  = 1;  // compare
  localparam int unsigned LAT_SAT  = LAT_CMP + 1;  // compare, then clamp mux

  function automatic logic fp_is_nan(float32_t a);
    return (a[30:23] == 8'hFF) && (a[22:0] != '0);
  endfunction

  function automatic logic fp_is_inf(float32_t a);
    return (a[30:23] == 8'hFF) && (a[22:0] == '0);
  endfunction

  // Zero or denormal (denormals are read as zero).
  function automatic logic fp_is_zero(float32_t a);
    return a[30:23] == 8'h00;
  endfunction

  // Round to nearest even and pack.
  //   m   : 27-bit significand, hidden one at bit 26, 23 fraction bits in
  //         [25:3], guard, round and sticky bits in [2:0]
  //   e   : biased exponent belonging to m (may be out of range)
  // Overflow gives a signed infinity, underflow a signed zero.
  function automatic float32_t fp_round_pack(logic s, int e, logic [26:0] m);
    logic        up;
    logic [24:0] r;
    int          ee;
    up = m[2] & (m[1] | m[0] | m[3]);
    r  = {1'b0, m[26:3]} + 25'(up);
    ee = e;
    if (r[24]) begin
      r  = r >> 1;
      ee = ee + 1;
    end
    if (ee >= 255) return {s, 8'hFF, 23'h0};
    if (ee <= 0)   return {s, 31'h0};
    return {s, ee[7:0], r[22:0]};
  endfunction

endpackage
