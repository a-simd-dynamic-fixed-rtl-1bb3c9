// pe_pkg: types, constants and SIMD arithmetic helpers shared by the
// processing engine (PE).
//
// Every datapath word in the PE is 16 bits wide and is read in one of two
// precision modes:
//   MODE_8  (P_mode = 0): two independent sfixed<8,f> lanes, H = [15:8] and
//                         L = [7:0]; nothing crosses the lane boundary.
//   MODE_16 (P_mode = 1): one sfixed<16,f> value; the carry and the shifted-out
//                         bits of the L lane flow into the H lane.
// The helpers below build each 16-bit operation from two 8-bit lane
// operations plus a lane-boundary carry, which is how the shared adders,
// shifters and constants of the datapath are organised.  Inside the CORDIC
// stages the same scheme works on guarded words (gword_t, 18 bits): each
// lane has one extra bit against overflow, i.e. two 9-bit lanes, or one
// 17-bit value in MODE_16.
//
// Constants: the CORDIC memory constants are held with CONST_FRAC = 14
// fractional bits and scaled at run time to the dynamic fraction f
// (the sfixed<N,f> format), rounding to the nearest step.  The hyperbolic
// table is atanh(2^-i), i = 1..5, and the start value of X is 1.20749; the
// division table 2^-i is produced by a shift.
package pe_pkg;

  // Precision mode (P_mode).
  typedef enum logic {
    MODE_8  = 1'b0,
    MODE_16 = 1'b1
  } pmode_t;

  // Activation function select.  2'b11 is reserved.
  typedef enum logic [1:0] {
    AF_RELU    = 2'd0,
    AF_SIGMOID = 2'd1,
    AF_TANH    = 2'd2
  } af_sel_t;

  localparam int unsigned WORD_W     = 16;  // datapath word
  localparam int unsigned FRAC_W     = 4;   // width of the fraction-bit count f
  localparam int unsigned CONST_FRAC = 14;  // fraction bits of the stored constants

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [FRAC_W-1:0] frac_t;

  // 1.20749 * 2^14, start value of X in the hyperbolic rotation.
  localparam logic [15:0] HYP_X0_Q14 = 16'd19784;

  // atanh(2^-i) * 2^14 for i = 1..5 (index 0 unused).
  function automatic logic [15:0] hyp_e_q14(input int unsigned i);
    case (i)
      1:       return 16'd9000;   // 0.5493061
      2:       return 16'd4185;   // 0.2554128
      3:       return 16'd2059;   // 0.1256572
      4:       return 16'd1025;   // 0.0625816
      5:       return 16'd512;    // 0.0312602
      6:       return 16'd256;    // 0.0156263
      7:       return 16'd128;    // 0.0078127
      8:       return 16'd64;     // 0.0039063
      default: return 16'd0;
    endcase
  endfunction

  // 2^-i at f fractional bits (zero when i > f), placed for the mode.
  function automatic word_t pow2_const(input int unsigned i, input frac_t f,
                                       input pmode_t mode);
    logic [15:0] r;
    r = (i > int'(f)) ? 16'd0 : (16'd1 << (int'(f) - i));
    if (mode == MODE_16) return r;
    else                 return {r[7:0], r[7:0]};
  endfunction

  // Lane-wise add or subtract.  sub[1] controls the H lane, sub[0] the L
  // lane; in MODE_16 both must be equal and the L-lane carry-out (the
  // overflow bit OF) is passed into the H lane.
  function automatic word_t simd_addsub(input word_t a, input word_t b,
                                        input logic [1:0] sub, input pmode_t mode);
    logic [8:0] lo;
    logic [7:0] hi;
    logic [7:0] bl, bh;
    logic       cin_h;
    bl    = sub[0] ? ~b[7:0]  : b[7:0];
    bh    = sub[1] ? ~b[15:8] : b[15:8];
    lo    = {1'b0, a[7:0]} + {1'b0, bl} + {8'd0, sub[0]};
    cin_h = (mode == MODE_16) ? lo[8] : sub[1];
    hi    = a[15:8] + bh + {7'd0, cin_h};
    return {hi, lo[7:0]};
  endfunction

  // ---------------- guarded CORDIC words ----------------
  // Inside the CORDIC stages each lane carries one extra (guard) bit so that
  // sums and shifts may exceed the N-bit range before the final truncation.
  // A guarded word is {H[8:0], L[8:0]}:
  //   MODE_8 : two 9-bit lanes, each the sign-extended 8-bit lane value;
  //   MODE_16: one 17-bit value v held as H = v[16:8], L = {1'b0, v[7:0]};
  //            the L-lane carry (OF) enters the H lane.
  typedef logic [17:0] gword_t;

  function automatic gword_t g_widen(input word_t a, input pmode_t mode);
    if (mode == MODE_16) return {a[15], a[15:8], 1'b0, a[7:0]};
    else                 return {a[15], a[15:8], a[7], a[7:0]};
  endfunction

  // Truncate back to N bits per lane (the guard bits are dropped).
  function automatic word_t g_narrow(input gword_t g);
    return {g[16:9], g[7:0]};
  endfunction

  function automatic logic [16:0] g_join(input gword_t g);
    return {g[17:9], g[7:0]};
  endfunction

  function automatic gword_t g_split(input logic [16:0] v);
    return {v[16:8], 1'b0, v[7:0]};
  endfunction

  // Lane-wise add or subtract of guarded words (sub[1]: H lane, sub[0]: L).
  function automatic gword_t g_addsub(input gword_t a, input gword_t b,
                                      input logic [1:0] sub, input pmode_t mode);
    logic [8:0] bl, bh, lo, hi;
    logic       cin_h;
    bl = sub[0] ? ~b[8:0]   : b[8:0];
    bh = sub[1] ? ~b[17:9]  : b[17:9];
    if (mode == MODE_16) begin
      // 8-bit L adder whose carry-out (OF) is the H adder's carry-in
      lo    = {1'b0, a[7:0]} + {1'b0, bl[7:0]} + {8'd0, sub[0]};
      cin_h = lo[8];
      lo[8] = 1'b0;
    end else begin
      lo    = a[8:0] + bl + {8'd0, sub[0]};
      cin_h = sub[1];
    end
    hi = a[17:9] + bh + {8'd0, cin_h};
    return {hi, lo};
  endfunction

  // Lane-wise arithmetic right shift of a guarded word.
  function automatic gword_t g_sra(input gword_t a, input int unsigned sh,
                                   input pmode_t mode);
    logic signed [16:0] w;
    logic signed [8:0]  h, l;
    w = $signed(g_join(a)) >>> sh;
    h = $signed(a[17:9]) >>> sh;
    l = $signed(a[8:0]) >>> sh;
    if (mode == MODE_16) return g_split(w);
    else                 return {h, l};
  endfunction

  // Sign of each lane of a guarded word, as {H, L}.
  function automatic logic [1:0] g_sign(input gword_t a, input pmode_t mode);
    if (mode == MODE_16) return {a[17], a[17]};
    else                 return {a[17], a[8]};
  endfunction

  // Non-negative Q14 constant scaled to f bits (rounded) as a guarded word.
  function automatic gword_t g_const(input logic [15:0] c_q14, input frac_t f,
                                     input pmode_t mode);
    logic [16:0] r;
    int unsigned sh;
    sh = (int'(f) >= CONST_FRAC) ? 0 : CONST_FRAC - int'(f);
    if (sh == 0) r = {1'b0, c_q14};
    else         r = ({1'b0, c_q14} + (17'd1 << (sh - 1))) >> sh;
    if (mode == MODE_16) return g_split(r);
    else                 return {r[8:0], r[8:0]};
  endfunction

  // 2^-i at f fraction bits (zero when i > f) as a guarded word.
  function automatic gword_t g_pow2(input int unsigned i, input frac_t f,
                                    input pmode_t mode);
    logic [16:0] r;
    r = (i > int'(f)) ? 17'd0 : (17'd1 << (int'(f) - i));
    if (mode == MODE_16) return g_split(r);
    else                 return {r[8:0], r[8:0]};
  endfunction

endpackage
