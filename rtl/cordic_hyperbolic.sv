// cordic_hyperbolic: pipelined multi-precision hyperbolic CORDIC in rotation
// mode, giving cosh(z) and sinh(z) for two sfixed<8,f> inputs or one
// sfixed<16,f> input.
//
// The vector starts at X0 = 1.20749 (the inverse of the hyperbolic CORDIC
// gain, scaled to f fraction bits), Y0 = 0 and Z0 = z_in.  Stage i
// (i = 1..STAGES) applies
//     d  = +1 if Z >= 0, else -1
//     X <- X + d * (Y >>> i)
//     Y <- Y + d * (X >>> i)
//     Z <- Z - d * E_i,        E_i = atanh(2^-i) scaled to f bits
// so after the last stage X ~ cosh(z_in), Y ~ sinh(z_in) and Z ~ 0.  Each
// stage is built from pairs of lane adders and lane shifters.  In MODE_8 the
// lanes are independent and each has its own direction d taken from the
// sign of its Z lane; in MODE_16 the L-lane carry (OF) enters the H-lane
// adder, the shift moves bits across the lane boundary and both lanes use
// the word's sign.  The same constant word serves both modes: one 16-bit
// value, or the 8-bit value repeated in both lanes.  Every lane carries one
// guard bit above its N bits (9-bit lanes in MODE_8, a 17-bit word in
// MODE_16) so stage results may briefly exceed the N-bit range; the outputs
// are truncated back to N bits per lane.
//
// Run-time stage count: only stages i <= stages_in rotate; later stages
// pass the vector on unchanged, so the latency does not depend on it.
// stages_in = STAGES gives the full computation.
//
// Inputs converge for |z_in| up to the sum of E_i (about 1.02 for five
// stages).  In MODE_8 the value 1.20749 must be representable, so f <= 6.
//
// Interface and timing: one input per cycle; a result leaves STAGES cycles
// after its input with valid_out high.  mode, f, the stage count and a
// TAG_W-bit side tag travel with each item, so they may change from one
// item to the next.
//
// From the source design: five stages, the atanh(2^-i) table, the start
// value 1.20749, the lane adders with the overflow carry, the one-bit wider
// stage words, the mode-selected part-select shifters and the configurable
// stage count, with the direction taken from the sign of Z.  Own choices:
// two's-complement lanes with sign-filled shifts, the sign convention of
// the updates, no repeated iterations, rounding of the scaled constants and
// pass-through of unused stages.
module cordic_hyperbolic
  import pe_pkg::*;
#(
  parameter int unsigned STAGES = 5,
  parameter int unsigned TAG_W  = 1,
  localparam int unsigned STG_W = $clog2(STAGES + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid_in,
  input  pmode_t           mode_in,
  input  frac_t            frac_in,
  input  logic [STG_W-1:0] stages_in,
  input  word_t            z_in,
  input  logic [TAG_W-1:0] tag_in,
  output logic             valid_out,
  output pmode_t           mode_out,
  output frac_t            frac_out,
  output word_t            x_out,
  output word_t            y_out,
  output word_t            z_out,
  output logic [TAG_W-1:0] tag_out
);

  typedef struct packed {
    logic             v;
    pmode_t           mode;
    frac_t            f;
    logic [STG_W-1:0] n;
    gword_t           x;
    gword_t           y;
    gword_t           z;
    logic [TAG_W-1:0] tag;
  } hyp_t;

  hyp_t st [STAGES+1];   // st[0]: initialised input, st[s]: after stage s

  always_comb begin
    st[0].v    = valid_in;
    st[0].mode = mode_in;
    st[0].f    = frac_in;
    st[0].n    = stages_in;
    st[0].x    = g_const(HYP_X0_Q14, frac_in, mode_in);
    st[0].y    = '0;
    st[0].z    = g_widen(z_in, mode_in);
    st[0].tag  = tag_in;
  end

  for (genvar s = 1; s <= STAGES; s++) begin : g_stage
    hyp_t       nx;
    logic [1:0] neg;   // per lane: Z < 0, rotate the other way

    always_comb begin
      nx  = st[s-1];
      neg = g_sign(st[s-1].z, st[s-1].mode);
      if (s <= int'(st[s-1].n)) begin
        nx.x = g_addsub(st[s-1].x, g_sra(st[s-1].y, s, st[s-1].mode), neg, st[s-1].mode);
        nx.y = g_addsub(st[s-1].y, g_sra(st[s-1].x, s, st[s-1].mode), neg, st[s-1].mode);
        nx.z = g_addsub(st[s-1].z, g_const(hyp_e_q14(s), st[s-1].f, st[s-1].mode),
                        ~neg, st[s-1].mode);
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) st[s] <= '0;
      else        st[s] <= nx;
    end
  end

  assign valid_out = st[STAGES].v;
  assign mode_out  = st[STAGES].mode;
  assign frac_out  = st[STAGES].f;
  assign x_out     = g_narrow(st[STAGES].x);
  assign y_out     = g_narrow(st[STAGES].y);
  assign z_out     = g_narrow(st[STAGES].z);
  assign tag_out   = st[STAGES].tag;

endmodule
