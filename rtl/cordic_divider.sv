// cordic_divider: pipelined multi-precision linear CORDIC in vectoring
// mode, giving the quotient y/x for two sfixed<8,f> operand pairs or one
// sfixed<16,f> pair.
//
// Starting from Xd0 = x_in, Yd0 = y_in and Zd0 = 0, stage i
// (i = 1..STAGES) applies
//     D  = XNOR of the signs of X and Y (+1 when they agree, else -1)
//     Y <- Y - D * (X >>> i)
//     Z <- Z + D * 2^-i            (2^-i at f fraction bits)
//     X unchanged
// which drives Y toward 0 and leaves Z ~ y_in / x_in.  With stages starting
// at i = 1 the reachable quotient range is |q| < 1 - 2^-STAGES, which covers
// tanh and sigmoid; the result resolution is 2^-min(f, STAGES).  The stage
// hardware is the same as in the hyperbolic unit: lane adders with the
// L-to-H carry enabled in MODE_16, mode-dependent part-select shifters, a
// constant word holding 2^-i in both lanes (MODE_8) or as one 16-bit value
// (MODE_16), and one guard bit per lane; the quotient is truncated back to
// N bits per lane.  Only stages i <= stages_in update the vector; later
// stages pass it on unchanged.
//
// Interface and timing: one operand pair per cycle; the quotient leaves
// STAGES cycles later with valid_out high.  mode, f, the stage count, x
// and a TAG_W-bit tag travel with each item.
//
// From the source design: linear vectoring mode with E_i = 2^-i, the XNOR
// direction rule, Zd0 = 0, five stages, the one-bit wider stage words and
// the configurable stage count.  Own choices: the sign
// convention of the update and two's-complement lanes.
module cordic_divider
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
  input  word_t            x_in,
  input  word_t            y_in,
  input  logic [TAG_W-1:0] tag_in,
  output logic             valid_out,
  output pmode_t           mode_out,
  output frac_t            frac_out,
  output word_t            x_out,
  output word_t            q_out,
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
  } div_t;

  div_t st [STAGES+1];

  always_comb begin
    st[0].v    = valid_in;
    st[0].mode = mode_in;
    st[0].f    = frac_in;
    st[0].n    = stages_in;
    st[0].x    = g_widen(x_in, mode_in);
    st[0].y    = g_widen(y_in, mode_in);
    st[0].z    = '0;
    st[0].tag  = tag_in;
  end

  for (genvar s = 1; s <= STAGES; s++) begin : g_stage
    div_t       nx;
    logic [1:0] same;  // per lane: signs of X and Y agree (D = +1)

    always_comb begin
      nx   = st[s-1];
      same = ~(g_sign(st[s-1].x, st[s-1].mode) ^ g_sign(st[s-1].y, st[s-1].mode));
      if (s <= int'(st[s-1].n)) begin
        nx.y = g_addsub(st[s-1].y, g_sra(st[s-1].x, s, st[s-1].mode), same, st[s-1].mode);
        nx.z = g_addsub(st[s-1].z, g_pow2(s, st[s-1].f, st[s-1].mode), ~same, st[s-1].mode);
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
  assign q_out     = g_narrow(st[STAGES].z);
  assign tag_out   = st[STAGES].tag;

endmodule
