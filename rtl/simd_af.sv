// simd_af: unified multi-precision activation-function unit (ReLU, sigmoid
// and tanh) for two sfixed<8,f> values or one sfixed<16,f> value.
//
// sigmoid and tanh share one datapath of two CORDIC pipelines:
//   1. a hyperbolic CORDIC (rotation mode) turns af_in into
//      cosh(af_in) and sinh(af_in);
//   2. a SIMD subtractor forms e^-x = cosh(x) - sinh(x), and a SIMD adder
//      forms 1.0 + e^-x;
//   3. two 2:1 multiplexers pick the division operands
//         tanh   : X = cosh(x),     Y = sinh(x)
//         sigmoid: X = 1.0 + e^-x,  Y = 1.0
//   4. a linear CORDIC (vectoring mode) divides, giving tanh(x) or
//      sigmoid(x).
// ReLU (max(0, x) per lane) needs no CORDIC: it travels alongside the
// pipeline in the side tag so that all three functions have the same
// latency and results leave in input order.  All arithmetic is lane-wise
// in MODE_8 and full-width in MODE_16, as in the CORDIC units.
//
// Valid input range: |af_in| up to about 1.02 for sigmoid and tanh (the
// convergence range of the five-stage hyperbolic CORDIC); 1.0 + e^-x must
// fit in sfixed<N,f>.  Outside that range the result is an approximation.
//
// Interface and timing: one input per cycle, any mix of mode, f and
// function.  The result appears LATENCY = 2*STAGES + 1 cycles later with
// valid_out high: STAGES hyperbolic stages, one register after the
// subtractor/adder/multiplexers, and STAGES division stages.  stages_in
// (1..STAGES) sets how many stages of each CORDIC rotate for this item;
// the latency does not change with it.
// af_sel = 2'b11 is reserved and gives the ReLU result.
//
// From the source design: the block structure above, five stages per
// CORDIC, the operand selection for tanh and sigmoid, the truncation of
// cosh and sinh to N bits before the subtractor and adder, and the
// run-time CORDIC stage count.  Own choices: the ReLU path beside the
// pipeline, the register between the two CORDICs and the select encoding.
module simd_af
  import pe_pkg::*;
#(
  parameter int unsigned STAGES = 5,
  localparam int unsigned STG_W = $clog2(STAGES + 1)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    valid_in,
  input  pmode_t  mode_in,
  input  frac_t   frac_in,
  input  af_sel_t af_sel,
  input  logic [STG_W-1:0] stages_in,
  input  word_t   af_in,
  output logic    valid_out,
  output pmode_t  mode_out,
  output word_t   af_out
);

  localparam int unsigned TAG_W = STG_W + 2 + 16;  // {stage count, function, ReLU result}

  // ---------------- ReLU, carried as the side tag ----------------
  function automatic word_t relu(input word_t a, input pmode_t mode);
    if (mode == MODE_16) return a[15] ? '0 : a;
    else                 return {a[15] ? 8'd0 : a[15:8], a[7] ? 8'd0 : a[7:0]};
  endfunction

  // ---------------- hyperbolic CORDIC ----------------
  logic             h_v;
  pmode_t           h_mode;
  frac_t            h_f;
  logic [STG_W-1:0] h_n;
  word_t            h_cosh, h_sinh, h_z;
  logic [TAG_W-1:0] h_tag;

  cordic_hyperbolic #(.STAGES(STAGES), .TAG_W(TAG_W)) u_hyp (
    .clk      (clk),
    .rst_n    (rst_n),
    .valid_in (valid_in),
    .mode_in  (mode_in),
    .frac_in  (frac_in),
    .stages_in(stages_in),
    .z_in     (af_in),
    .tag_in   ({stages_in, af_sel, relu(af_in, mode_in)}),
    .valid_out(h_v),
    .mode_out (h_mode),
    .frac_out (h_f),
    .x_out    (h_cosh),
    .y_out    (h_sinh),
    .z_out    (h_z),
    .tag_out  (h_tag)
  );

  // ---------------- subtractor, adder and operand multiplexers ----------------
  word_t   one, e_negx, one_plus_e, dx_nx, dy_nx;
  af_sel_t h_sel;

  always_comb begin
    h_sel      = af_sel_t'(h_tag[17:16]);
    h_n        = h_tag[TAG_W-1 -: STG_W];
    one        = pow2_const(0, h_f, h_mode);
    e_negx     = simd_addsub(h_cosh, h_sinh, 2'b11, h_mode);
    one_plus_e = simd_addsub(one, e_negx, 2'b00, h_mode);
    if (h_sel == AF_TANH) begin
      dx_nx = h_cosh;
      dy_nx = h_sinh;
    end else begin
      dx_nx = one_plus_e;
      dy_nx = one;
    end
  end

  logic             m_v;
  pmode_t           m_mode;
  frac_t            m_f;
  logic [STG_W-1:0] m_n;
  word_t            m_x, m_y;
  logic [TAG_W-1:0] m_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_v    <= 1'b0;
      m_mode <= MODE_8;
      m_f    <= '0;
      m_n    <= '0;
      m_x    <= '0;
      m_y    <= '0;
      m_tag  <= '0;
    end else begin
      m_v    <= h_v;
      m_mode <= h_mode;
      m_f    <= h_f;
      m_n    <= h_n;
      m_x    <= dx_nx;
      m_y    <= dy_nx;
      m_tag  <= h_tag;
    end
  end

  // ---------------- division CORDIC ----------------
  logic             d_v;
  pmode_t           d_mode;
  frac_t            d_f;
  word_t            d_x, d_q;
  logic [TAG_W-1:0] d_tag;

  cordic_divider #(.STAGES(STAGES), .TAG_W(TAG_W)) u_div (
    .clk      (clk),
    .rst_n    (rst_n),
    .valid_in (m_v),
    .mode_in  (m_mode),
    .frac_in  (m_f),
    .stages_in(m_n),
    .x_in     (m_x),
    .y_in     (m_y),
    .tag_in   (m_tag),
    .valid_out(d_v),
    .mode_out (d_mode),
    .frac_out (d_f),
    .x_out    (d_x),
    .q_out    (d_q),
    .tag_out  (d_tag)
  );

  af_sel_t d_sel;
  assign d_sel     = af_sel_t'(d_tag[17:16]);
  assign valid_out = d_v;
  assign mode_out  = d_mode;
  assign af_out    = (d_sel == AF_SIGMOID || d_sel == AF_TANH) ? d_q : d_tag[15:0];

  // The Z residue of the hyperbolic unit, the carried divisor and the
  // fraction count at the output are not needed by the activation result.
  logic unused;
  assign unused = ^{h_z, d_x, d_f, d_tag[TAG_W-1 -: STG_W]};

  // The reserved select code is not used.
  a_sel_legal: assert property (@(posedge clk) disable iff (!rst_n)
                                !(valid_in && af_sel == 2'b11))
    else $error("simd_af: reserved activation select 2'b11");

endmodule
