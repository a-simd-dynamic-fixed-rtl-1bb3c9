// simd_pe: SIMD dynamic-fraction fixed-point processing engine for
// convolution layers: a multi-precision MAC unit followed by the
// multi-precision activation-function unit.
//
// One engine serves two precision modes, chosen per dot product by mode_in:
//   MODE_8  (P_mode = 0): four sfixed<8,f> products per cycle form two dot
//           products (upper lanes -> output [15:8], lower lanes -> [7:0]);
//           the activation unit then works on both 8-bit results at once,
//           so the engine acts as two 8-bit processing elements.
//   MODE_16 (P_mode = 1): one sfixed<16,f> product per cycle forms one dot
//           product, and the activation unit works on one 16-bit value.
// The fraction-bit count f (frac_in) is set at run time, as is the
// activation function (ReLU, sigmoid or tanh), and so is the number of
// CORDIC stages used for sigmoid and tanh (af_stages, 1..AF_STAGES).  The
// MAC result is quantised to N bits with f fraction bits before
// activation.
//
// Interface: a dot product is a burst of terms on in_data/wt_data with
// valid_in high, first_in on its first term (the bias is loaded then) and
// last_in on its last.  mode_in and frac_in must be constant within the
// burst; af_sel and af_stages are sampled with the last term.  The
// quantised MAC result is visible on macc/macc_valid two cycles after the last term, and
// the activated result on pe_out/valid_out LATENCY cycles after the last
// term, where LATENCY = 2 + 2*AF_STAGES + 1 (13 with five stages).
//
// From the source design: the MAC-then-activation organisation, the mode
// and fraction controls, the activation selection and the configurable
// CORDIC stage count.  Own choices: the
// burst framing and the select encoding.
module simd_pe
  import pe_pkg::*;
#(
  parameter int unsigned ACC_GUARD = 16,
  parameter int unsigned AF_STAGES = 5,
  localparam int unsigned STG_W = $clog2(AF_STAGES + 1)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        valid_in,
  input  logic        first_in,
  input  logic        last_in,
  input  pmode_t      mode_in,
  input  frac_t       frac_in,
  input  af_sel_t     af_sel,
  input  logic [STG_W-1:0] af_stages,
  input  logic [31:0] in_data,
  input  logic [31:0] wt_data,
  input  word_t       bias,
  output logic        macc_valid,
  output word_t       macc,
  output logic        valid_out,
  output pmode_t      mode_out,
  output word_t       pe_out
);

  pmode_t  mac_mode;
  frac_t   mac_f;

  simd_mac #(.ACC_GUARD(ACC_GUARD)) u_mac (
    .clk      (clk),
    .rst_n    (rst_n),
    .valid_in (valid_in),
    .first_in (first_in),
    .last_in  (last_in),
    .mode_in  (mode_in),
    .frac_in  (frac_in),
    .in_data  (in_data),
    .wt_data  (wt_data),
    .bias     (bias),
    .valid_out(macc_valid),
    .mode_out (mac_mode),
    .frac_out (mac_f),
    .macc     (macc)
  );

  // The activation select and stage count follow the MAC's two-cycle
  // latency.
  af_sel_t          sel_q1, sel_q2;
  logic [STG_W-1:0] stg_q1, stg_q2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q1 <= AF_RELU;
      sel_q2 <= AF_RELU;
      stg_q1 <= STG_W'(AF_STAGES);
      stg_q2 <= STG_W'(AF_STAGES);
    end else begin
      if (valid_in && last_in) begin
        sel_q1 <= af_sel;
        stg_q1 <= af_stages;
      end
      sel_q2 <= sel_q1;
      stg_q2 <= stg_q1;
    end
  end

  simd_af #(.STAGES(AF_STAGES)) u_af (
    .clk      (clk),
    .rst_n    (rst_n),
    .valid_in (macc_valid),
    .mode_in  (mac_mode),
    .frac_in  (mac_f),
    .af_sel   (sel_q2),
    .stages_in(stg_q2),
    .af_in    (macc),
    .valid_out(valid_out),
    .mode_out (mode_out),
    .af_out   (pe_out)
  );

endmodule
