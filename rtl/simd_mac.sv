// simd_mac: multi-precision dynamic-fraction multiply-accumulate unit.
//
// Four 8-bit multipliers are shared between two precision modes:
//   MODE_8  : each cycle takes four sfixed<8,f> inputs and four weights
//             (in_data/wt_data lanes [31:24], [23:16], [15:8], [7:0]).  The
//             upper two products feed accumulator 1, the lower two feed
//             accumulator 2, giving two dot products at once:
//               acc1 = C1 + sum(in[31:24]*wt[31:24] + in[23:16]*wt[23:16])
//               acc2 = C2 + sum(in[15:8] *wt[15:8]  + in[7:0]  *wt[7:0])
//             The result is macc = {q(acc1), q(acc2)}, two sfixed<8,f>.
//   MODE_16 : each cycle takes one sfixed<16,f> input and weight
//             (in_data[15:0], wt_data[15:0]).  The four multipliers form the
//             partial products LL, HL, LH and HH, which two shift-and-add
//             units weight by 2^0, 2^8, 2^8 and 2^16; their sum accumulates
//             into accumulator 1, and macc = q(acc1) is one sfixed<16,f>.
// Each multiplier is 9x9 signed: an operand half is sign-extended when it
// is a signed 8-bit value or the high half of a 16-bit value, and
// zero-extended when it is the low half of a 16-bit value.
//
// The bias is loaded into the accumulator with the first term: bias[15:8]
// is C1 and bias[7:0] is C2 in MODE_8, bias[15:0] is b in MODE_16.  It is
// aligned to the 2f fraction bits of the products.  q() drops the f lowest
// fraction bits (round toward minus infinity) and saturates to N bits.
// The accumulators are 32+ACC_GUARD bits wide, so up to 2^ACC_GUARD terms
// accumulate without overflow.
//
// Interface and timing: operands are registered in the weight and input
// registers; one cycle later they are multiplied and accumulated.  A term
// with first_in = 1 starts a new dot product (accumulator = bias + term);
// a term with last_in = 1 ends it, and two cycles after that term macc is
// presented with valid_out high for one cycle and holds until the next
// result.  One term is accepted every cycle; mode_in and frac_in must stay
// constant within a dot product.  first_in and last_in may both be set for
// a one-term product.
//
// From the source design: the four shared 8-bit multipliers, the two
// shift-and-add units, the two accumulators, the bias preload and the
// truncation to 8 or 16 bits.  Own choices: 9-bit signed multipliers for
// the two's-complement partial products, the first/last framing, saturation
// on integer overflow, and ACC_GUARD = 16.
module simd_mac
  import pe_pkg::*;
#(
  parameter int unsigned ACC_GUARD = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        valid_in,
  input  logic        first_in,
  input  logic        last_in,
  input  pmode_t      mode_in,
  input  frac_t       frac_in,
  input  logic [31:0] in_data,
  input  logic [31:0] wt_data,
  input  word_t       bias,
  output logic        valid_out,
  output pmode_t      mode_out,
  output frac_t       frac_out,
  output word_t       macc
);

  localparam int unsigned ACC_W = 32 + ACC_GUARD;

  // ---------------- input and weight registers ----------------
  logic        v_q, first_q, last_q;
  pmode_t      mode_q;
  frac_t       frac_q;
  logic [31:0] in_q, wt_q;
  word_t       bias_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q     <= 1'b0;
      first_q <= 1'b0;
      last_q  <= 1'b0;
      mode_q  <= MODE_8;
      frac_q  <= '0;
      in_q    <= '0;
      wt_q    <= '0;
      bias_q  <= '0;
    end else begin
      v_q <= valid_in;
      if (valid_in) begin
        first_q <= first_in;
        last_q  <= last_in;
        mode_q  <= mode_in;
        frac_q  <= frac_in;
        in_q    <= in_data;
        wt_q    <= wt_data;
        bias_q  <= bias;
      end
    end
  end

  // ---------------- operand routing to the four multipliers ----------------
  logic signed [8:0]  ma [4];
  logic signed [8:0]  mb [4];
  logic signed [17:0] prod [4];

  always_comb begin
    if (mode_q == MODE_16) begin
      ma[0] = $signed({1'b0, in_q[7:0]});         mb[0] = $signed({1'b0, wt_q[7:0]});
      ma[1] = $signed({in_q[15], in_q[15:8]});    mb[1] = $signed({1'b0, wt_q[7:0]});
      ma[2] = $signed({1'b0, in_q[7:0]});         mb[2] = $signed({wt_q[15], wt_q[15:8]});
      ma[3] = $signed({in_q[15], in_q[15:8]});    mb[3] = $signed({wt_q[15], wt_q[15:8]});
    end else begin
      ma[0] = $signed({in_q[31], in_q[31:24]});   mb[0] = $signed({wt_q[31], wt_q[31:24]});
      ma[1] = $signed({in_q[23], in_q[23:16]});   mb[1] = $signed({wt_q[23], wt_q[23:16]});
      ma[2] = $signed({in_q[15], in_q[15:8]});    mb[2] = $signed({wt_q[15], wt_q[15:8]});
      ma[3] = $signed({in_q[7], in_q[7:0]});      mb[3] = $signed({wt_q[7], wt_q[7:0]});
    end
    for (int m = 0; m < 4; m++) prod[m] = ma[m] * mb[m];
  end

  // ---------------- shift-and-add units ----------------
  logic signed [31:0] sa1, sa2;

  always_comb begin
    if (mode_q == MODE_16) begin
      sa1 = 32'(prod[0]) + (32'(prod[1]) <<< 8);
      sa2 = (32'(prod[2]) <<< 8) + (32'(prod[3]) <<< 16);
    end else begin
      sa1 = 32'(prod[0]) + 32'(prod[1]);
      sa2 = 32'(prod[2]) + 32'(prod[3]);
    end
  end

  // ---------------- accumulators with bias preload ----------------
  logic signed [ACC_W-1:0] acc1, acc2, acc1_nx, acc2_nx;
  logic signed [ACC_W-1:0] b1, b2;

  always_comb begin
    if (mode_q == MODE_16) begin
      b1 = ACC_W'($signed(bias_q)) <<< frac_q;
      b2 = '0;
    end else begin
      b1 = ACC_W'($signed(bias_q[15:8])) <<< frac_q;
      b2 = ACC_W'($signed(bias_q[7:0])) <<< frac_q;
    end
    if (mode_q == MODE_16) begin
      acc1_nx = (first_q ? b1 : acc1) + ACC_W'(sa1) + ACC_W'(sa2);
      acc2_nx = acc2;
    end else begin
      acc1_nx = (first_q ? b1 : acc1) + ACC_W'(sa1);
      acc2_nx = (first_q ? b2 : acc2) + ACC_W'(sa2);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc1 <= '0;
      acc2 <= '0;
    end else if (v_q) begin
      acc1 <= acc1_nx;
      acc2 <= acc2_nx;
    end
  end

  // ---------------- bit truncation and saturation ----------------
  function automatic logic [15:0] quant(input logic signed [ACC_W-1:0] a, input frac_t f,
                                        input int unsigned n);
    logic signed [ACC_W-1:0] s, hi_lim, lo_lim;
    s      = a >>> f;
    hi_lim = (ACC_W'(1) <<< (n - 1)) - 1;
    lo_lim = -(ACC_W'(1) <<< (n - 1));
    if (s > hi_lim)      s = hi_lim;
    else if (s < lo_lim) s = lo_lim;
    return s[15:0];
  endfunction

  word_t macc_nx;
  always_comb begin
    logic [15:0] q1;
    logic [7:0]  q2;
    q1 = quant(acc1_nx, frac_q, (mode_q == MODE_16) ? 16 : 8);
    q2 = 8'(quant(acc2_nx, frac_q, 8));
    macc_nx = (mode_q == MODE_16) ? q1 : {q1[7:0], q2[7:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_out <= 1'b0;
      mode_out  <= MODE_8;
      frac_out  <= '0;
      macc      <= '0;
    end else begin
      valid_out <= v_q && last_q;
      if (v_q && last_q) begin
        macc     <= macc_nx;
        mode_out <= mode_q;
        frac_out <= frac_q;
      end
    end
  end

endmodule
