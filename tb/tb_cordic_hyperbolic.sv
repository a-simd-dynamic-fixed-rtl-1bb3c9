// tb_cordic_hyperbolic: self-checking test of the pipelined SIMD hyperbolic
// CORDIC.
//
// One item in four uses a random reduced stage count (bit-exact check
// only).  A new random input enters every cycle, mixing MODE_8 (two lanes, f = 3..6)
// and MODE_16 (f = 8..13) items, with |z| <= 1.0.  Each result is checked
//   - bit-exactly against the lane model in af_ref_pkg,
//   - against the real cosh and sinh within 0.08 + 4 LSB (five stages),
//   - for its latency of STAGES cycles and for the returned tag.
module tb_cordic_hyperbolic;
  import pe_pkg::*;
  import af_ref_pkg::*;

  localparam int STAGES = 5;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        valid_in;
  pmode_t      mode_in;
  frac_t       frac_in;
  word_t       z_in;
  logic [2:0]  stages_in;
  logic [7:0]  tag_in;
  logic        valid_out;
  pmode_t      mode_out;
  frac_t       frac_out;
  word_t       x_out, y_out, z_out;
  logic [7:0]  tag_out;

  int checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  cordic_hyperbolic #(.STAGES(STAGES), .TAG_W(8)) dut (.*);

  typedef struct {
    word_t  z;
    pmode_t mode;
    int     f;
    int     n;
    int     due;
    logic [7:0] tag;
  } item_t;
  item_t q[$];

  task automatic check_lane(int zl, int xl, int yl, int f, int n, int w, string nm);
    int  xe, ye;
    real zr, sc;
    hyp(zl, f, w, n, xe, ye);
    checks++;
    if (xl != xe || yl != ye) begin
      failures++;
      $display("FAIL %s: z=%0d f=%0d x=%0d/%0d y=%0d/%0d", nm, zl, f, xl, xe, yl, ye);
    end
    if (n != STAGES) return;
    sc = 2.0 ** f;
    zr = zl / sc;
    checks++;
    if (fabs(xl / sc - $cosh(zr)) > 0.08 + 4.0 / sc || fabs(yl / sc - $sinh(zr)) > 0.08 + 4.0 / sc)
    begin
      failures++;
      $display("FAIL %s accuracy: z=%f cosh %f/%f sinh %f/%f", nm, zr, xl / sc, $cosh(zr),
               yl / sc, $sinh(zr));
    end
  endtask

  always @(negedge clk) begin
    if (rst_n && valid_out) begin
      item_t it;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("FAIL: unexpected output");
      end else begin
        it = q.pop_front();
        if (cycle != it.due || tag_out != it.tag || mode_out != it.mode || int'(frac_out) != it.f)
        begin
          failures++; $display("FAIL: timing/tag cycle=%0d due=%0d", cycle, it.due);
        end
        if (it.mode == MODE_16)
          check_lane(lane(it.z, 16, 0), lane(x_out, 16, 0), lane(y_out, 16, 0), it.f, it.n, 16, "w16");
        else begin
          check_lane(lane(it.z, 8, 1), lane(x_out, 8, 1), lane(y_out, 8, 1), it.f, it.n, 8, "H");
          check_lane(lane(it.z, 8, 0), lane(x_out, 8, 0), lane(y_out, 8, 0), it.f, it.n, 8, "L");
        end
      end
    end
  end

  function automatic int rnd_val(int f);
    int lim = 1 << f;   // |z| <= 1.0
    return $urandom_range(2 * lim) - lim;
  endfunction

  initial begin
    rst_n = 1; #1 rst_n = 0;  // a real falling edge for the asynchronous reset
    valid_in = 0; mode_in = MODE_8; frac_in = '0; z_in = '0; tag_in = '0;
    stages_in = 3'(STAGES);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 600; k++) begin
      item_t it;
      @(negedge clk);
      it.mode = pmode_t'($urandom_range(1));
      if (it.mode == MODE_16) begin
        it.f = $urandom_range(13, 8);
        it.z = 16'(rnd_val(it.f));
      end else begin
        it.f = $urandom_range(6, 3);
        it.z = {8'(rnd_val(it.f)), 8'(rnd_val(it.f))};
      end
      it.n   = ($urandom_range(3) == 0) ? $urandom_range(STAGES, 1) : STAGES;
      it.tag = 8'(k);
      it.due = cycle + STAGES;
      valid_in = 1; mode_in = it.mode; frac_in = frac_t'(it.f); z_in = it.z; tag_in = it.tag;
      stages_in = 3'(it.n);
      q.push_back(it);
    end
    @(negedge clk);
    valid_in = 0;
    repeat (STAGES + 3) @(negedge clk);
    if (q.size() != 0) begin failures++; $display("FAIL: %0d missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
