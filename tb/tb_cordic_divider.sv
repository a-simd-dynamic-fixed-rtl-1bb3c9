// tb_cordic_divider: self-checking test of the pipelined SIMD division
// CORDIC.
//
// One item in four uses a random reduced stage count (bit-exact check
// only).  A new random operand pair enters every cycle, mixing MODE_8 (two lanes,
// f = 3..6) and MODE_16 (f = 8..13) items.  Divisors of either sign have
// magnitude 0.5..1.9 and dividends are chosen with |y| < 0.95|x|.  Each
// quotient is checked bit-exactly against the lane model in af_ref_pkg,
// against the real y/x within 2*2^-min(f,STAGES) + 4 LSB, and for its
// latency of STAGES cycles.
module tb_cordic_divider;
  import pe_pkg::*;
  import af_ref_pkg::*;

  localparam int STAGES = 5;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        valid_in;
  pmode_t      mode_in;
  frac_t       frac_in;
  word_t       x_in, y_in;
  logic [2:0]  stages_in;
  logic [7:0]  tag_in;
  logic        valid_out;
  pmode_t      mode_out;
  frac_t       frac_out;
  word_t       x_out, q_out;
  logic [7:0]  tag_out;

  int checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  cordic_divider #(.STAGES(STAGES), .TAG_W(8)) dut (.*);

  typedef struct {
    word_t  x, y;
    pmode_t mode;
    int     f;
    int     n;
    int     due;
    logic [7:0] tag;
  } item_t;
  item_t q[$];

  task automatic check_lane(int xl, int yl, int ql, int f, int n, int w, string nm);
    int  qe;
    real sc, tol;
    qe = div(xl, yl, f, w, n);
    checks++;
    if (ql != qe) begin
      failures++;
      $display("FAIL %s: x=%0d y=%0d f=%0d q=%0d exp %0d", nm, xl, yl, f, ql, qe);
    end
    if (n != STAGES) return;
    sc  = 2.0 ** f;
    tol = 2.0 * 2.0 ** (-((f < STAGES) ? f : STAGES)) + 4.0 / sc;
    checks++;
    if (fabs(ql / sc - real'(yl) / real'(xl)) > tol) begin
      failures++;
      $display("FAIL %s accuracy: %f / %f = %f got %f", nm, yl / sc, xl / sc,
               real'(yl) / real'(xl), ql / sc);
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
        if (cycle != it.due || tag_out != it.tag || mode_out != it.mode || x_out != it.x) begin
          failures++; $display("FAIL: timing/tag cycle=%0d due=%0d", cycle, it.due);
        end
        if (it.mode == MODE_16)
          check_lane(lane(it.x, 16, 0), lane(it.y, 16, 0), lane(q_out, 16, 0), it.f, it.n, 16, "w16");
        else begin
          check_lane(lane(it.x, 8, 1), lane(it.y, 8, 1), lane(q_out, 8, 1), it.f, it.n, 8, "H");
          check_lane(lane(it.x, 8, 0), lane(it.y, 8, 0), lane(q_out, 8, 0), it.f, it.n, 8, "L");
        end
      end
    end
  end

  function automatic void rnd_pair(int f, output int x, output int y);
    int mx;
    x  = $urandom_range((19 << f) / 10, 1 << (f - 1));
    mx = (x * 95) / 100;
    y  = $urandom_range(2 * mx) - mx;
    if ($urandom_range(1)) x = -x;
  endfunction

  initial begin
    rst_n = 1; #1 rst_n = 0;  // a real falling edge for the asynchronous reset
    valid_in = 0; mode_in = MODE_8; frac_in = '0; x_in = '0; y_in = '0;
    tag_in = '0; stages_in = 3'(STAGES);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 600; k++) begin
      item_t it;
      int xa, ya, xb, yb;
      @(negedge clk);
      it.mode = pmode_t'($urandom_range(1));
      if (it.mode == MODE_16) begin
        it.f = $urandom_range(13, 8);
        rnd_pair(it.f, xa, ya);
        it.x = 16'(xa); it.y = 16'(ya);
      end else begin
        it.f = $urandom_range(6, 3);
        rnd_pair(it.f, xa, ya);
        rnd_pair(it.f, xb, yb);
        it.x = {8'(xa), 8'(xb)}; it.y = {8'(ya), 8'(yb)};
      end
      it.n   = ($urandom_range(3) == 0) ? $urandom_range(STAGES, 1) : STAGES;
      it.tag = 8'(k);
      it.due = cycle + STAGES;
      valid_in = 1; mode_in = it.mode; frac_in = frac_t'(it.f); x_in = it.x; y_in = it.y;
      tag_in = it.tag; stages_in = 3'(it.n);
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
