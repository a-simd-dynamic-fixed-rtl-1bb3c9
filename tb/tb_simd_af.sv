// tb_simd_af: self-checking test of the unified SIMD activation unit.
//
// One random item enters every cycle with a random function (ReLU, sigmoid,
// tanh), precision mode, fraction count and (for one item in four) a
// reduced CORDIC stage count, so these switch between consecutive items.  sigmoid/tanh inputs are limited to |x| <= 1.0,
// the convergence range of the hyperbolic CORDIC.  Each result is checked
// bit-exactly against the lane model in af_ref_pkg, against the real
// function within 0.05 + 2*2^-min(f,5) + 2 LSB, and for its latency of
// 2*STAGES + 1 cycles.
module tb_simd_af;
  import pe_pkg::*;
  import af_ref_pkg::*;

  localparam int STAGES  = 5;
  localparam int LATENCY = 2 * STAGES + 1;

  logic    clk = 1'b0;
  logic    rst_n;
  logic    valid_in;
  pmode_t  mode_in;
  frac_t   frac_in;
  af_sel_t af_sel;
  logic [2:0] stages_in;
  word_t   af_in;
  logic    valid_out;
  pmode_t  mode_out;
  word_t   af_out;

  int checks = 0, failures = 0, cycle = 0;
  int n_sel[3] = '{0, 0, 0};
  int n_switch = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  simd_af #(.STAGES(STAGES)) dut (.*);

  typedef struct {
    word_t  a;
    pmode_t mode;
    int     f;
    int     sel;
    int     n;
    int     due;
  } item_t;
  item_t q[$];

  task automatic check_lane(int al, int ol, int sel, int f, int n, int w, string nm);
    int  oe;
    real sc, xr, ref_v, tol;
    oe = act(al, sel, f, w, n);
    checks++;
    if (ol != oe) begin
      failures++;
      $display("FAIL %s: sel=%0d a=%0d f=%0d out=%0d exp %0d", nm, sel, al, f, ol, oe);
    end
    if (n != STAGES) return;
    sc = 2.0 ** f;
    xr = al / sc;
    case (sel)
      0:       ref_v = (xr < 0.0) ? 0.0 : xr;
      1:       ref_v = 1.0 / (1.0 + $exp(-xr));
      default: ref_v = $tanh(xr);
    endcase
    tol = 0.05 + 2.0 * 2.0 ** (-((f < STAGES) ? f : STAGES)) + 2.0 / sc;
    checks++;
    if (fabs(ol / sc - ref_v) > tol) begin
      failures++;
      $display("FAIL %s accuracy: sel=%0d x=%f got %f ref %f", nm, sel, xr, ol / sc, ref_v);
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
        if (cycle != it.due || mode_out != it.mode) begin
          failures++; $display("FAIL: timing cycle=%0d due=%0d", cycle, it.due);
        end
        if (it.mode == MODE_16)
          check_lane(lane(it.a, 16, 0), lane(af_out, 16, 0), it.sel, it.f, it.n, 16, "w16");
        else begin
          check_lane(lane(it.a, 8, 1), lane(af_out, 8, 1), it.sel, it.f, it.n, 8, "H");
          check_lane(lane(it.a, 8, 0), lane(af_out, 8, 0), it.sel, it.f, it.n, 8, "L");
        end
      end
    end
  end

  function automatic int rnd_val(int f, int sel, int w);
    int lim;
    lim = (sel == 0) ? (1 << (w - 1)) - 1 : (1 << f);
    return $urandom_range(2 * lim) - lim;
  endfunction

  initial begin
    pmode_t last_mode;
    rst_n = 1; #1 rst_n = 0;  // a real falling edge for the asynchronous reset
    valid_in = 0; mode_in = MODE_8; frac_in = '0; af_sel = AF_RELU; af_in = '0;
    stages_in = 3'(STAGES);
    last_mode = MODE_8;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 900; k++) begin
      item_t it;
      @(negedge clk);
      it.mode = pmode_t'($urandom_range(1));
      it.sel  = $urandom_range(2);
      if (it.mode == MODE_16) begin
        it.f = $urandom_range(12, 8);
        it.a = 16'(rnd_val(it.f, it.sel, 16));
      end else begin
        it.f = $urandom_range(5, 3);
        it.a = {8'(rnd_val(it.f, it.sel, 8)), 8'(rnd_val(it.f, it.sel, 8))};
      end
      it.n   = ($urandom_range(3) == 0) ? $urandom_range(STAGES, 1) : STAGES;
      it.due = cycle + LATENCY;
      if (k > 0 && it.mode != last_mode) n_switch++;
      last_mode = it.mode;
      n_sel[it.sel]++;
      valid_in = 1; mode_in = it.mode; frac_in = frac_t'(it.f); af_sel = af_sel_t'(it.sel);
      af_in = it.a; stages_in = 3'(it.n);
      q.push_back(it);
    end
    @(negedge clk);
    valid_in = 0;
    repeat (LATENCY + 3) @(negedge clk);
    if (q.size() != 0) begin failures++; $display("FAIL: %0d missing", q.size()); end
    if (n_switch == 0 || n_sel[0] == 0 || n_sel[1] == 0 || n_sel[2] == 0) begin
      failures++; $display("FAIL: coverage");
    end
    $display("relu=%0d sigmoid=%0d tanh=%0d mode switches=%0d", n_sel[0], n_sel[1], n_sel[2],
             n_switch);
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
