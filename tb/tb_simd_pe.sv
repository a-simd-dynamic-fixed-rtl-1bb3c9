// tb_simd_pe: end-to-end test of the processing engine at its default
// parameters.
//
// Random dot products (1..16 terms) are streamed through the engine, one
// term per cycle, with random precision mode, fraction count, activation
// function and bias, and mostly without gaps between bursts.  For each
// burst the expected quantised MAC result is computed here with 64-bit
// integers (sum of products + bias*2^f, shifted right by f, saturated to
// 8 or 16 bits), and the expected activation with the lane model of
// af_ref_pkg.  Both outputs are checked bit-exactly together with their
// latencies (2 and 13 cycles after the last term); sigmoid and tanh results
// whose input lies in |x| <= 1 are also checked against the real function.
// The test counts every mechanism of the engine and fails if one never
// occurred: both precision modes, mode switches between bursts, saturation
// of the MAC result, multi-term accumulation, each activation function and
// a reduced CORDIC stage count.
module tb_simd_pe;
  import pe_pkg::*;
  import af_ref_pkg::*;

  localparam int MAC_LAT = 2;
  localparam int PE_LAT  = 13;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        valid_in, first_in, last_in;
  pmode_t      mode_in;
  frac_t       frac_in;
  af_sel_t     af_sel;
  logic [2:0]  af_stages;
  logic [31:0] in_data, wt_data;
  word_t       bias;
  logic        macc_valid;
  word_t       macc;
  logic        valid_out;
  pmode_t      mode_out;
  word_t       pe_out;

  int checks = 0, failures = 0, cycle = 0;
  int n_mode8 = 0, n_mode16 = 0, n_switch = 0, n_sat = 0, n_multi = 0;
  int n_sel[3] = '{0, 0, 0};
  int n_acc_checked = 0;
  int n_short = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  simd_pe dut (.*);

  typedef struct {
    word_t  macc;
    word_t  out;
    pmode_t mode;
    int     f;
    int     sel;
    int     n;
    int     due;
  } exp_t;
  exp_t macq[$];
  exp_t outq[$];

  function automatic longint sat(longint v, int n, ref int hit);
    longint hi = (64'sd1 <<< (n - 1)) - 1;
    longint lo = -(64'sd1 <<< (n - 1));
    if (v > hi) begin hit = 1; return hi; end
    if (v < lo) begin hit = 1; return lo; end
    return v;
  endfunction

  function automatic longint s8(logic [7:0] b);   return longint'($signed(b)); endfunction
  function automatic longint s16(logic [15:0] b); return longint'($signed(b)); endfunction

  task automatic run_burst(pmode_t m, int len, int f, int sel, int n, bit big);
    longint a1, a2;
    logic [15:0] b;
    exp_t e;
    int hit;
    b = 16'($urandom);
    if (!big) b = (m == MODE_16) ? 16'($signed(b) >>> 6) : {b[15:8] >>> 2, b[7:0] >>> 2};
    if (m == MODE_16) a1 = s16(b) <<< f;
    else begin
      a1 = s8(b[15:8]) <<< f;
      a2 = s8(b[7:0]) <<< f;
    end
    for (int t = 0; t < len; t++) begin
      logic [31:0] x, w;
      x = $urandom; w = $urandom;
      if (!big) begin
        // small operands: |x| < 2^(f-1), |w| < 2^(f-2) keep the sums near 1.0
        if (m == MODE_16) begin
          x = 32'(16'($signed(16'(x)) >>> (16 - f)));
          w = 32'(16'($signed(16'(w)) >>> (18 - f)));
        end else begin
          for (int l = 0; l < 4; l++) begin
            x[8*l +: 8] = 8'($signed(x[8*l +: 8]) >>> (8 - f));
            w[8*l +: 8] = 8'($signed(w[8*l +: 8]) >>> (10 - f));
          end
        end
      end
      @(negedge clk);
      valid_in = 1'b1; first_in = (t == 0); last_in = (t == len - 1);
      mode_in = m; frac_in = frac_t'(f); af_sel = af_sel_t'(sel); af_stages = 3'(n);
      in_data = x; wt_data = w; bias = b;
      if (m == MODE_16) a1 += s16(x[15:0]) * s16(w[15:0]);
      else begin
        a1 += s8(x[31:24]) * s8(w[31:24]) + s8(x[23:16]) * s8(w[23:16]);
        a2 += s8(x[15:8]) * s8(w[15:8]) + s8(x[7:0]) * s8(w[7:0]);
      end
    end
    hit = 0;
    if (m == MODE_16) begin
      e.macc = 16'(sat(a1 >>> f, 16, hit));
      e.out  = 16'(act(lane(e.macc, 16, 0), sel, f, 16, n));
      n_mode16++;
    end else begin
      e.macc = {8'(sat(a1 >>> f, 8, hit)), 8'(sat(a2 >>> f, 8, hit))};
      e.out  = {8'(act(lane(e.macc, 8, 1), sel, f, 8, n)), 8'(act(lane(e.macc, 8, 0), sel, f, 8, n))};
      n_mode8++;
    end
    n_sat += hit;
    if (len > 1) n_multi++;
    n_sel[sel]++;
    e.mode = m; e.f = f; e.sel = sel; e.n = n;
    if (n != 5) n_short++;
    e.due = cycle + MAC_LAT;
    macq.push_back(e);
    e.due = cycle + PE_LAT;
    outq.push_back(e);
  endtask

  task automatic check_real(int a, int o, int sel, int f, int n);
    real sc, xr, r, tol;
    sc = 2.0 ** f;
    xr = a / sc;
    if (sel == 0 || n != 5 || fabs(xr) > 1.0) return;
    // 1 + e^-x must fit the lane for sigmoid
    if (sel == 1 && f > 5 && f < 8) return;
    r   = (sel == 1) ? 1.0 / (1.0 + $exp(-xr)) : $tanh(xr);
    tol = 0.05 + 2.0 * 2.0 ** (-((f < 5) ? f : 5)) + 2.0 / sc;
    checks++;
    n_acc_checked++;
    if (fabs(o / sc - r) > tol) begin
      failures++;
      $display("FAIL accuracy: sel=%0d x=%f got %f ref %f", sel, xr, o / sc, r);
    end
  endtask

  always @(negedge clk) begin
    if (rst_n && macc_valid) begin
      exp_t e;
      checks++;
      if (macq.size() == 0) begin failures++; $display("FAIL: unexpected macc"); end
      else begin
        e = macq.pop_front();
        if (macc !== e.macc || cycle != e.due) begin
          failures++;
          $display("FAIL macc=%h exp=%h cycle=%0d due=%0d", macc, e.macc, cycle, e.due);
        end
      end
    end
    if (rst_n && valid_out) begin
      exp_t e;
      checks++;
      if (outq.size() == 0) begin failures++; $display("FAIL: unexpected pe_out"); end
      else begin
        e = outq.pop_front();
        if (pe_out !== e.out || mode_out !== e.mode || cycle != e.due) begin
          failures++;
          $display("FAIL pe_out=%h exp=%h sel=%0d mode=%0d cycle=%0d due=%0d", pe_out, e.out,
                   e.sel, e.mode, cycle, e.due);
        end
        if (e.mode == MODE_16) check_real(lane(e.macc, 16, 0), lane(pe_out, 16, 0), e.sel, e.f, e.n);
        else begin
          check_real(lane(e.macc, 8, 1), lane(pe_out, 8, 1), e.sel, e.f, e.n);
          check_real(lane(e.macc, 8, 0), lane(pe_out, 8, 0), e.sel, e.f, e.n);
        end
      end
    end
  end

  initial begin
    pmode_t last_mode;
    rst_n = 1; #1 rst_n = 0;  // a real falling edge for the asynchronous reset
    valid_in = 0; first_in = 0; last_in = 0; mode_in = MODE_8; frac_in = '0;
    af_sel = AF_RELU; af_stages = 3'd5; in_data = '0; wt_data = '0; bias = '0;
    last_mode = MODE_8;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 500; k++) begin
      pmode_t m;
      int f;
      m = pmode_t'($urandom_range(1));
      f = (m == MODE_16) ? $urandom_range(12, 8) : $urandom_range(5, 3);
      if (k > 0 && m != last_mode) n_switch++;
      last_mode = m;
      run_burst(m, $urandom_range(16, 1), f, $urandom_range(2),
                ($urandom_range(4) == 0) ? $urandom_range(4, 1) : 5, $urandom_range(7) == 0);
      if ($urandom_range(4) == 0) begin
        @(negedge clk);
        valid_in = 0; first_in = 0; last_in = 0;
        repeat ($urandom_range(2)) @(negedge clk);
      end
    end
    @(negedge clk);
    valid_in = 0; first_in = 0; last_in = 0;
    repeat (PE_LAT + 3) @(negedge clk);
    if (macq.size() != 0 || outq.size() != 0) begin
      failures++; $display("FAIL: results missing");
    end
    $display("bursts MODE_8=%0d MODE_16=%0d, mode switches=%0d, saturated=%0d, multi-term=%0d",
             n_mode8, n_mode16, n_switch, n_sat, n_multi);
    $display("ReLU=%0d sigmoid=%0d tanh=%0d, reduced stage count=%0d, accuracy checks=%0d",
             n_sel[0], n_sel[1], n_sel[2], n_short, n_acc_checked);
    if (n_mode8 == 0 || n_mode16 == 0 || n_switch == 0 || n_sat == 0 || n_multi == 0 ||
        n_sel[0] == 0 || n_sel[1] == 0 || n_sel[2] == 0 || n_acc_checked == 0 ||
        n_short == 0) begin
      failures++; $display("FAIL: a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
