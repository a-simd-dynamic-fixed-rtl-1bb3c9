// tb_simd_mac: self-checking test of the multi-precision MAC unit.
//
// Starts with two single-term examples whose results were worked out by
// hand, one per mode, then drives random dot products of random length (1..12 terms) in both
// precision modes with random fraction counts and biases, including
// back-to-back bursts, large operands that overflow and must saturate, and
// single-term products.  The expected result is computed here with plain
// 64-bit integer arithmetic: sum of products plus bias * 2^f, shifted right
// by f (floor) and saturated to 8 or 16 bits per result.  The test also
// checks that each result arrives exactly two cycles after its last term.
module tb_simd_mac;
  import pe_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        valid_in, first_in, last_in;
  pmode_t      mode_in;
  frac_t       frac_in;
  logic [31:0] in_data, wt_data;
  word_t       bias;
  logic        valid_out;
  pmode_t      mode_out;
  frac_t       frac_out;
  word_t       macc;

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_sat = 0, n_mode8 = 0, n_mode16 = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  simd_mac dut (.*);

  // expected results, queued by the driver
  typedef struct {
    logic [15:0] val;
    int          due;
    pmode_t      mode;
  } exp_t;
  exp_t expq[$];

  function automatic longint sat(longint v, int n);
    longint hi = (64'sd1 <<< (n - 1)) - 1;
    longint lo = -(64'sd1 <<< (n - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  function automatic longint s8(logic [7:0] b);   return longint'($signed(b)); endfunction
  function automatic longint s16(logic [15:0] b); return longint'($signed(b)); endfunction

  task automatic run_burst(pmode_t m, int len, int f, bit big);
    longint a1, a2, r1, r2;
    logic [15:0] b;
    exp_t e;
    b = 16'($urandom);
    if (m == MODE_16) a1 = s16(b) <<< f;
    else begin
      a1 = s8(b[15:8]) <<< f;
      a2 = s8(b[7:0]) <<< f;
    end
    for (int t = 0; t < len; t++) begin
      logic [31:0] x, w;
      x = $urandom; w = $urandom;
      if (!big) begin  // keep values small so most results stay in range
        x = x & 32'h0F0F_0F0F; w = w & 32'h0707_0707;
        if ($urandom_range(1)) x = x | 32'hF0F0_F0F0;
      end
      @(negedge clk);
      valid_in = 1'b1; first_in = (t == 0); last_in = (t == len - 1);
      mode_in = m; frac_in = frac_t'(f); in_data = x; wt_data = w; bias = b;
      if (m == MODE_16) a1 += s16(x[15:0]) * s16(w[15:0]);
      else begin
        a1 += s8(x[31:24]) * s8(w[31:24]) + s8(x[23:16]) * s8(w[23:16]);
        a2 += s8(x[15:8]) * s8(w[15:8]) + s8(x[7:0]) * s8(w[7:0]);
      end
    end
    if (m == MODE_16) begin
      r1 = sat(a1 >>> f, 16);
      if (r1 != (a1 >>> f)) n_sat++;
      e.val = 16'(r1);
      n_mode16++;
    end else begin
      r1 = sat(a1 >>> f, 8);
      r2 = sat(a2 >>> f, 8);
      if (r1 != (a1 >>> f) || r2 != (a2 >>> f)) n_sat++;
      e.val = {8'(r1), 8'(r2)};
      n_mode8++;
    end
    e.due  = cycle + 2;   // sampled at negedge of the last term's cycle
    e.mode = m;
    expq.push_back(e);
  endtask

  task automatic directed(pmode_t m, frac_t f, logic [31:0] x, logic [31:0] w,
                          logic [15:0] b, logic [15:0] expv);
    exp_t e;
    @(negedge clk);
    valid_in = 1'b1; first_in = 1'b1; last_in = 1'b1;
    mode_in = m; frac_in = f; in_data = x; wt_data = w; bias = b;
    e.val = expv; e.due = cycle + 2; e.mode = m;
    expq.push_back(e);
  endtask

  // checker
  always @(negedge clk) begin
    if (rst_n && valid_out) begin
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL: unexpected result %h", macc);
      end else begin
        exp_t e;
        e = expq.pop_front();
        if (macc !== e.val || mode_out !== e.mode || cycle != e.due) begin
          failures++;
          $display("FAIL: macc=%h exp=%h mode=%0d cycle=%0d due=%0d", macc, e.val, e.mode,
                   cycle, e.due);
        end
      end
    end
  end

  initial begin
    rst_n = 1'b1; #1 rst_n = 1'b0;  // a real falling edge for the asynchronous reset
    valid_in = 0; first_in = 0; last_in = 0; mode_in = MODE_8;
    frac_in = '0; in_data = '0; wt_data = '0; bias = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Worked examples, one term each.
    // MODE_16, f = 8: 1.5 * -2.25 + 0.5 = -2.875 -> -736 = 16'hFD20
    directed(MODE_16, 4'd8, 32'h0000_0180, 32'h0000_FDC0, 16'h0080, 16'hFD20);
    // MODE_8, f = 4: MAC1 = 1.0*0.5 + 0.5*0.25 + 0.25 = 0.875 -> 8'h0E
    //                MAC2 = -1.0*1.5 + 2.0*-0.5 - 1.0 = -3.5 -> 8'hC8
    directed(MODE_8, 4'd4, 32'h1008_F020, 32'h0804_18F8, 16'h04F0, 16'h0EC8);
    for (int k = 0; k < 400; k++) begin
      pmode_t m;
      m = pmode_t'($urandom_range(1));
      run_burst(m, $urandom_range(12, 1), $urandom_range(m == MODE_16 ? 14 : 6),
                $urandom_range(9) == 0);
      if ($urandom_range(3) == 0) begin
        @(negedge clk);
        valid_in = 1'b0; first_in = 0; last_in = 0;
        repeat ($urandom_range(3)) @(negedge clk);
      end
    end
    @(negedge clk);
    valid_in = 1'b0;
    repeat (5) @(negedge clk);
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", expq.size());
    end
    if (n_sat == 0 || n_mode8 == 0 || n_mode16 == 0) begin
      failures++;
      $display("FAIL: coverage sat=%0d m8=%0d m16=%0d", n_sat, n_mode8, n_mode16);
    end
    $display("saturated results: %0d, MODE_8 products: %0d, MODE_16 products: %0d",
             n_sat, n_mode8, n_mode16);
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
