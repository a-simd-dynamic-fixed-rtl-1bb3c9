// tb_pe_workloads: the processing engine on dot products the size of real
// network layers, in every number format of the accuracy study.
//
// Formats: sfixed<8,5>, <8,4>, <8,3>, <8,2> (8-bit mode) and sfixed<16,12>,
// <16,11>, <16,10> (16-bit mode).  Dot-product lengths: 400 terms (largest
// LeNet-5 layer, 5x5x16), 4096 terms (fully connected layer of a CIFAR-10
// AlexNet) and 4608 terms (largest VGG16 layer, 3x3x512).  Each pair is
// run with ReLU, sigmoid and tanh.  In 8-bit mode a "term" carries four
// products, so one burst computes two dot products of 2*len products each.
//
// Features are drawn from +-0.5 and weights from {-1, 0, +1} LSB so that the
// long sums stay mostly inside the output range.  Expected values come
// from 64-bit integer sums and the CORDIC lane model of af_ref_pkg; the
// test also checks that a burst of len terms occupies exactly len input
// cycles (four 8-bit or one 16-bit product per cycle) and that the result
// leaves 2 and 13 cycles after the last term.
module tb_pe_workloads;
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

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  simd_pe dut (.*);

  typedef struct {
    word_t  macc;
    word_t  out;
    pmode_t mode;
    int     due;
  } exp_t;
  exp_t macq[$];
  exp_t outq[$];

  function automatic longint sat(longint v, int n);
    longint hi = (64'sd1 <<< (n - 1)) - 1;
    longint lo = -(64'sd1 <<< (n - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  function automatic longint s8(logic [7:0] b);   return longint'($signed(b)); endfunction
  function automatic longint s16(logic [15:0] b); return longint'($signed(b)); endfunction

  function automatic logic [7:0] rnd_x8(int f);
    int h = 1 << (f - 1);
    return 8'($urandom_range(2 * h) - h);
  endfunction

  function automatic logic [7:0] rnd_w8();
    return 8'(int'($urandom_range(2)) - 1);
  endfunction

  task automatic run_layer(pmode_t m, int f, int len, int sel);
    longint a1, a2;
    exp_t   e;
    int     t0;
    a1 = 0; a2 = 0;
    for (int t = 0; t < len; t++) begin
      logic [31:0] x, w;
      if (m == MODE_16) begin
        int h = 1 << (f - 1);
        x = 32'(16'($urandom_range(2 * h) - h));
        w = 32'(16'(int'($urandom_range(2)) - 1));
      end else begin
        for (int l = 0; l < 4; l++) begin
          x[8*l +: 8] = rnd_x8(f);
          w[8*l +: 8] = rnd_w8();
        end
      end
      @(negedge clk);
      if (t == 0) t0 = cycle;
      valid_in = 1; first_in = (t == 0); last_in = (t == len - 1);
      mode_in = m; frac_in = frac_t'(f); af_sel = af_sel_t'(sel); af_stages = 3'd5;
      in_data = x; wt_data = w; bias = '0;
      if (m == MODE_16) a1 += s16(x[15:0]) * s16(w[15:0]);
      else begin
        a1 += s8(x[31:24]) * s8(w[31:24]) + s8(x[23:16]) * s8(w[23:16]);
        a2 += s8(x[15:8]) * s8(w[15:8]) + s8(x[7:0]) * s8(w[7:0]);
      end
    end
    // one term per cycle: len terms span len input cycles
    checks++;
    if (cycle - t0 != len - 1) begin
      failures++; $display("FAIL: burst of %0d terms took %0d cycles", len, cycle - t0 + 1);
    end
    if (m == MODE_16) begin
      e.macc = 16'(sat(a1 >>> f, 16));
      e.out  = 16'(act(lane(e.macc, 16, 0), sel, f, 16, 5));
    end else begin
      e.macc = {8'(sat(a1 >>> f, 8)), 8'(sat(a2 >>> f, 8))};
      e.out  = {8'(act(lane(e.macc, 8, 1), sel, f, 8, 5)), 8'(act(lane(e.macc, 8, 0), sel, f, 8, 5))};
    end
    e.mode = m;
    e.due  = cycle + MAC_LAT;
    macq.push_back(e);
    e.due  = cycle + PE_LAT;
    outq.push_back(e);
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
          $display("FAIL pe_out=%h exp=%h cycle=%0d due=%0d", pe_out, e.out, cycle, e.due);
        end
      end
    end
  end

  initial begin
    int fmt_n[7] = '{8, 8, 8, 8, 16, 16, 16};
    int fmt_f[7] = '{5, 4, 3, 2, 12, 11, 10};
    int lens[3]  = '{400, 4096, 4608};
    rst_n = 1; #1 rst_n = 0;  // a real falling edge for the asynchronous reset
    valid_in = 0; first_in = 0; last_in = 0; mode_in = MODE_8; frac_in = '0;
    af_sel = AF_RELU; af_stages = 3'd5; in_data = '0; wt_data = '0; bias = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int fi = 0; fi < 7; fi++)
      for (int li = 0; li < 3; li++)
        for (int sel = 0; sel < 3; sel++)
          run_layer(fmt_n[fi] == 16 ? MODE_16 : MODE_8, fmt_f[fi], lens[li], sel);
    @(negedge clk);
    valid_in = 0; first_in = 0; last_in = 0;
    repeat (PE_LAT + 3) @(negedge clk);
    if (macq.size() != 0 || outq.size() != 0) begin
      failures++; $display("FAIL: results missing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
