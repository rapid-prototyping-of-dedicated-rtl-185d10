// tb_tvdft_top: end-to-end test of the TVDFT processor at its default size.
// Frame 1 and frame 2 run the reset-loaded microprograms with different
// generator settings (cosine generator started a quarter period ahead:
// A0 = M/2); between frames 2 and 3 the transform unit is reconfigured by
// rewriting one control word so that it subtracts the products instead of
// adding them. Every 68 clocks the test checks the cos and sin samples
// (due 72 + 68*k clocks after start) and the running Re/Im sums (due
// 117 + 68*k) against a reference model in modulo-2^16 arithmetic, and the
// clock at which each x(n) is taken (81 + 68*k). It counts each mechanism
// (generator frequency-step reads, x(n) reads, cos/sin reads through the
// input multiplexers, frame restarts, control-memory rewrites) and counts a
// failure for any that never happened.
module tb_tvdft_top;
  import ucm_pkg::*;
  import tvdft_prog_pkg::*;
  localparam int WD = 16, NSAMP = 64, PERIOD = 68;
  localparam int T_GEN = 72, T_X = 81, T_RES = 117;

  logic clk = 0, rst_n = 0, start = 0, prog_we = 0, x_take, trig_take;
  logic [1:0] prog_unit = '0, cos_in_take, sin_in_take;
  logic [CM_AW-1:0] prog_addr = '0;
  ucm_ctl_t prog_data = '0;
  logic [WD-1:0] cos_in1 = '0, cos_in2 = '0, sin_in1 = '0, sin_in2 = '0, x_in = '0;
  logic [WD-1:0] cos_out1, sin_out2, cos_value, sin_value, re_out, im_out;
  logic [2:0] busy;
  int checks = 0, failures = 0;
  int n_df_takes = 0, n_x_takes = 0, n_trig_takes = 0, n_restarts = 0, n_rewrites = 0;

  tvdft_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [WD-1:0] got, logic [WD-1:0] exp, string what, int k);
    checks++;
    if (got !== exp) begin
      failures++; $display("FAIL %s sample %0d: got %0d exp %0d", what, k, got, exp);
    end
  endtask

  // One frame; sign = +1 accumulates x*cos, x*sin; -1 subtracts them.
  task automatic frame(logic [WD-1:0] f0, logic [WD-1:0] df, logic [WD-1:0] m, int sign);
    logic [WD-1:0] fc, ac, fs, as_, yc [NSAMP], ys [NSAMP], xs [NSAMP], re, im;
    int n, kg, kx, kr;
    bit cos_a0_sent, sin_a0_sent;
    // reference generator sequences
    fc = f0; ac = m / 2; fs = f0; as_ = '0;
    for (int k = 0; k < NSAMP; k++) begin
      fc += df; ac += fc; yc[k] = WD'(ac * (m - ac));
      fs += df; as_ += fs; ys[k] = WD'(as_ * (m - as_));
      xs[k] = WD'($urandom_range(0, 255)) - 16'd128;
    end
    re = '0; im = '0;
    cos_in1 = f0; sin_in1 = f0; cos_in2 = m; sin_in2 = m; x_in = xs[0];
    cos_a0_sent = 0; sin_a0_sent = 0;
    start = 1; @(negedge clk); start = 0;
    n_restarts++;
    n = 0; kg = 0; kx = 0; kr = 0;
    while (kr < NSAMP) begin
      logic [1:0] ct, st;
      logic xt, tt;
      ct = cos_in_take; st = sin_in_take; xt = x_take; tt = trig_take;
      if (xt) begin
        checks++;
        if (n != T_X + kx * PERIOD) begin failures++; $display("FAIL x(n) read at clock %0d", n); end
      end
      @(negedge clk);
      n++;
      // replace each input word once it has been taken
      if (ct[0]) begin cos_in1 = df; n_df_takes++; end
      if (st[0]) begin sin_in1 = df; n_df_takes++; end
      if (ct[1] && !cos_a0_sent) begin cos_in2 = m / 2; cos_a0_sent = 1; end
      if (st[1] && !sin_a0_sent) begin sin_in2 = '0; sin_a0_sent = 1; end
      if (xt) begin n_x_takes++; kx++; if (kx < NSAMP) x_in = xs[kx]; end
      if (tt) n_trig_takes++;
      if (kg < NSAMP && n == T_GEN + kg * PERIOD) begin
        chk(cos_value, yc[kg], "cos", kg);
        chk(sin_value, ys[kg], "sin", kg);
        kg++;
      end
      if (n == T_RES + kr * PERIOD) begin
        if (sign > 0) begin re += WD'(xs[kr] * yc[kr]); im += WD'(xs[kr] * ys[kr]); end
        else          begin re -= WD'(xs[kr] * yc[kr]); im -= WD'(xs[kr] * ys[kr]); end
        chk(re_out, re, "Re", kr);
        chk(im_out, im, "Im", kr);
        kr++;
      end
    end
  endtask

  initial begin
    ucm_prog_t p;
    @(negedge clk); rst_n = 1;
    frame(16'd2, 16'd1, 16'd256, 1);
    frame(16'd5, 16'hffff, 16'd180, 1);
    // reconfigure the transform: accumulate acc - product instead of acc + product
    p = transform_program();
    p[10] = pe_step(pe_step('0, 0, PE_SUB, R12, R11, R11), 1, PE_SUB, R22, R21, R21);
    prog_we = 1; prog_unit = 2'd2; prog_addr = CM_AW'(10); prog_data = p[10];
    @(negedge clk);
    prog_we = 0;
    n_rewrites++;
    frame(16'd3, 16'd2, 16'd240, -1);
    checks += 5;
    if (n_df_takes    < 2 * 3 * NSAMP) begin failures++; $display("FAIL dF reads %0d", n_df_takes); end
    if (n_x_takes     != 3 * NSAMP) begin failures++; $display("FAIL x reads %0d", n_x_takes); end
    if (n_trig_takes  != 3 * NSAMP) begin failures++; $display("FAIL cos/sin reads %0d", n_trig_takes); end
    if (n_restarts    == 0) failures++;
    if (n_rewrites    == 0) failures++;
    $display("mechanisms: dF reads=%0d x reads=%0d cos/sin reads=%0d restarts=%0d rewrites=%0d",
             n_df_takes, n_x_takes, n_trig_takes, n_restarts, n_rewrites);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
