// tb_tvdft_transform: self-checking test of the transform unit.
// Supplies random x(n), cos and sin words, each replaced after the unit has
// taken it, and checks the running sums Re = sum x*cos, Im = sum x*sin
// (modulo 2^16) at the clock they are due (117 + 68*j clocks after start),
// the clock at which each x(n) is taken (81 + 68*j), and that a restart
// clears both sums.
module tb_tvdft_transform;
  import ucm_pkg::*;
  localparam int WD = 16, XT = 81, RES = 117, PERIOD = 68, NSAMP = 25;

  logic clk = 0, rst_n = 0, start = 0, prog_we = 0, busy, x_take, trig_take;
  logic [WD-1:0] x_in = '0, cos_in = '0, sin_in = '0, re_out, im_out;
  int checks = 0, failures = 0;

  tvdft_transform dut (.clk, .rst_n, .start, .prog_we, .prog_addr('0), .prog_data('0),
                       .x_in, .cos_in, .sin_in, .re_out, .im_out, .x_take, .trig_take, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame();
    logic [WD-1:0] xs [NSAMP], cs [NSAMP], ss [NSAMP];
    logic [WD-1:0] re, im, pre, pim;
    int n, j, xi, ti;
    for (int i = 0; i < NSAMP; i++) begin
      xs[i] = WD'($urandom); cs[i] = WD'($urandom); ss[i] = WD'($urandom);
    end
    re = '0; im = '0; xi = 0; ti = 0;
    pre = re_out; pim = im_out;  // outputs hold the last frame's sums until the first new one
    x_in = xs[0]; cos_in = cs[0]; sin_in = ss[0];
    start = 1; @(negedge clk); start = 0;
    n = 0; j = 0;
    while (j < NSAMP) begin
      logic tx, tt;
      tx = x_take; tt = trig_take;
      if (tx) begin
        checks++;
        if (n != XT + xi * PERIOD) begin failures++; $display("FAIL x taken at clock %0d", n); end
      end
      @(negedge clk);
      n++;
      if (tx) begin xi++; if (xi < NSAMP) x_in = xs[xi]; end
      if (tt) begin ti++; if (ti < NSAMP) begin cos_in = cs[ti]; sin_in = ss[ti]; end end
      if (n == RES + j * PERIOD - 1) begin
        checks++;
        if (re_out !== pre || im_out !== pim) begin failures++; $display("FAIL early change at %0d", n); end
      end
      if (n == RES + j * PERIOD) begin
        re = re + WD'(xs[j] * cs[j]);
        im = im + WD'(xs[j] * ss[j]);
        checks += 2;
        if (re_out !== re) begin failures++; $display("FAIL Re %0d got %h exp %h", j, re_out, re); end
        if (im_out !== im) begin failures++; $display("FAIL Im %0d got %h exp %h", j, im_out, im); end
        pre = re; pim = im;
        j++;
      end
    end
  endtask

  initial begin
    @(negedge clk); rst_n = 1;
    frame();
    frame();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
