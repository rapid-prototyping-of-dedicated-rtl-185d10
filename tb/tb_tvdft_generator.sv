// tb_tvdft_generator: self-checking test of the sine generator unit.
// Feeds F0 and M, then the start phase A0, then the frequency step dF for
// every sample, and compares each output word with a reference model
//   F <- F + dF ; A <- A + F ; y = A*(M - A)   (modulo 2^16)
// at the clock it is due: first 72 clocks after start, then every 68 clocks
// (checked one clock early too, where the previous word must still show).
// Two frames are run with different constants, the second after a restart.
module tb_tvdft_generator;
  import ucm_pkg::*;
  localparam int WD = 16, FIRST = 72, PERIOD = 68, NSAMP = 30;

  logic clk = 0, rst_n = 0, start = 0, prog_we = 0, busy;
  logic [WD-1:0] in1 = '0, in2 = '0, out1, out2;
  logic [1:0] in_take;
  int checks = 0, failures = 0;

  tvdft_generator dut (.clk, .rst_n, .start, .prog_we, .prog_addr('0), .prog_data('0),
                       .in1, .in2, .out1, .out2, .in_take, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(logic [WD-1:0] f0, logic [WD-1:0] df, logic [WD-1:0] m, logic [WD-1:0] a0);
    logic [WD-1:0] f, a, y, prev;
    int n, k, in2_takes;
    f = f0; a = a0; prev = out1;
    in1 = f0; in2 = m;
    start = 1; @(negedge clk); start = 0;
    n = 0; k = 0; in2_takes = 0;
    while (k < NSAMP) begin
      logic t1, t2;
      t1 = in_take[0]; t2 = in_take[1];
      // clock n is ending; check the word due at the start of clock n+1
      @(negedge clk);
      n++;
      if (t1) in1 = df;
      if (t2) begin in2_takes++; in2 = a0; end
      if (n == FIRST + k * PERIOD - 1) begin
        checks++;
        if (out1 !== prev) begin failures++; $display("FAIL early change at clock %0d", n); end
      end
      if (n == FIRST + k * PERIOD) begin
        f = f + df; a = a + f; y = WD'(a * (m - a));
        checks++;
        if (out1 !== y) begin
          failures++; $display("FAIL sample %0d got %0d exp %0d", k, out1, y);
        end
        prev = y;
        k++;
      end
    end
    checks++;
    if (in2_takes != 2) begin failures++; $display("FAIL IN_2 taken %0d times", in2_takes); end
  endtask

  initial begin
    @(negedge clk); rst_n = 1;
    frame(16'd1, 16'd1, 16'd256, 16'd0);
    frame(16'd7, 16'hfffe, 16'd200, 16'd100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
