// tb_ucm_shift_reg: self-checking test of the UCM word register.
// Checks reset, parallel loads from RAM data and from the input, hold, and
// that WIDTH shifts send the word out LSB first while a serial word comes in.
module tb_ucm_shift_reg;
  import ucm_pkg::*;
  localparam int WD = 16;

  logic clk = 0, rst_n = 0, sin = 0, sout;
  reg_mode_e mode = R_HOLD;
  logic [WD-1:0] ram_d = '0, in_d = '0, q;
  int checks = 0, failures = 0;

  ucm_shift_reg #(.WIDTH(WD)) dut (.clk, .rst_n, .mode, .sin, .ram_d, .in_d, .q, .sout);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [WD-1:0] exp, string what);
    checks++;
    if (q !== exp) begin failures++; $display("FAIL %s: q=%h exp=%h", what, q, exp); end
  endtask

  initial begin
    logic [WD-1:0] w, s, outbits;
    @(negedge clk); check('0, "reset");
    rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      w = WD'($urandom); s = WD'($urandom);
      @(negedge clk); mode = R_LOAD_RAM; ram_d = w; in_d = ~w;
      @(negedge clk); mode = R_HOLD; check(w, "load ram");
      @(negedge clk); check(w, "hold");
      mode = R_LOAD_IN; in_d = s; ram_d = ~s;
      @(negedge clk); check(s, "load in");
      // swap: shift s out, shift w in
      for (int i = 0; i < WD; i++) begin
        mode = R_SHIFT; sin = w[i]; outbits[i] = sout;
        @(negedge clk);
      end
      mode = R_HOLD;
      checks++;
      if (outbits !== s) begin failures++; $display("FAIL serial out %h exp %h", outbits, s); end
      check(w, "serial in");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
