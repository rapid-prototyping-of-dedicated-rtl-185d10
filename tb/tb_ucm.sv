// tb_ucm: self-checking test of a three-PE universal computation module.
// A program written through the control-memory port loads four words from
// IN_1/IN_2, runs all three PEs in one serial step (add, multiply, subtract,
// with a register that is read and written in the same step), stores and
// reloads through both RAMs, negates, adds and writes both outputs:
//   OUT_1 = (a + b) + c*d,  OUT_2 = -(a - d)   (modulo 2^16)
// Results, the in_take strobes and the 53-clock run length are checked for
// random operands.
module tb_ucm;
  import ucm_pkg::*;
  localparam int WD = 16;

  logic clk = 0, rst_n = 0, start = 0, prog_we = 0, busy;
  logic [CM_AW-1:0] prog_addr = '0;
  ucm_ctl_t prog_data = '0;
  logic [WD-1:0] in1 = '0, in2 = '0, out1, out2;
  logic [1:0] in_take, aux;
  int checks = 0, failures = 0;

  ucm dut (.clk, .rst_n, .start, .prog_we, .prog_addr, .prog_data,
           .in1, .in2, .out1, .out2, .in_take, .aux, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // register indices: R1.1=0 R1.2=1 R1.3=2 R2.1=3 R2.2=4 R2.3=5
  function automatic ucm_prog_t test_prog();
    ucm_prog_t p = '0;
    p[0].regs[0].mode = R_LOAD_IN;  p[0].regs[3].mode = R_LOAD_IN;   // a, b
    p[1].regs[1].mode = R_LOAD_IN;  p[1].regs[4].mode = R_LOAD_IN;   // c, d
    p[1].aux = 2'b10;
    p[2].serial = 1;
    p[2].pe[0] = '{op: PE_ADD, src_a: 0, src_b: 3};   // a + b -> R1.3
    p[2].pe[1] = '{op: PE_MUL, src_a: 1, src_b: 4};   // c * d -> R2.3
    p[2].pe[2] = '{op: PE_SUB, src_a: 0, src_b: 4};   // a - d -> R2.1
    p[2].regs[2] = '{mode: R_SHIFT, sin_sel: 1};
    p[2].regs[5] = '{mode: R_SHIFT, sin_sel: 2};
    p[2].regs[3] = '{mode: R_SHIFT, sin_sel: 3};
    p[2].regs[0] = '{mode: R_SHIFT, sin_sel: 0};
    p[2].regs[1] = '{mode: R_SHIFT, sin_sel: 0};
    p[2].regs[4] = '{mode: R_SHIFT, sin_sel: 0};
    p[3].ram[0] = '{we: 1, addr: 2, wsrc: 2};          // RAM1[2] <- R1.3
    p[3].ram[1] = '{we: 1, addr: 1, wsrc: 2};          // RAM2[1] <- R2.3
    p[4].serial = 1;
    p[4].pe[2] = '{op: PE_NEG, src_a: 3, src_b: 0};   // -(a-d) -> R1.1
    p[4].regs[0] = '{mode: R_SHIFT, sin_sel: 3};
    p[4].regs[3] = '{mode: R_SHIFT, sin_sel: 0};
    p[5].regs[1] = '{mode: R_LOAD_RAM, sin_sel: 0};  p[5].ram[0].addr = 2;
    p[5].regs[4] = '{mode: R_LOAD_RAM, sin_sel: 0};  p[5].ram[1].addr = 1;
    p[6].serial = 1;
    p[6].pe[0] = '{op: PE_ADD, src_a: 1, src_b: 4};
    p[6].regs[1] = '{mode: R_SHIFT, sin_sel: 1};
    p[6].regs[4] = '{mode: R_SHIFT, sin_sel: 0};
    p[7].outp[0] = '{we: 1, sel: 1};
    p[7].outp[1] = '{we: 1, sel: 0};
    p[7].stop = 1;
    return p;
  endfunction

  initial begin
    ucm_prog_t p;
    logic [WD-1:0] a, b, c, d, e1, e2;
    int clocks, takes;
    p = test_prog();
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      prog_we = 1; prog_addr = CM_AW'(i); prog_data = p[i];
      @(negedge clk);
    end
    prog_we = 0;
    for (int t = 0; t < 40; t++) begin
      a = WD'($urandom); b = WD'($urandom); c = WD'($urandom); d = WD'($urandom);
      if (t == 0) begin a = 16'h7fff; b = 16'h0001; c = 16'hffff; d = 16'hffff; end
      in1 = a; in2 = b;
      start = 1; @(negedge clk); start = 0;
      clocks = 0; takes = 0;
      while (busy) begin
        logic took;
        took = (in_take == 2'b11);
        clocks++;
        @(negedge clk);
        // the word was taken at the edge just passed: present the next one
        if (took) begin
          takes++;
          if (takes == 1) begin in1 = c; in2 = d; end
        end
      end
      e1 = (a + b) + WD'(c * d);
      e2 = d - a;
      checks += 4;
      if (out1 !== e1) begin failures++; $display("FAIL out1 %h exp %h", out1, e1); end
      if (out2 !== e2) begin failures++; $display("FAIL out2 %h exp %h", out2, e2); end
      if (clocks != 53) begin failures++; $display("FAIL run %0d clocks exp 53", clocks); end
      if (takes != 2) begin failures++; $display("FAIL %0d input takes exp 2", takes); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
