// tb_ucm_control: self-checking test of the UCM control unit.
// Runs first the reset-loaded program (one word that stops), then a program
// written through the programming port with a one-clock word, a 16-clock
// serial word, a jump over a word, another serial word and a stop. Every
// clock the issued word (identified by its OUT_1 select field), bit_first and
// busy are compared with the expected trace; the run must take 35 clocks.
module tb_ucm_control;
  import ucm_pkg::*;
  localparam int WD = 16;

  function automatic ucm_prog_t init_prog();
    ucm_prog_t p = '0;
    p[0].stop = 1'b1;
    p[0].outp[0].sel = 3'd7;
    return p;
  endfunction

  logic clk = 0, rst_n = 0, start = 0, prog_we = 0, bit_first, busy;
  logic [CM_AW-1:0] prog_addr = '0, pc;
  ucm_ctl_t prog_data = '0, ctl;
  int checks = 0, failures = 0;

  ucm_control #(.WIDTH(WD), .INIT_PROG(init_prog())) dut (
    .clk, .rst_n, .start, .prog_we, .prog_addr, .prog_data, .ctl, .bit_first, .busy, .pc);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_word(int id, logic first, logic bsy);
    checks++;
    if (ctl.outp[0].sel !== REG_SELW'(id) || bit_first !== first || busy !== bsy) begin
      failures++;
      $display("FAIL t=%0t id=%0d exp %0d first=%b exp %b busy=%b exp %b",
               $time, ctl.outp[0].sel, id, bit_first, first, busy, bsy);
    end
  endtask

  task automatic write_word(int addr, int id, logic serial, logic jump, logic stop, int target);
    ucm_ctl_t w = '0;
    w.outp[0].sel = REG_SELW'(id);
    w.serial = serial; w.jump = jump; w.stop = stop; w.target = CM_AW'(target);
    @(negedge clk);
    prog_we = 1; prog_addr = CM_AW'(addr); prog_data = w;
    @(negedge clk);
    prog_we = 0;
  endtask

  initial begin
    int busy_clocks;
    @(negedge clk); rst_n = 1;
    @(negedge clk); expect_word(0, 0, 0);
    start = 1; @(negedge clk); start = 0;
    expect_word(7, 1, 1);
    @(negedge clk); expect_word(0, 0, 0);

    write_word(0, 1, 0, 0, 0, 0);
    write_word(1, 2, 1, 0, 0, 0);
    write_word(2, 3, 0, 1, 0, 4);
    write_word(3, 5, 0, 0, 1, 0);   // must be skipped
    write_word(4, 4, 1, 0, 0, 0);
    write_word(5, 6, 0, 0, 1, 0);

    @(negedge clk); start = 1; @(negedge clk); start = 0;
    expect_word(1, 1, 1); @(negedge clk);
    for (int i = 0; i < WD; i++) begin expect_word(2, i == 0, 1); @(negedge clk); end
    expect_word(3, 1, 1); @(negedge clk);
    for (int i = 0; i < WD; i++) begin expect_word(4, i == 0, 1); @(negedge clk); end
    expect_word(6, 1, 1); @(negedge clk);
    expect_word(0, 0, 0);

    // cycle count of the whole run
    start = 1; @(negedge clk); start = 0;
    busy_clocks = 0;
    while (busy) begin busy_clocks++; @(negedge clk); end
    checks++;
    if (busy_clocks != 35) begin failures++; $display("FAIL run took %0d clocks, exp 35", busy_clocks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
