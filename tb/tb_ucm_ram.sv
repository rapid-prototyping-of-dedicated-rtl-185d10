// tb_ucm_ram: self-checking test of the three-word bank RAM.
// Random writes and reads against a reference array; checks reset to zero,
// asynchronous read and read-old-data during a write.
module tb_ucm_ram;
  localparam int WD = 16, D = 3;

  logic clk = 0, rst_n = 0, we = 0;
  logic [1:0] addr = '0;
  logic [WD-1:0] wd = '0, rd;
  logic [WD-1:0] ref_mem [D];
  int checks = 0, failures = 0;

  ucm_ram #(.WIDTH(WD), .DEPTH(D)) dut (.clk, .rst_n, .we, .addr, .wd, .rd);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < D; i++) begin
      ref_mem[i] = '0;
      addr = 2'(i); #1;
      checks++; if (rd !== '0) begin failures++; $display("FAIL reset word %0d", i); end
    end
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      addr = 2'($urandom_range(0, D - 1));
      we = $urandom_range(0, 1);
      wd = WD'($urandom);
      #1;
      checks++;
      if (rd !== ref_mem[addr]) begin
        failures++; $display("FAIL read addr %0d got %h exp %h", addr, rd, ref_mem[addr]);
      end
      if (we) ref_mem[addr] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
