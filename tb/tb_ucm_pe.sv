// tb_ucm_pe: self-checking test of the bit-serial processing element.
// Random and corner operands are sent LSB first for 16 clocks per operation,
// back to back, for each of the four operations; the serial result is
// collected bit by bit and compared with the arithmetic result modulo 2^16.
module tb_ucm_pe;
  import ucm_pkg::*;
  localparam int WD = 16;

  logic clk = 0, rst_n = 0, first = 0, a = 0, b = 0, y;
  pe_op_e op = PE_ADD;
  int checks = 0, failures = 0;

  ucm_pe #(.WIDTH(WD)) dut (.clk, .rst_n, .first, .op, .a, .b, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [WD-1:0] model(pe_op_e o, logic [WD-1:0] x, logic [WD-1:0] z);
    case (o)
      PE_ADD: return x + z;
      PE_SUB: return x - z;
      PE_MUL: return WD'(x * z);
      default: return -x;
    endcase
  endfunction

  task automatic run(pe_op_e o, logic [WD-1:0] x, logic [WD-1:0] z);
    logic [WD-1:0] got;
    for (int i = 0; i < WD; i++) begin
      @(negedge clk);
      op = o; first = (i == 0); a = x[i]; b = z[i];
      #1 got[i] = y;
    end
    checks++;
    if (got !== model(o, x, z)) begin
      failures++;
      $display("FAIL op=%s a=%0d b=%0d got=%0d exp=%0d", o.name(), x, z, got, model(o, x, z));
    end
  endtask

  initial begin
    logic [WD-1:0] corner [6] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000, 16'h7FFF, 16'h00FF};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int o = 0; o < 4; o++) begin
      foreach (corner[i]) foreach (corner[j]) run(pe_op_e'(o), corner[i], corner[j]);
      repeat (100) run(pe_op_e'(o), WD'($urandom), WD'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
