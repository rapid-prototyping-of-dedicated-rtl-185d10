// tb_ucm_icn: self-checking test of the UCM interconnection network.
// Random register outputs, PE outputs and selects; each PE input and each
// register serial input is compared with the selected source.
module tb_ucm_icn;
  import ucm_pkg::*;
  localparam int NP = 3;

  logic     [NREG-1:0]   reg_sout;
  logic     [NP-1:0]     pe_y;
  pe_ctl_t  [MAX_PE-1:0] pe_ctl;
  reg_ctl_t [NREG-1:0]   reg_ctl;
  logic     [NP-1:0]     pe_a, pe_b;
  logic     [NREG-1:0]   reg_sin;
  int checks = 0, failures = 0;

  ucm_icn #(.NPE(NP)) dut (.reg_sout, .pe_y, .pe_ctl, .reg_ctl, .pe_a, .pe_b, .reg_sin);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      reg_sout = NREG'($urandom);
      pe_y     = NP'($urandom);
      for (int p = 0; p < MAX_PE; p++) begin
        pe_ctl[p].op    = pe_op_e'($urandom_range(0, 3));
        pe_ctl[p].src_a = REG_SELW'($urandom_range(0, NREG - 1));
        pe_ctl[p].src_b = REG_SELW'($urandom_range(0, NREG - 1));
      end
      for (int r = 0; r < NREG; r++) begin
        reg_ctl[r].mode    = reg_mode_e'($urandom_range(0, 3));
        reg_ctl[r].sin_sel = PE_SELW'($urandom_range(0, NP));
      end
      #1;
      for (int p = 0; p < NP; p++) begin
        checks += 2;
        if (pe_a[p] !== reg_sout[pe_ctl[p].src_a]) begin failures++; $display("FAIL pe_a %0d", p); end
        if (pe_b[p] !== reg_sout[pe_ctl[p].src_b]) begin failures++; $display("FAIL pe_b %0d", p); end
      end
      for (int r = 0; r < NREG; r++) begin
        logic exp;
        exp = (reg_ctl[r].sin_sel == 0) ? reg_sout[r] : pe_y[reg_ctl[r].sin_sel - 1];
        checks++;
        if (reg_sin[r] !== exp) begin failures++; $display("FAIL reg_sin %0d", r); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
