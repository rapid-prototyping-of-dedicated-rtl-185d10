// ucm_icn: bit-serial interconnection network of the UCM.
//
// Every PE input can take the serial output of any word register of either
// bank, and every register can take its serial input from any PE or from its
// own LSB (rotation, which keeps an operand intact while it is sent). All
// connections are single wires, one bit per clock. That any PE must reach
// either RAM's registers follows the document; the full crossbar and the
// rotate path are this design's choice. Purely combinational: the selects
// come from the current control vector. Registers that a smaller UCM does
// not have deliver 0 on reg_sout; PEs at index NPE and above are absent.
module ucm_icn
  import ucm_pkg::*;
#(
  parameter int NPE = ucm_pkg::MAX_PE
) (
  input  logic     [NREG-1:0]   reg_sout,
  input  logic     [NPE-1:0]    pe_y,
  input  pe_ctl_t  [MAX_PE-1:0] pe_ctl,
  input  reg_ctl_t [NREG-1:0]   reg_ctl,
  output logic     [NPE-1:0]    pe_a,
  output logic     [NPE-1:0]    pe_b,
  output logic     [NREG-1:0]   reg_sin
);

  always_comb begin
    for (int p = 0; p < NPE; p++) begin
      pe_a[p] = (int'(pe_ctl[p].src_a) < NREG) ? reg_sout[pe_ctl[p].src_a] : 1'b0;
      pe_b[p] = (int'(pe_ctl[p].src_b) < NREG) ? reg_sout[pe_ctl[p].src_b] : 1'b0;
    end
    for (int r = 0; r < NREG; r++) begin
      if (reg_ctl[r].sin_sel == '0)
        reg_sin[r] = reg_sout[r];
      else if (int'(reg_ctl[r].sin_sel) <= NPE)
        reg_sin[r] = pe_y[int'(reg_ctl[r].sin_sel) - 1];
      else
        reg_sin[r] = 1'b0;
    end
  end

endmodule
