// ucm: universal computation module, a shared-memory processor with
// bit-serial processing elements.
//
// NPE bit-serial PEs (ucm_pe) work on operands held in 2*NPE word registers
// (ucm_shift_reg): R1.1..R1.NPE next to RAM1 and R2.1..R2.NPE next to RAM2.
// Words move in parallel between a bank's RAM, its registers, its external
// input IN_b and the output registers OUT_1/OUT_2; between registers and PEs
// they move one bit per clock through the interconnection network (ucm_icn).
// A serial step therefore takes WIDTH clocks, during which every PE performs
// one operation, all of them in parallel. The control unit (ucm_control)
// issues one control vector per clock from its control memory, so the same
// hardware runs any algorithm that is written into that memory.
// The structure (PEs, 2*NPE registers, two RAMs, single-wire ICN, control
// unit, IN/OUT per bank) follows the document, with three PEs as the default
// and two in the sine/cosine generator and transform units. OUT_1/OUT_2 are
// output registers loaded from any word register; in_take[b] is high in the
// clock in which a register of bank b loads IN_b, so a producer knows its
// word was taken. All state changes on the rising edge of clk; rst_n is an
// asynchronous, active-low reset.
module ucm
  import ucm_pkg::*;
#(
  parameter int        NPE       = ucm_pkg::MAX_PE,
  parameter int        WIDTH     = ucm_pkg::W,
  parameter ucm_prog_t INIT_PROG = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             prog_we,
  input  logic [CM_AW-1:0] prog_addr,
  input  ucm_ctl_t         prog_data,
  input  logic [WIDTH-1:0] in1,
  input  logic [WIDTH-1:0] in2,
  output logic [WIDTH-1:0] out1,
  output logic [WIDTH-1:0] out2,
  output logic [1:0]       in_take,
  output logic [1:0]       aux,
  output logic             busy
);

  ucm_ctl_t          ctl;
  logic              bit_first;

  logic [WIDTH-1:0]  reg_q    [NREG];
  logic [NREG-1:0]   reg_sout;
  logic [NREG-1:0]   reg_sin;
  logic [NPE-1:0]    pe_a, pe_b, pe_y;
  logic [WIDTH-1:0]  ram_rd   [2];
  logic [WIDTH-1:0]  ram_wd   [2];
  logic [WIDTH-1:0]  in_d     [2];
  logic [WIDTH-1:0]  out_q    [2];

  initial assert (NPE >= 1 && NPE <= MAX_PE) else $error("ucm: NPE must be 1..%0d", MAX_PE);

  ucm_control #(.WIDTH(WIDTH), .INIT_PROG(INIT_PROG)) u_ctrl (
    .clk, .rst_n, .start, .prog_we, .prog_addr, .prog_data,
    .ctl, .bit_first, .busy, .pc ()
  );

  assign in_d[0] = in1;
  assign in_d[1] = in2;

  // Word registers: bank b, slot s. Slots a smaller UCM lacks read as 0.
  for (genvar b = 0; b < 2; b++) begin : g_bank
    for (genvar s = 0; s < MAX_PE; s++) begin : g_slot
      localparam int R = b * MAX_PE + s;
      if (s < NPE) begin : g_reg
        ucm_shift_reg #(.WIDTH(WIDTH)) u_reg (
          .clk, .rst_n,
          .mode  (ctl.regs[R].mode),
          .sin   (reg_sin[R]),
          .ram_d (ram_rd[b]),
          .in_d  (in_d[b]),
          .q     (reg_q[R]),
          .sout  (reg_sout[R])
        );
      end else begin : g_none
        assign reg_q[R]    = '0;
        assign reg_sout[R] = 1'b0;
      end
    end

    assign ram_wd[b] = reg_q[b * MAX_PE + int'(ctl.ram[b].wsrc)];

    ucm_ram #(.WIDTH(WIDTH)) u_ram (
      .clk, .rst_n,
      .we   (ctl.ram[b].we),
      .addr (ctl.ram[b].addr),
      .wd   (ram_wd[b]),
      .rd   (ram_rd[b])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)               out_q[b] <= '0;
      else if (ctl.outp[b].we)  out_q[b] <= reg_q[ctl.outp[b].sel];
    end

    always_comb begin
      in_take[b] = 1'b0;
      for (int s = 0; s < NPE; s++)
        if (ctl.regs[b * MAX_PE + s].mode == R_LOAD_IN) in_take[b] = 1'b1;
    end
  end

  ucm_icn #(.NPE(NPE)) u_icn (
    .reg_sout, .pe_y,
    .pe_ctl  (ctl.pe),
    .reg_ctl (ctl.regs),
    .pe_a, .pe_b, .reg_sin
  );

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    ucm_pe #(.WIDTH(WIDTH)) u_pe (
      .clk, .rst_n,
      .first (bit_first),
      .op    (ctl.pe[p].op),
      .a     (pe_a[p]),
      .b     (pe_b[p]),
      .y     (pe_y[p])
    );
  end

  assign out1 = out_q[0];
  assign out2 = out_q[1];
  assign aux  = ctl.aux;

endmodule
