// ucm_control: microprogrammed control unit of a UCM.
//
// A control memory holds one control vector (ucm_ctl_t) per step; the
// algorithm a UCM runs is changed only by rewriting this memory, through the
// programming port or by the INIT_PROG parameter that is loaded on reset.
// A start pulse sets the program counter to 0 and runs. A word with serial=1
// is issued for WIDTH consecutive clocks (one bit-serial operation, bit_first
// high in the first of them); any other word lasts one clock. After a word
// the counter goes to `target` if jump=1, stops if stop=1, else to pc+1.
// While stopped the issued vector is all zeros (every register holds, no
// writes). That the control part is a micro program held in a control memory
// follows the document; the sequencing fields and the write port are this
// design's own. Timing: ctl and bit_first are combinational from the
// registered pc and bit counter; writes and the sequencer act on the rising
// edge of clk. A write to the word being issued changes it from the next
// clock on.
module ucm_control
  import ucm_pkg::*;
#(
  parameter int        WIDTH     = ucm_pkg::W,
  parameter ucm_prog_t INIT_PROG = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             prog_we,
  input  logic [CM_AW-1:0] prog_addr,
  input  ucm_ctl_t         prog_data,
  output ucm_ctl_t         ctl,
  output logic             bit_first,
  output logic             busy,
  output logic [CM_AW-1:0] pc
);

  localparam int BW = $clog2(WIDTH);

  ucm_ctl_t       cmem [CM_DEPTH];
  logic           run_q;
  logic [BW-1:0]  bit_q;
  ucm_ctl_t       word;
  logic           last_bit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < CM_DEPTH; i++) cmem[i] <= INIT_PROG[i];
    end else if (prog_we) begin
      cmem[prog_addr] <= prog_data;
    end
  end

  assign word     = cmem[pc];
  assign last_bit = !word.serial || (bit_q == BW'(WIDTH - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q <= 1'b0;
      pc    <= '0;
      bit_q <= '0;
    end else if (start) begin
      run_q <= 1'b1;
      pc    <= '0;
      bit_q <= '0;
    end else if (run_q) begin
      if (!last_bit) begin
        bit_q <= bit_q + 1'b1;
      end else begin
        bit_q <= '0;
        if (word.stop)      run_q <= 1'b0;
        else if (word.jump) pc    <= word.target;
        else                pc    <= pc + 1'b1;
      end
    end
  end

  assign ctl       = run_q ? word : '0;
  assign bit_first = run_q && (bit_q == '0);
  assign busy      = run_q;

endmodule
