// ucm_shift_reg: one word register of a UCM bank (R1.x or R2.x).
//
// The register is the PE's one-word cache and converts between the
// word-parallel RAM/IO side and the bit-serial PE side. Its four modes, set
// by the control vector each clock:
//   R_HOLD      keep the word
//   R_SHIFT     shift right by one: bit 0 leaves on sout (to the ICN), sin
//               enters at the top; after WIDTH shifts the word has been sent
//               out LSB first and a serial result has been taken in
//   R_LOAD_RAM  load the RAM read data in parallel
//   R_LOAD_IN   load the external input word in parallel
// That the register is a shift register used as cache and serial/parallel
// converter follows the document; the mode set and LSB-first order are this
// design's choice. All changes happen on the rising edge of clk; q and sout
// are register outputs. Reset clears the word.
module ucm_shift_reg
  import ucm_pkg::*;
#(
  parameter int WIDTH = ucm_pkg::W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  reg_mode_e        mode,
  input  logic             sin,
  input  logic [WIDTH-1:0] ram_d,
  input  logic [WIDTH-1:0] in_d,
  output logic [WIDTH-1:0] q,
  output logic             sout
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else begin
      unique case (mode)
        R_HOLD:     q <= q;
        R_SHIFT:    q <= {sin, q[WIDTH-1:1]};
        R_LOAD_RAM: q <= ram_d;
        R_LOAD_IN:  q <= in_d;
      endcase
    end
  end

  assign sout = q[0];

endmodule
