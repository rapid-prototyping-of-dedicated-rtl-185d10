// ucm_pe: bit-serial processing element of the UCM.
//
// Two serial inputs a and b arrive least significant bit first, one bit per
// clock, for W clocks; the result leaves on y in the same clock as the input
// bits of the same weight, so a shift register can take it in while it shifts
// the operands out. `first` marks bit 0 of an operation and clears the state.
//   PE_ADD  y = a + b            full adder with a carry flip-flop
//   PE_SUB  y = a + not(b) + 1   the same adder with b inverted, carry set
//   PE_NEG  y = not(a) + 1       negation
//   PE_MUL  y = a * b mod 2^W    serial-serial multiplier
// The three functions (serial full addition with carry, multiplication,
// negation) and the two-input, one-output form follow the document. The
// multiplier is this design's own: at bit i it adds a_i*B(<i) + b_i*A(<i) +
// a_i*b_i*2^i to a running sum, where A(<i), B(<i) are the bits received so
// far, emits bit 0 of that sum and shifts it right. Only the low W bits of the
// product are formed, which are the same for signed and unsigned operands.
// Timing: y is combinational from a, b and the state; the state updates on
// every rising edge of clk.
module ucm_pe
  import ucm_pkg::*;
#(
  parameter int WIDTH = ucm_pkg::W
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   first,  // bit 0 of a serial operation
  input  pe_op_e op,
  input  logic   a,
  input  logic   b,
  output logic   y
);

  localparam int IW = $clog2(WIDTH);

  logic             carry_q;
  logic [WIDTH-1:0] a_seen_q, b_seen_q, msum_q;
  logic [IW-1:0]    idx_q;

  // State as seen by the current bit: cleared on the first bit.
  logic             carry;
  logic [WIDTH-1:0] a_seen, b_seen, msum, mterm;
  logic [IW-1:0]    idx;
  logic             ai, bi, carry_d;

  always_comb begin
    carry  = first ? (op == PE_SUB || op == PE_NEG) : carry_q;
    a_seen = first ? '0 : a_seen_q;
    b_seen = first ? '0 : b_seen_q;
    msum   = first ? '0 : msum_q;
    idx    = first ? '0 : idx_q;

    // Adder operands for the add-type operations.
    unique case (op)
      PE_SUB:  begin ai = a;  bi = ~b;   end
      PE_NEG:  begin ai = ~a; bi = 1'b0; end
      default: begin ai = a;  bi = b;    end
    endcase
    carry_d = (ai & bi) | (ai & carry) | (bi & carry);

    mterm = msum + (a ? b_seen : '0) + (b ? a_seen : '0)
          + ((a & b) ? (WIDTH'(1) << idx) : '0);

    y = (op == PE_MUL) ? mterm[0] : (ai ^ bi ^ carry);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      carry_q  <= 1'b0;
      a_seen_q <= '0;
      b_seen_q <= '0;
      msum_q   <= '0;
      idx_q    <= '0;
    end else begin
      carry_q  <= carry_d;
      a_seen_q <= a_seen | (WIDTH'(a) << idx);
      b_seen_q <= b_seen | (WIDTH'(b) << idx);
      msum_q   <= mterm >> 1;
      idx_q    <= idx + 1'b1;
    end
  end

endmodule
