// ucm_ram: data memory of one UCM bank (RAM1 or RAM2).
//
// DEPTH words of WIDTH bits with one address shared by reading and writing,
// the word-parallel side of the shared memory. Reading is asynchronous (a
// small distributed RAM), so a register can load RAM[addr] in the same clock
// the address is issued; a write with we=1 takes effect at the rising edge of
// clk, and a read in that clock still returns the old word. The size of three
// 16-bit words follows the document; the single shared address, the
// asynchronous read and the reset to zero are this design's choices.
module ucm_ram #(
  parameter int WIDTH = ucm_pkg::W,
  parameter int DEPTH = ucm_pkg::RAM_DEPTH,
  parameter int AW    = ucm_pkg::RAM_AW
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wd,
  output logic [WIDTH-1:0] rd
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (we && int'(addr) < DEPTH) begin
      mem[addr] <= wd;
    end
  end

  assign rd = (int'(addr) < DEPTH) ? mem[addr] : '0;

endmodule
