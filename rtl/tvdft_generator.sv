// tvdft_generator: sine/cosine generator with a linearly changing frequency.
//
// A two-PE UCM whose control memory is loaded on reset with the generator
// microprogram of tvdft_prog_pkg. After a start pulse it reads, in this order,
// the start frequency F0 on IN_1 together with the half-period constant M on
// IN_2, then the start phase A0 on IN_2, and then once per sample the
// frequency step dF on IN_1 (in_take[0]/[1] mark each word taken). For each
// sample n it computes F <- F + dF, A <- A + F and y = A*(M - A), all modulo
// 2^16, and writes y to OUT_1 (OUT_PORT=0) or OUT_2 (OUT_PORT=1) every 68
// clocks, the first time 72 clocks after start. A cosine generator is the
// same unit started a quarter period ahead (A0 = M/2). The two-PE UCM with
// 16-bit words and three-word RAMs, IN_1 carrying first F0 and then the
// frequency change, and the product form of the sine follow the document;
// the step schedule and the folding of A into one half period being left to
// the choice of M, F0 and dF are this design's own. The control memory can be
// rewritten through the programming port to run a different algorithm.
module tvdft_generator
  import ucm_pkg::*;
#(
  parameter int WIDTH    = ucm_pkg::W,
  parameter int OUT_PORT = 0
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
  output logic             busy
);


  ucm #(
    .NPE       (2),
    .WIDTH     (WIDTH),
    .INIT_PROG (tvdft_prog_pkg::gen_program(OUT_PORT))
  ) u_ucm (
    .clk, .rst_n, .start, .prog_we, .prog_addr, .prog_data,
    .in1, .in2, .out1, .out2, .in_take, .aux (), .busy
  );

endmodule
