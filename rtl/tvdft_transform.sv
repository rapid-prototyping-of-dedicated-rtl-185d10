// tvdft_transform: transform unit of the TVDFT processor.
//
// A two-PE UCM, loaded on reset with the transform microprogram of
// tvdft_prog_pkg, behind two input multiplexers. IN_1 of the UCM takes either
// the input sample x(n) or the cosine sample, IN_2 either x(n) or the sine
// sample; the microprogram drives the selects through its aux bits. Per
// sample (every 68 clocks) the unit loads x(n) into R1.1 and R2.1, cos into
// R1.2 and sin into R2.2, multiplies both pairs bit-serially in PE1 and PE2,
// adds the products to the accumulators in RAM1[0] (Re) and RAM2[0] (Im) and
// shows the running sums on re_out and im_out. x_take is high in the clock in
// which x(n) is read (81 + 68*j clocks after start), the cos/sin words one
// clock later. A start pulse clears both sums and begins a new frame. The
// multiplexer placement, the unit's inputs and outputs and accumulation in
// memory follow the document; arithmetic is modulo 2^16 integer arithmetic,
// this design's choice.
module tvdft_transform
  import ucm_pkg::*;
#(
  parameter int WIDTH = ucm_pkg::W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             prog_we,
  input  logic [CM_AW-1:0] prog_addr,
  input  ucm_ctl_t         prog_data,
  input  logic [WIDTH-1:0] x_in,
  input  logic [WIDTH-1:0] cos_in,
  input  logic [WIDTH-1:0] sin_in,
  output logic [WIDTH-1:0] re_out,
  output logic [WIDTH-1:0] im_out,
  output logic             x_take,
  output logic             trig_take,
  output logic             busy
);

  logic [1:0]       aux, in_take;
  logic [WIDTH-1:0] in1, in2;

  assign in1 = aux[0] ? cos_in : x_in;
  assign in2 = aux[1] ? sin_in : x_in;

  assign x_take    = (in_take[0] && !aux[0]) || (in_take[1] && !aux[1]);
  assign trig_take = (in_take[0] &&  aux[0]) || (in_take[1] &&  aux[1]);

  ucm #(
    .NPE       (2),
    .WIDTH     (WIDTH),
    .INIT_PROG (tvdft_prog_pkg::transform_program())
  ) u_ucm (
    .clk, .rst_n, .start, .prog_we, .prog_addr, .prog_data,
    .in1, .in2,
    .out1 (re_out),
    .out2 (im_out),
    .in_take, .aux, .busy
  );

endmodule
