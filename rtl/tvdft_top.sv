// tvdft_top: time-varying DFT processor built from three universal
// computation modules.
//
// Two generator UCMs run side by side: the cosine generator delivers its
// samples on its OUT_2, the sine generator on its OUT_1, each from its own
// start frequency, frequency step, half-period constant and start phase
// (cos_in1/cos_in2, sin_in1/sin_in2). Both feed, through the input
// multiplexers of the transform UCM, the products x(n)*cos and x(n)*sin,
// which that UCM accumulates into Re X (re_out) and Im X (im_out). One start
// pulse starts all three units together; every 68 clocks one input sample is
// consumed (x_take, with trig_take one clock later for the cos/sin pair) and one new pair of running sums appears. A unit's
// algorithm can be replaced at run time by writing its control memory:
// prog_unit 0 = cosine generator, 1 = sine generator, 2 = transform. The
// three-unit arrangement, the multiplexers and which generator output feeds
// which multiplexer follow the document's figure; the shared start, the
// programming port and the sample schedule are this design's own. The unused
// outputs of the generators are brought out as ports.
module tvdft_top
  import ucm_pkg::*;
#(
  parameter int WIDTH = ucm_pkg::W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             prog_we,
  input  logic [1:0]       prog_unit,
  input  logic [CM_AW-1:0] prog_addr,
  input  ucm_ctl_t         prog_data,
  input  logic [WIDTH-1:0] cos_in1,
  input  logic [WIDTH-1:0] cos_in2,
  input  logic [WIDTH-1:0] sin_in1,
  input  logic [WIDTH-1:0] sin_in2,
  output logic [1:0]       cos_in_take,
  output logic [1:0]       sin_in_take,
  output logic [WIDTH-1:0] cos_out1,
  output logic [WIDTH-1:0] sin_out2,
  output logic [WIDTH-1:0] cos_value,
  output logic [WIDTH-1:0] sin_value,
  input  logic [WIDTH-1:0] x_in,
  output logic             x_take,
  output logic             trig_take,
  output logic [WIDTH-1:0] re_out,
  output logic [WIDTH-1:0] im_out,
  output logic [2:0]       busy
);

  tvdft_generator #(.WIDTH(WIDTH), .OUT_PORT(1)) u_cos (
    .clk, .rst_n, .start,
    .prog_we   (prog_we && prog_unit == 2'd0),
    .prog_addr, .prog_data,
    .in1 (cos_in1), .in2 (cos_in2),
    .out1 (cos_out1), .out2 (cos_value),
    .in_take (cos_in_take),
    .busy (busy[0])
  );

  tvdft_generator #(.WIDTH(WIDTH), .OUT_PORT(0)) u_sin (
    .clk, .rst_n, .start,
    .prog_we   (prog_we && prog_unit == 2'd1),
    .prog_addr, .prog_data,
    .in1 (sin_in1), .in2 (sin_in2),
    .out1 (sin_value), .out2 (sin_out2),
    .in_take (sin_in_take),
    .busy (busy[1])
  );

  tvdft_transform #(.WIDTH(WIDTH)) u_trf (
    .clk, .rst_n, .start,
    .prog_we   (prog_we && prog_unit == 2'd2),
    .prog_addr, .prog_data,
    .x_in,
    .cos_in (cos_value),
    .sin_in (sin_value),
    .re_out, .im_out, .x_take, .trig_take,
    .busy (busy[2])
  );

endmodule
