// rf_top: the two resistive-fuse network processors side by side.
//
//  * ser_*  : rf_serial_seg, the pixel-serial processor (64 x 64 image,
//             7-bit pixels, 3 annealing phases of 30 passes) that was built
//             as the FPGA demonstrator: stream an image in, get the smoothed
//             image and its blown-fuse edge map streamed out.
//  * par_*  : rf_parallel_array, the pixel-parallel processor (8 x 8 cells,
//             8-bit pixels), one pixel circuit per pixel, loaded and read by
//             address.
// The two share only the clock and reset. Their interfaces are described in
// their own files. The host board interface that fed the demonstrator is not
// part of this design; the pixel streams are brought out as ports instead.
module rf_top
  import rf_pkg::*;
#(
  parameter int unsigned SER_W = SER_IMG_W,
  parameter int unsigned SER_H = SER_IMG_H,
  parameter int unsigned SER_R = R_ITER,
  parameter int unsigned PW    = PAR_W,
  parameter int unsigned PH    = PAR_H,
  parameter int unsigned PAR_R = R_ITER,
  localparam int unsigned PAW  = (PW * PH > 1) ? $clog2(PW * PH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // pixel-serial processor
  input  logic              ser_in_valid,
  output logic              ser_in_ready,
  input  logic [SER_N-1:0]  ser_in_pixel,
  output logic              ser_out_valid,
  output logic [SER_N-1:0]  ser_out_pixel,
  output logic              ser_out_edge,
  output logic              ser_out_last,
  output logic              ser_busy,
  // pixel-parallel processor
  input  logic              par_load,
  input  logic [PAW-1:0]    par_addr,
  input  logic [PAR_N-1:0]  par_load_data,
  input  logic              par_start,
  output logic              par_busy,
  output logic              par_done,
  output logic [PAR_N-1:0]  par_rd_data,
  output logic              par_rd_edge
);

  rf_serial_seg #(.IMG_W(SER_W), .IMG_H(SER_H), .R(SER_R)) u_serial (
    .clk, .rst_n,
    .in_valid(ser_in_valid), .in_ready(ser_in_ready), .in_pixel(ser_in_pixel),
    .out_valid(ser_out_valid), .out_pixel(ser_out_pixel), .out_edge(ser_out_edge),
    .out_last(ser_out_last), .busy(ser_busy)
  );

  rf_parallel_array #(.W(PW), .H(PH), .R(PAR_R)) u_parallel (
    .clk, .rst_n,
    .load(par_load), .addr(par_addr), .load_data(par_load_data),
    .start(par_start), .busy(par_busy), .done(par_done),
    .rd_data(par_rd_data), .rd_edge(par_rd_edge)
  );

endmodule
