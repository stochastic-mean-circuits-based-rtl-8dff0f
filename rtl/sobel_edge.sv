// sobel_edge: stochastic Sobel edge detector for one 3x3 window.
//
// Two bipolar inner-product circuits apply the horizontal and vertical
// Sobel kernels (weights -1/-2/+1/+2, magnitudes summing to 8, so each
// result is scaled by 1/8). Each 8-bit pixel p is used as a bipolar input
// of probability p/2^K. Because the kernel weights sum to zero the bipolar
// results are Gx' = 2*Gx/(8*2^K) and Gy' likewise, Gx and Gy being the
// integer Sobel responses on pixel values. A 16-state absolute-value FSM
// per direction turns Gx', Gy' into |Gx'|, |Gy'|. The two magnitudes are
// brought out separately; their sum is left to the binary domain.
//
// Timing: gx/gy are combinational from the random sources; abs_gx/abs_gy
// lag by one cycle (FSM register). One result per 2^K enabled cycles after
// a clear. The kernels and the bipolar SIPC + FSM structure follow the
// published circuit; the kernel orientation, pixel coding and leaving the magnitude
// sum to the caller are this implementation's choices.
module sobel_edge
  import sc_pkg::*;
#(
  parameter int unsigned K    = K_DEFAULT,
  parameter rns_kind_e   KIND = RNS_LFSR,
  parameter int unsigned NS   = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic [K-1:0] pix [9],   // window, row-major
  output logic         gx,        // bipolar stream of Gx'
  output logic         gy,        // bipolar stream of Gy'
  output logic         abs_gx,    // bipolar stream of |Gx'|
  output logic         abs_gy     // bipolar stream of |Gy'|
);

  localparam int unsigned SX = kernel_prefix_abs(SOBEL_X, 8);
  localparam int unsigned SY = kernel_prefix_abs(SOBEL_Y, 8);

  logic [K:0] thr_x [9];
  logic [K:0] thr_y [9];
  logic [8:0] neg_x, neg_y;

  for (genvar i = 0; i < 9; i++) begin : g_coef
    assign thr_x[i] = (K+1)'(scaled_thr(kernel_prefix_abs(SOBEL_X, i), SX, K));
    assign thr_y[i] = (K+1)'(scaled_thr(kernel_prefix_abs(SOBEL_Y, i), SY, K));
    assign neg_x[i] = (SOBEL_X[i] < 0);
    assign neg_y[i] = (SOBEL_Y[i] < 0);
  end

  sipc_bipolar #(.N(9), .K(K), .KIND(KIND)) u_gx (
    .clk, .rst_n, .clear, .en, .cum_thr(thr_x), .neg(neg_x), .y(pix), .f(gx)
  );
  sipc_bipolar #(.N(9), .K(K), .KIND(KIND)) u_gy (
    .clk, .rst_n, .clear, .en, .cum_thr(thr_y), .neg(neg_y), .y(pix), .f(gy)
  );

  sc_abs_fsm #(.NS(NS)) u_abs_x (.clk, .rst_n, .clear, .en, .x(gx), .y(abs_gx));
  sc_abs_fsm #(.NS(NS)) u_abs_y (.clk, .rst_n, .clear, .en, .x(gy), .y(abs_gy));

endmodule
