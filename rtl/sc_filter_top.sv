// sc_filter_top: stochastic 3x3 image-window processor.
//
// One window of nine pixels is evaluated by four single-source stochastic
// circuits running side by side for one 2^K-cycle stream:
//   - Gaussian filter: unipolar inner-product circuit, kernel
//     [1 2 1; 2 4 2; 1 2 1] / 16;
//   - Sobel edge detection: two bipolar inner-product circuits and two
//     16-state absolute-value FSMs (Gx', Gy' and |Gx'|, |Gy'|);
//   - mean filter: unipolar mean circuit of the nine pixels;
//   - bipolar mean circuit of the nine pixels with programmable signs.
// Every output stream ends in a counter. sc_eval_ctrl sequences the run.
//
// Interface: pulse start with the window on pix (and signs on mean_b_neg);
// they are captured at the start edge. busy is high until done pulses,
// 2^K + 2 cycles after start; the counts are valid from done until the
// next start. A count c codes probability c/2^K: a unipolar value c/2^K,
// a bipolar value 2c/2^K - 1. The choice of circuits per application
// follows the published circuits; the window capture, handshake and counters are this
// implementation's own.
module sc_filter_top
  import sc_pkg::*;
#(
  parameter int unsigned K    = K_DEFAULT,
  parameter rns_kind_e   KIND = RNS_LFSR
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [K-1:0] pix [9],       // window, row-major
  input  logic [8:0]   mean_b_neg,    // signs of the bipolar mean inputs
  output logic         busy,
  output logic         done,
  output logic [K:0]   gauss_cnt,     // Gaussian filter, unipolar
  output logic [K:0]   gx_cnt,        // Gx' (signed gradient), bipolar
  output logic [K:0]   gy_cnt,        // Gy' (signed gradient), bipolar
  output logic [K:0]   abs_gx_cnt,    // |Gx'|, bipolar
  output logic [K:0]   abs_gy_cnt,    // |Gy'|, bipolar
  output logic [K:0]   mean_u_cnt,    // mean filter, unipolar
  output logic [K:0]   mean_b_cnt     // signed mean, bipolar
);

  localparam int unsigned SG = kernel_prefix_abs(GAUSS_KERNEL, 8);

  logic         clear, en;
  logic [K-1:0] win [9];
  logic [8:0]   win_neg;
  logic [K:0]   thr_g [9];
  logic         f_gauss, f_gx, f_gy, f_abs_gx, f_abs_gy, f_mean_u, f_mean_b;

  sc_eval_ctrl #(.K(K)) u_ctrl (.clk, .rst_n, .start, .busy, .clear, .en, .done);

  // Capture the window when a run is accepted.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 9; i++) win[i] <= '0;
      win_neg <= '0;
    end else if (start && !busy) begin
      win     <= pix;
      win_neg <= mean_b_neg;
    end
  end

  for (genvar i = 0; i < 9; i++) begin : g_thr
    assign thr_g[i] = (K+1)'(scaled_thr(kernel_prefix_abs(GAUSS_KERNEL, i), SG, K));
  end

  sipc_unipolar #(.N(9), .K(K), .KIND(KIND)) u_gauss (
    .clk, .rst_n, .clear, .en, .cum_thr(thr_g), .y(win), .f(f_gauss)
  );

  sobel_edge #(.K(K), .KIND(KIND)) u_sobel (
    .clk, .rst_n, .clear, .en, .pix(win),
    .gx(f_gx), .gy(f_gy), .abs_gx(f_abs_gx), .abs_gy(f_abs_gy)
  );

  smc_unipolar #(.N(9), .K(K), .KIND(KIND)) u_mean_u (
    .clk, .rst_n, .clear, .en, .y(win), .f(f_mean_u)
  );

  smc_bipolar #(.N(9), .K(K), .KIND(KIND)) u_mean_b (
    .clk, .rst_n, .clear, .en, .neg(win_neg), .y(win), .f(f_mean_b)
  );

  sc_counter #(.K(K)) u_cnt_g  (.clk, .rst_n, .clear, .en, .bit_in(f_gauss),  .count(gauss_cnt));
  sc_counter #(.K(K)) u_cnt_gx (.clk, .rst_n, .clear, .en, .bit_in(f_gx),     .count(gx_cnt));
  sc_counter #(.K(K)) u_cnt_gy (.clk, .rst_n, .clear, .en, .bit_in(f_gy),     .count(gy_cnt));
  sc_counter #(.K(K)) u_cnt_ax (.clk, .rst_n, .clear, .en, .bit_in(f_abs_gx), .count(abs_gx_cnt));
  sc_counter #(.K(K)) u_cnt_ay (.clk, .rst_n, .clear, .en, .bit_in(f_abs_gy), .count(abs_gy_cnt));
  sc_counter #(.K(K)) u_cnt_mu (.clk, .rst_n, .clear, .en, .bit_in(f_mean_u), .count(mean_u_cnt));
  sc_counter #(.K(K)) u_cnt_mb (.clk, .rst_n, .clear, .en, .bit_in(f_mean_b), .count(mean_b_cnt));

endmodule
