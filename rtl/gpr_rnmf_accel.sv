// gpr_rnmf_accel -- programmable-logic datapath for on-site GPR clutter removal.
//
// A ground penetrating radar B-scan (256 x 183 single-precision samples) is split
// by robust non-negative matrix factorisation (RNMF) into a low-rank clutter part
// W*H and a sparse target part.  The processor runs the iteration; the two
// element-wise steps that dominate its run time are done here, as AXI-Stream units
// fed by DMA engines from DDR memory:
//
//   target_ip              T = X - W*H               (X, W, H in; T out)
//   soft_threshold_stream  y = sign(T)*max(0,|T|-0.00015)   (T in; y out)
//
// The two units are independent stream endpoints, each served by its own DMA: the
// first by three read channels (X, W repeated per column, H repeated per row) and
// one write channel (T), the second by one read and one write channel.  The DMA
// engines, the processor, the memory controller and the interconnect are vendor
// parts and sit outside this module; their stream connections are this module's
// ports.  All streams carry a 32-bit float and TLAST (axis_beat_t); the clock is the
// single 100 MHz fabric clock and the reset is active low, synchronous.
//
// Timing: target_ip answers MUL_LATENCY + SUB_LATENCY = 20 clocks after a pixel is
// taken, soft_threshold_stream LATENCY = 15 clocks; both take one sample per clock.
module gpr_rnmf_accel
  import gpr_pkg::*;
#(
  parameter int unsigned N_SAMPLES      = IMG_SAMPLES,
  parameter int unsigned MUL_LATENCY    = 9,
  parameter int unsigned SUB_LATENCY    = 11,
  parameter int unsigned SHRINK_LATENCY = 15
) (
  input  logic       aclk,
  input  logic       aresetn,
  // target update: from the X/T, W and H DMA engines
  input  logic       s_axis_x_tvalid,
  output logic       s_axis_x_tready,
  input  axis_beat_t s_axis_x,
  input  logic       s_axis_w_tvalid,
  output logic       s_axis_w_tready,
  input  axis_beat_t s_axis_w,
  input  logic       s_axis_h_tvalid,
  output logic       s_axis_h_tready,
  input  axis_beat_t s_axis_h,
  output logic       m_axis_t_tvalid,
  input  logic       m_axis_t_tready,
  output axis_beat_t m_axis_t,
  // shrinkage: from and to its own DMA engine
  input  logic       s_axis_shrink_tvalid,
  output logic       s_axis_shrink_tready,
  input  axis_beat_t s_axis_shrink,
  output logic       m_axis_shrink_tvalid,
  input  logic       m_axis_shrink_tready,
  output axis_beat_t m_axis_shrink
);

  target_ip #(.MUL_LATENCY(MUL_LATENCY), .SUB_LATENCY(SUB_LATENCY)) u_target (
    .aclk, .aresetn,
    .s_axis_w_tvalid, .s_axis_w_tready, .s_axis_w,
    .s_axis_h_tvalid, .s_axis_h_tready, .s_axis_h,
    .s_axis_x_tvalid, .s_axis_x_tready, .s_axis_x,
    .m_axis_t_tvalid, .m_axis_t_tready, .m_axis_t
  );

  soft_threshold_stream #(.N_SAMPLES(N_SAMPLES), .LATENCY(SHRINK_LATENCY)) u_shrink (
    .ap_clk(aclk), .ap_rst_n(aresetn),
    .target_in_tvalid(s_axis_shrink_tvalid), .target_in_tready(s_axis_shrink_tready),
    .target_in(s_axis_shrink),
    .target_out_tvalid(m_axis_shrink_tvalid), .target_out_tready(m_axis_shrink_tready),
    .target_out(m_axis_shrink)
  );

endmodule
