// target_ip -- AXI-Stream unit for the RNMF target update T = X - W * H.
//
// The radar image X (256 x 183, column by column) is low-rank approximated by the
// outer product of a column vector W (256) and a row vector H (183); the residual
// T = X - W*H is the target (clutter-removed) image.  Three DMA read channels stream
// X, W and H element-aligned: X in storage order, W repeated once per column and H
// with each value repeated once per row, so beat k of each stream belongs to the
// same pixel.  One DMA write channel takes T back.
//
// Inside, a floating-point multiplier forms W*H and a floating-point subtractor
// forms X - (W*H): the W and H channels drive the multiplier's A and B inputs, the
// X channel drives the subtractor's A input and the product its B input.  Both are
// blocking AXI-Stream operators, so X waits at the subtractor until its product
// arrives; after the first MUL_LATENCY + SUB_LATENCY (= 20) clocks the unit takes
// one pixel and returns one result per clock.  TLAST is ANDed through both
// operators, so T carries TLAST when X, W and H all mark the last beat.  Both
// products and differences are rounded separately (no fused multiply-add), as in the
// software loop this unit replaces.
module target_ip
  import gpr_pkg::*;
#(
  parameter int unsigned MUL_LATENCY = 9,
  parameter int unsigned SUB_LATENCY = 11
) (
  input  logic       aclk,
  input  logic       aresetn,
  // W stream (multiplier operand A)
  input  logic       s_axis_w_tvalid,
  output logic       s_axis_w_tready,
  input  axis_beat_t s_axis_w,
  // H stream (multiplier operand B)
  input  logic       s_axis_h_tvalid,
  output logic       s_axis_h_tready,
  input  axis_beat_t s_axis_h,
  // X stream (subtractor operand A)
  input  logic       s_axis_x_tvalid,
  output logic       s_axis_x_tready,
  input  axis_beat_t s_axis_x,
  // T stream
  output logic       m_axis_t_tvalid,
  input  logic       m_axis_t_tready,
  output axis_beat_t m_axis_t
);
  logic       wh_tvalid, wh_tready;
  axis_beat_t wh;

  fp_mul_axis #(.LATENCY(MUL_LATENCY)) u_mul (
    .aclk, .aresetn,
    .s_axis_a_tvalid(s_axis_w_tvalid), .s_axis_a_tready(s_axis_w_tready), .s_axis_a(s_axis_w),
    .s_axis_b_tvalid(s_axis_h_tvalid), .s_axis_b_tready(s_axis_h_tready), .s_axis_b(s_axis_h),
    .m_axis_result_tvalid(wh_tvalid), .m_axis_result_tready(wh_tready), .m_axis_result(wh)
  );

  fp_sub_axis #(.LATENCY(SUB_LATENCY)) u_sub (
    .aclk, .aresetn,
    .s_axis_a_tvalid(s_axis_x_tvalid), .s_axis_a_tready(s_axis_x_tready), .s_axis_a(s_axis_x),
    .s_axis_b_tvalid(wh_tvalid), .s_axis_b_tready(wh_tready), .s_axis_b(wh),
    .m_axis_result_tvalid(m_axis_t_tvalid), .m_axis_result_tready(m_axis_t_tready),
    .m_axis_result(m_axis_t)
  );

endmodule
