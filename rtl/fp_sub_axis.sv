// fp_sub_axis -- AXI-Stream single-precision floating-point subtractor.
//
// RESULT = A - B.  The two operand channels are joined: an operation starts when
// both A and B hold a valid beat and the pipeline can advance, and then both beats
// are taken in the same cycle (blocking handshake; each input's TREADY waits for the
// other input's TVALID).  The difference (fp_addsub: round to nearest even, flush to
// zero) enters a stall_pipe of LATENCY stages, so it leaves LATENCY clocks after its
// operands were accepted, at one result per clock when nothing stalls.  The result's
// TLAST is the AND of the A and B TLASTs.  The channel set, the TLAST rule and the
// active-low reset follow the floating-point operator configured in the design;
// the 11-cycle latency (the vendor operator's full-latency setting for single-precision
// subtraction) and computing the whole difference in the first stage are this
// implementation's choices.
module fp_sub_axis
  import gpr_pkg::*;
#(
  parameter int unsigned LATENCY = 11
) (
  input  logic       aclk,
  input  logic       aresetn,
  input  logic       s_axis_a_tvalid,
  output logic       s_axis_a_tready,
  input  axis_beat_t s_axis_a,
  input  logic       s_axis_b_tvalid,
  output logic       s_axis_b_tready,
  input  axis_beat_t s_axis_b,
  output logic       m_axis_result_tvalid,
  input  logic       m_axis_result_tready,
  output axis_beat_t m_axis_result
);
  logic       go, pipe_ready;
  axis_beat_t res;

  fp_addsub #(.EW(SP_EW), .MW(SP_MW)) u_sub (
    .a(s_axis_a.data), .b(s_axis_b.data), .sub(1'b1), .y(res.data)
  );
  assign res.last = s_axis_a.last & s_axis_b.last;

  assign go              = s_axis_a_tvalid && s_axis_b_tvalid;
  assign s_axis_a_tready = pipe_ready && s_axis_b_tvalid;
  assign s_axis_b_tready = pipe_ready && s_axis_a_tvalid;

  stall_pipe #(.W($bits(axis_beat_t)), .DEPTH(LATENCY)) u_pipe (
    .clk(aclk), .rst_n(aresetn),
    .in_valid(go), .in_ready(pipe_ready), .in_data(res),
    .out_valid(m_axis_result_tvalid), .out_ready(m_axis_result_tready),
    .out_data(m_axis_result)
  );

endmodule
