// axis_reg_slice -- full-throughput register slice (skid buffer) for a ready/valid
// stream.
//
// Registers the forward path (valid and data) and the backward path (ready), so no
// combinational path runs through the slice in either direction.  A beat taken on
// the input appears on the output one clock later.  s_ready is high while the skid
// register is empty; if the output stalls while a beat arrives, that beat is parked
// in the skid register and moved to the output register when the output frees up,
// so one beat per clock passes when nothing stalls and nothing is lost when it
// does.  Active-low synchronous reset empties both registers.
module axis_reg_slice #(
  parameter int unsigned W = 33
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         s_valid,
  output logic         s_ready,
  input  logic [W-1:0] s_data,
  output logic         m_valid,
  input  logic         m_ready,
  output logic [W-1:0] m_data
);
  logic [W-1:0] main_d, skid_d;
  logic         main_v, skid_v;

  assign s_ready = !skid_v;
  assign m_valid = main_v;
  assign m_data  = main_d;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      main_v <= 1'b0;
      skid_v <= 1'b0;
    end else if (m_ready || !main_v) begin
      if (skid_v) begin
        main_v <= 1'b1;
        skid_v <= 1'b0;
      end else begin
        main_v <= s_valid;
      end
    end else if (s_valid && !skid_v) begin
      skid_v <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (m_ready || !main_v) begin
      main_d <= skid_v ? skid_d : s_data;
    end else if (s_valid && !skid_v) begin
      skid_d <= s_data;
    end
  end

  property p_hold;
    @(posedge clk) disable iff (!rst_n) m_valid && !m_ready |=> m_valid && $stable(m_data);
  endproperty
  a_hold: assert property (p_hold);

endmodule
