// tdc_ramp_model: behavioural model of the analog fine-time-stamp circuit,
// used only by testbenches.
//
// When the comparator output rises, node B starts to charge with the sum of a
// large and a small current (ratio RATIO:1). At the first rising edge of ts_ck
// after that, a clocked flip-flop opens the switch and only the small current
// is left, so node B rises RATIO+1 times more slowly. fired goes high when node
// B reaches VTH; it is cleared (node B discharged) when hit falls. A hit just
// after a clock edge therefore fires early and one just before a clock edge
// fires late: the sub-period phase is stretched into many clock periods.
// Units: voltages are "ns of slow-current charging", times are ns.
module tdc_ramp_model #(
  parameter real T_CK  = 10.0,
  parameter real RATIO = 100.0,
  parameter real VTH   = 1100.0
) (
  input  logic comp,
  input  logic hit,
  input  logic ts_ck,
  output logic fired
);
  realtime t_start, t_edge, t_fire;
  logic    armed = 1'b0;

  initial fired = 1'b0;

  always @(posedge comp) begin
    if (!armed && !fired) begin
      armed   = 1'b1;
      t_start = $realtime;
      @(posedge ts_ck);
      t_edge = $realtime;
      if ((RATIO + 1.0) * (t_edge - t_start) >= VTH)
        t_fire = t_start + VTH / (RATIO + 1.0);
      else
        t_fire = t_edge + (VTH - (RATIO + 1.0) * (t_edge - t_start));
      #(t_fire - $realtime);
      fired = 1'b1;
      armed = 1'b0;
    end
  end

  always @(negedge hit) fired = 1'b0;

endmodule
