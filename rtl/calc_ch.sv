// calc_ch -- auto-trigger of one FET port.
//
// A port's three filters (A, B, T) report at different moments: A and T at
// the first A-window sample after a decimation, B at the first B-window
// sample, and a filter whose window is not configured never reports. This
// block decides when the port's result set is complete so that the MCU is
// interrupted once per data period with consistent values.
//
// It keeps the set of filters that reported since the last trigger (cur)
// and the set that made up the previous trigger (prev). When cur, including
// reports arriving this clock, equals prev, the set is complete and the
// port triggers at once. When it does not match (first period after reset
// or after the sampling windows were changed) it waits for the next
// decimation pulse, which ends the data period, triggers with whatever
// arrived and takes that as the new expected set. So after a change one
// period passes before triggering resumes on time.
//
// Each filter's latest sum and count are held; they and the filter mask
// are valid, together with the one-clock trig pulse, in meas. That the
// published design compares the current and the previous set is given;
// the exact rule above, and holding the values here, are this design's.
module calc_ch
  import fet_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       dec,       // decimation pulse of this port
  input  logic       a_dvo,
  input  filt_res_t  a_res,
  input  logic       b_dvo,
  input  filt_res_t  b_res,
  input  logic       t_dvo,
  input  filt_res_t  t_res,
  output port_meas_t meas
);

  filt_mask_t cur, cur_n, prev;
  filt_mask_t arrived;

  assign arrived = '{t: t_dvo, b: b_dvo, a: a_dvo};
  assign cur_n   = cur | arrived;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cur  <= '0;
      prev <= '0;
      meas <= '0;
    end else begin
      meas.trig <= 1'b0;
      if (a_dvo) meas.a <= a_res;
      if (b_dvo) meas.b <= b_res;
      if (t_dvo) meas.t <= t_res;
      if (cur_n != '0 && (cur_n == prev || dec)) begin
        meas.trig <= 1'b1;
        meas.mask <= cur_n;
        prev      <= cur_n;
        cur       <= '0;
      end else begin
        cur <= cur_n;
      end
    end
  end

endmodule
