// adc_ch -- switched-biasing generator and sample router of one FET port.
//
// Two down-counters run from the configured values (in FPGA clocks):
//  * sw_cnt counts one switched-biasing period, sw_period .. 1, and reloads.
//    With e = sw_period - sw_cnt the clocks elapsed in the period, the bias
//    control output swb is high (level A) while e < sw_width and low
//    (level B) for the rest. sw_width = sw_period gives constant biasing at A.
//    With sw_period = 0 the counter stays at 0 and swb stays low: the port
//    is idle until the MCU configures it.
//  * data_cnt counts the data (decimation) period the same way; dec pulses
//    for one clock whenever it reaches 1, telling this port's three CIC
//    filters to close their current block.
// Sampling windows: adc_en requests ADC conversions while
// phase_a <= e < phase_b (window A) or phase_c <= e < phase_d (window B).
// The ADC needs several clocks before its result returns, by which time the
// bias may have switched, so the bias level is latched on the rising edge of
// the ADC's BUSY output (the sample-and-hold instant), and when the results
// arrive (adc_dvi) the current sample goes to the A filter if that level was
// A and to the B filter otherwise; the temperature sample always goes to the
// T filter. Each filter gets a one-clock enable with its value.
//
// The counters, the width/phase comparisons and the BUSY-edge latch follow
// the published design. Whether e is compared with >= or > at the window
// edges, and the reload of a counter only once it has run out, are choices
// of this design. Every ADC result is routed, also one started by the other
// port's window, as in the published design. Outputs are registered.
module adc_ch
  import fet_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  port_cfg_t          cfg,
  input  logic               adc_busy,    // BUSY pin of the ADC
  input  logic               adc_dvi,     // new results from adc_read
  input  logic [ADC_W-1:0]   va,          // current-measurement sample
  input  logic [ADC_W-1:0]   vt,          // temperature sample
  output logic               swb,         // switched-biasing control, 1 = level A
  output logic               adc_en,      // sampling request
  output logic               dec,         // decimate pulse to the filters
  output logic [ADC_W-1:0]   val_h,       // to A filter
  output logic               val_h_en,
  output logic [ADC_W-1:0]   val_l,       // to B filter
  output logic               val_l_en,
  output logic [ADC_W-1:0]   val_t,       // to T filter
  output logic               val_t_en
);

  logic [CNT_W-1:0] sw_cnt;
  logic [CNT_W-1:0] data_cnt;
  logic [CNT_W-1:0] elapsed;
  logic             running;
  logic             busy_d;
  logic             last_state;

  // SW_COUNT and DATA_COUNT: down-counters with reload
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sw_cnt   <= '0;
      data_cnt <= '0;
    end else begin
      if (sw_cnt <= CNT_W'(1)) sw_cnt <= cfg.sw_period;
      else                     sw_cnt <= sw_cnt - 1'b1;
      if (data_cnt <= CNT_W'(1)) data_cnt <= cfg.data_period;
      else                       data_cnt <= data_cnt - 1'b1;
    end
  end

  assign running = (sw_cnt != '0);
  assign elapsed = (sw_cnt > cfg.sw_period) ? '0 : cfg.sw_period - sw_cnt;

  // SW_PROC, ADC_CONTROL, DEC_PROC
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      swb    <= 1'b0;
      adc_en <= 1'b0;
      dec    <= 1'b0;
    end else begin
      swb    <= running && (elapsed < cfg.sw_width);
      adc_en <= running &&
                ((elapsed >= cfg.phase_a && elapsed < cfg.phase_b) ||
                 (elapsed >= cfg.phase_c && elapsed < cfg.phase_d));
      dec    <= (data_cnt == CNT_W'(1));
    end
  end

  // LAST_STATE: bias level at the sample-and-hold instant
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      busy_d     <= 1'b0;
      last_state <= 1'b0;
    end else begin
      busy_d <= adc_busy;
      if (adc_busy && !busy_d) last_state <= swb;
    end
  end

  // FILTER_CONTROL
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      val_h    <= '0;
      val_l    <= '0;
      val_t    <= '0;
      val_h_en <= 1'b0;
      val_l_en <= 1'b0;
      val_t_en <= 1'b0;
    end else begin
      val_h_en <= 1'b0;
      val_l_en <= 1'b0;
      val_t_en <= 1'b0;
      if (adc_dvi) begin
        if (last_state) begin
          val_h    <= va;
          val_h_en <= 1'b1;
        end else begin
          val_l    <= va;
          val_l_en <= 1'b1;
        end
        val_t    <= vt;
        val_t_en <= 1'b1;
      end
    end
  end

endmodule
