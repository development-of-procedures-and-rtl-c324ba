// fet_root -- FPGA top of the two-port switched-biasing FET measurement system.
//
// The board measures two field-effect transistors at once. Each port's gate
// bias is switched between two levels A and B (sw_a / sw_b); the drain
// current is turned into a voltage and sampled by a 6-channel 16-bit ADC
// together with the transistor temperature. This FPGA
//  * generates both switched-biasing signals with programmable period and
//    duty cycle (adc_ch, one per port),
//  * opens programmable sampling windows inside each bias period and runs
//    the ADC conversion/read-out sequence while one is open (adc_read, fed
//    through or_gate2 by both ports),
//  * routes every current sample to the filter of the bias level it was
//    taken at, and temperature samples to their own filter: six one-stage
//    CIC decimators, A/B/T for each port, whose block length follows the
//    port's data period (cic),
//  * decides when each port's result set is complete (calc_ch) and
//    interrupts the MCU, which reads sums and counts from a 64-word register
//    file over a handshaken parallel bus (mcu_io),
//  * synchronises the push-button and software resets (reset_sync).
// Port 1 uses ADC channels 1 (current) and 2 (temperature), port 2 channels
// 3 and 4; channels 5 and 6 are converted but unused. This channel
// assignment and the split of the bidirectional data bus into
// in/out/output-enable for the pad buffer are choices of this design; the
// block structure and instance list follow the published design. All logic
// runs on the single 20 MHz clock.
module fet_root
  import fet_pkg::*;
(
  input  logic               clk,              // 20 MHz system clock
  input  logic               areset,           // reset button, active low
  // ADC (AD7656)
  output logic               adc_rd,
  output logic [2:0]         adc_convst,
  output logic               adc_cs,
  output logic               adc_reset,
  output logic               adc_stby,
  output logic               adc_range,
  output logic               adc_wb,
  output logic               adc_ser_par_sel,
  output logic               adc_hs,
  output logic               adc_wr_refen_dis,
  input  logic               adc_busy,
  input  logic [ADC_W-1:0]   adc_data,
  // switched biasing and range relays
  output logic               sw_a,
  output logic               sw_b,
  output logic               range_ch1,
  output logic               range_ch2,
  // MCU bus
  input  logic [ADDR_W-1:0]  mcu_addr,
  input  logic [DATA_W-1:0]  mcu_data_in,
  output logic [DATA_W-1:0]  mcu_data_out,
  output logic               mcu_data_oe,
  input  logic               mcu_oe,
  output logic               mcu_stream_dvo,
  input  logic               mcu_stream_busy,
  output logic               mcu_stream_warn,
  input  logic               mcu_req_mosi,
  output logic               mcu_req_mosi_ack,
  input  logic               mcu_req_miso,
  output logic               mcu_req_miso_ack
);

  logic rst;
  logic sw_reset;

  port_cfg_t        cfg [2];
  port_meas_t       meas [2];
  logic [CNT_W-1:0] samp_delay;
  logic [5:0][ADC_W-1:0] v;
  logic             adc_dvo;
  logic             conv_intern;
  logic             adc_en_any;
  logic [1:0]       adc_en;
  logic [1:0]       swb;
  logic [1:0]       dec;

  reset_sync u_reset_sync (
    .clk      (clk),
    .in_async (areset),
    .sw_reset (sw_reset),
    .out_sync (rst)
  );

  mcu_io u_mcu_io (
    .clk              (clk),
    .rst              (rst),
    .mcu_addr         (mcu_addr),
    .mcu_data_in      (mcu_data_in),
    .mcu_data_out     (mcu_data_out),
    .mcu_data_oe      (mcu_data_oe),
    .mcu_oe           (mcu_oe),
    .mcu_req_miso     (mcu_req_miso),
    .mcu_req_miso_ack (mcu_req_miso_ack),
    .mcu_req_mosi     (mcu_req_mosi),
    .mcu_req_mosi_ack (mcu_req_mosi_ack),
    .mcu_stream_busy  (mcu_stream_busy),
    .mcu_stream_dvo   (mcu_stream_dvo),
    .mcu_stream_warn  (mcu_stream_warn),
    .cfg1             (cfg[0]),
    .cfg2             (cfg[1]),
    .samp_delay       (samp_delay),
    .range_ch1        (range_ch1),
    .range_ch2        (range_ch2),
    .sw_reset         (sw_reset),
    .meas1            (meas[0]),
    .meas2            (meas[1])
  );

  or_gate2 u_or_gate2 (
    .a (adc_en[0]),
    .b (adc_en[1]),
    .y (adc_en_any)
  );

  adc_read u_adc_read (
    .clk              (clk),
    .rst              (rst),
    .en               (adc_en_any),
    .samp_delay       (samp_delay),
    .adc_data         (adc_data),
    .adc_rd           (adc_rd),
    .adc_cs           (adc_cs),
    .adc_convst       (adc_convst),
    .adc_reset        (adc_reset),
    .adc_stby         (adc_stby),
    .adc_range        (adc_range),
    .adc_wb           (adc_wb),
    .adc_ser_par_sel  (adc_ser_par_sel),
    .adc_hs           (adc_hs),
    .adc_wr_refen_dis (adc_wr_refen_dis),
    .v                (v),
    .dvo              (adc_dvo),
    .conv_intern      (conv_intern)
  );

  for (genvar p = 0; p < 2; p++) begin : g_port
    logic [ADC_W-1:0] val_h, val_l, val_t;
    logic             val_h_en, val_l_en, val_t_en;
    logic             a_dvo, b_dvo, t_dvo;
    filt_res_t        a_res, b_res, t_res;

    adc_ch u_adc_ch (
      .clk      (clk),
      .rst      (rst),
      .cfg      (cfg[p]),
      .adc_busy (adc_busy),
      .adc_dvi  (adc_dvo),
      .va       (v[2*p]),
      .vt       (v[2*p+1]),
      .swb      (swb[p]),
      .adc_en   (adc_en[p]),
      .dec      (dec[p]),
      .val_h    (val_h),
      .val_h_en (val_h_en),
      .val_l    (val_l),
      .val_l_en (val_l_en),
      .val_t    (val_t),
      .val_t_en (val_t_en)
    );

    cic u_filter_a (
      .clk (clk), .rst (rst), .en (val_h_en), .dec (dec[p]), .x_in (val_h),
      .y_out (a_res.sum), .count_out (a_res.count), .dvo (a_dvo)
    );
    cic u_filter_b (
      .clk (clk), .rst (rst), .en (val_l_en), .dec (dec[p]), .x_in (val_l),
      .y_out (b_res.sum), .count_out (b_res.count), .dvo (b_dvo)
    );
    cic u_filter_t (
      .clk (clk), .rst (rst), .en (val_t_en), .dec (dec[p]), .x_in (val_t),
      .y_out (t_res.sum), .count_out (t_res.count), .dvo (t_dvo)
    );

    calc_ch u_calc_ch (
      .clk   (clk),
      .rst   (rst),
      .dec   (dec[p]),
      .a_dvo (a_dvo), .a_res (a_res),
      .b_dvo (b_dvo), .b_res (b_res),
      .t_dvo (t_dvo), .t_res (t_res),
      .meas  (meas[p])
    );
  end

  assign sw_a = swb[0];
  assign sw_b = swb[1];

endmodule
