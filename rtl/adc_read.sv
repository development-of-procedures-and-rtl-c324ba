// adc_read -- conversion and read-out sequencer for the AD7656 ADC.
//
// While en (the OR of both ports' sampling windows) is high, sampling cycles
// follow one another; a cycle, once started, is locked in and always runs to
// its end even if en drops. The cycle is timed by a plain clock counter, not a
// state machine, so its length never varies: count 0..CYCLE_LEN-1, 81 clocks
// (4.05 us at 20 MHz). CONVST of all three channel groups is high from count
// 0 to 79, which starts a simultaneous conversion of all six channels. After
// the conversion time the six results are read over the 16-bit parallel bus:
// CS is low from count 62 to 78 and RD is low for two clocks out of every
// three, with channel k (0..5) captured at the end of count 63+3k. At count 79
// dvo pulses and v[0..5] hold the new results until the next cycle ends.
// After the cycle, samp_delay further clocks pass before the next request is
// accepted, which lowers the sampling rate without touching the windows.
//
// The pin timing is the published table; the outputs are registered so that
// each pin shows the table's value during the cycle the counter holds that
// count. The ADC mode pins (range, word/byte, serial/parallel, hardware mode,
// reference) are fixed as published. ADC reset is held for ADC_RST_CYCLES
// after the FPGA leaves reset and no cycle starts before that; its length is
// a choice of this design. conv_intern is high while any CONVST is high.
module adc_read
  import fet_pkg::*;
#(
  parameter int unsigned CYCLE_LEN      = 81,   // clocks per sampling cycle
  parameter int unsigned CONV_END       = 79,   // last count with CONVST high
  parameter int unsigned RD_START       = 62,   // first count with CS/RD low
  parameter int unsigned N_CH           = 6,
  parameter int unsigned ADC_RST_CYCLES = 4
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   en,          // sampling request
  input  logic [CNT_W-1:0]       samp_delay,  // idle clocks after each cycle
  input  logic [ADC_W-1:0]       adc_data,    // parallel data bus from ADC
  output logic                   adc_rd,      // read strobe, active low
  output logic                   adc_cs,      // chip select, active low
  output logic [2:0]             adc_convst,  // conversion start, groups A/B/C
  output logic                   adc_reset,   // ADC reset, active high
  output logic                   adc_stby,    // standby, active low
  output logic                   adc_range,
  output logic                   adc_wb,
  output logic                   adc_ser_par_sel,
  output logic                   adc_hs,
  output logic                   adc_wr_refen_dis,
  output logic [N_CH-1:0][ADC_W-1:0] v,       // latest results, channel 1..6
  output logic                   dvo,         // results valid pulse
  output logic                   conv_intern  // conversion in progress
);

  localparam int unsigned RD_END = RD_START + 3 * N_CH - 2;  // 78 by default

  typedef enum logic [1:0] {IDLE, CONV, DELAY} rd_state_e;

  rd_state_e        state, state_n;
  logic [6:0]       count, count_n;
  logic [CNT_W-1:0] count_delay, count_delay_n;
  logic [2:0]       rst_cnt;
  logic             adc_ready;

  assign adc_ready = (rst_cnt == 3'(ADC_RST_CYCLES));

  // next count / state
  always_comb begin
    state_n       = state;
    count_n       = count;
    count_delay_n = count_delay;
    unique case (state)
      IDLE: begin
        if (en && adc_ready) begin
          state_n = CONV;
          count_n = '0;
        end
      end
      CONV: begin
        if (count == 7'(CYCLE_LEN - 1)) begin
          if (samp_delay != '0) begin
            state_n       = DELAY;
            count_delay_n = CNT_W'(1);
          end else if (en) begin
            count_n = '0;
          end else begin
            state_n = IDLE;
          end
        end else begin
          count_n = count + 1'b1;
        end
      end
      DELAY: begin
        if (count_delay >= samp_delay) begin
          if (en) begin
            state_n = CONV;
            count_n = '0;
          end else begin
            state_n = IDLE;
          end
        end else begin
          count_delay_n = count_delay + 1'b1;
        end
      end
      default: state_n = IDLE;
    endcase
  end

  // is count c within the read phase with RD low (two of every three clocks)
  function automatic logic rd_low(input logic [6:0] c);
    int unsigned k;
    if (c < 7'(RD_START) || c > 7'(RD_END)) return 1'b0;
    k = int'(c) - RD_START;
    return (k % 3) != 2;
  endfunction

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state       <= IDLE;
      count       <= '0;
      count_delay <= '0;
      rst_cnt     <= '0;
      adc_reset   <= 1'b1;
      adc_rd      <= 1'b1;
      adc_cs      <= 1'b1;
      adc_convst  <= '0;
      dvo         <= 1'b0;
      v           <= '0;
    end else begin
      if (!adc_ready) rst_cnt <= rst_cnt + 1'b1;
      adc_reset   <= !adc_ready && (rst_cnt != 3'(ADC_RST_CYCLES - 1));
      state       <= state_n;
      count       <= count_n;
      count_delay <= count_delay_n;
      // pins for the cycle in which the counter holds count_n
      adc_convst  <= {3{state_n == CONV && count_n <= 7'(CONV_END)}};
      adc_cs      <= !(state_n == CONV && count_n >= 7'(RD_START) && count_n <= 7'(RD_END));
      adc_rd      <= !(state_n == CONV && rd_low(count_n));
      dvo         <= (state_n == CONV && count_n == 7'(CONV_END));
      // capture: channel k at the end of count RD_START+1+3k
      if (state == CONV) begin
        for (int k = 0; k < int'(N_CH); k++) begin
          if (count == 7'(RD_START + 1 + 3 * k)) v[k] <= adc_data;
        end
      end
    end
  end

  // fixed mode pins of the ADC
  assign adc_stby         = 1'b1;  // never in standby
  assign adc_range        = 1'b1;  // +-2*VREF input range
  assign adc_wb           = 1'b0;  // word mode
  assign adc_ser_par_sel  = 1'b0;  // parallel interface
  assign adc_hs           = 1'b0;  // hardware mode
  assign adc_wr_refen_dis = 1'b1;  // internal reference setting as published

  assign conv_intern = |adc_convst;

endmodule
