// mcu_io -- MCU bus interface, register file and stream signalling.
//
// Register file: 64 words of 16 bits (map in fet_pkg). The MCU writes the
// configuration (switched-biasing period/width, window phases, sampling
// delay, data periods, stream select, range relays, software reset); the
// FPGA writes the filter results, the trigger flags and the count of lost
// measurements. All words reset to 0, so nothing runs until configured.
//
// Bus: 8-bit address, 16-bit data (bidirectional on the board; here split
// into data_in, data_out and data_oe for the pad buffer). The MCU runs on
// its own clock, so its control lines pass two-flip-flop synchronisers and
// address/data are sampled only once a synchronised request is seen.
//  * Read (MISO): the MCU sets the address, lowers mcu_oe (FPGA drives the
//    bus) and raises req_miso. The FPGA puts the word on the bus and raises
//    req_miso_ack. The MCU takes the data and lowers req_miso; the FPGA
//    then lowers the ack.
//  * Write (MOSI): the MCU raises mcu_oe (FPGA bus is input), sets address
//    and data and raises req_mosi. The FPGA stores the word and raises
//    req_mosi_ack; it lowers it after the MCU lowers req_mosi.
// Addresses 64..255 read as 0 and ignore writes.
//
// Streaming: when a port selected by bits 14 (port 1) and 15 (port 2) of
// word 27 triggers, its results and filter flags (word 27 bits 0..7) are
// stored and stream_dvo is raised for three clocks to interrupt the MCU.
// While the MCU holds stream_busy, results are frozen so that a multi-word
// read is consistent, unless bit 7 of word 28 asks for updates regardless.
// A selected trigger that comes while stream_busy is high is a lost
// measurement: stream_warn is set and the lost counter (word 60) counts up;
// the warning is cleared when the MCU starts its next retrieval (rising
// stream_busy).
//
// The handshake, the map and the three-clock DVO stretch follow the
// published design. The published text puts the lost counter at word 51,
// which the published map gives to the port 1 temperature count; this
// design keeps the map and uses the free word 60. The clearing of the
// warning, the lock rule and the read-only handling of addresses >= 64 are
// choices of this design.
module mcu_io
  import fet_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  // MCU bus
  input  logic [ADDR_W-1:0]  mcu_addr,
  input  logic [DATA_W-1:0]  mcu_data_in,
  output logic [DATA_W-1:0]  mcu_data_out,
  output logic               mcu_data_oe,     // FPGA drives the data bus
  input  logic               mcu_oe,          // 1: MCU drives (write)
  input  logic               mcu_req_miso,
  output logic               mcu_req_miso_ack,
  input  logic               mcu_req_mosi,
  output logic               mcu_req_mosi_ack,
  input  logic               mcu_stream_busy,
  output logic               mcu_stream_dvo,
  output logic               mcu_stream_warn,
  // to / from the rest of the FPGA
  output port_cfg_t          cfg1,
  output port_cfg_t          cfg2,
  output logic [CNT_W-1:0]   samp_delay,
  output logic               range_ch1,
  output logic               range_ch2,
  output logic               sw_reset,
  input  port_meas_t         meas1,
  input  port_meas_t         meas2
);

  logic [DATA_W-1:0] ram [RAM_WORDS];

  // synchronisers for the MCU control lines
  logic [1:0] miso_s, mosi_s, oe_s, busy_s;
  logic       busy_d;
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      miso_s <= '0;
      mosi_s <= '0;
      oe_s   <= '0;
      busy_s <= '0;
      busy_d <= 1'b0;
    end else begin
      miso_s <= {miso_s[0], mcu_req_miso};
      mosi_s <= {mosi_s[0], mcu_req_mosi};
      oe_s   <= {oe_s[0],   mcu_oe};
      busy_s <= {busy_s[0], mcu_stream_busy};
      busy_d <= busy_s[1];
    end
  end

  logic miso_req, mosi_req, busy;
  assign miso_req = miso_s[1];
  assign mosi_req = mosi_s[1];
  assign busy     = busy_s[1];
  assign mcu_data_oe = !oe_s[1];

  // 32-bit configuration words from word pairs
  function automatic logic [CNT_W-1:0] word32(input int unsigned lo);
    return {ram[lo + 1], ram[lo]};
  endfunction

  always_comb begin
    cfg1.sw_period   = word32(A_TPERIOD_A);
    cfg1.sw_width    = word32(A_TWIDTH_A);
    cfg1.phase_a     = word32(A_PHASE_A1);
    cfg1.phase_b     = word32(A_PHASE_A1 + 2);
    cfg1.phase_c     = word32(A_PHASE_A1 + 4);
    cfg1.phase_d     = word32(A_PHASE_A1 + 6);
    cfg1.data_period = word32(A_DATA_PER1);
    cfg2.sw_period   = word32(A_TPERIOD_B);
    cfg2.sw_width    = word32(A_TWIDTH_B);
    cfg2.phase_a     = word32(A_PHASE_A2);
    cfg2.phase_b     = word32(A_PHASE_A2 + 2);
    cfg2.phase_c     = word32(A_PHASE_A2 + 4);
    cfg2.phase_d     = word32(A_PHASE_A2 + 6);
    cfg2.data_period = word32(A_DATA_PER2);
  end
  assign samp_delay = word32(A_SAMP_DELAY);
  assign sw_reset   = ram[A_CONTROL][0];
  assign range_ch1  = ram[A_CONTROL][1];
  assign range_ch2  = ram[A_CONTROL][2];

  // stream events
  logic [1:0] sel;
  logic       always_update;
  logic       stream_ev;
  logic       update_ok;
  logic [1:0] dvo_hold;
  assign sel           = ram[A_CH_TRIG][15:14];
  assign always_update = ram[A_ADC_SETUP][7];
  assign stream_ev     = (meas1.trig && sel[0]) || (meas2.trig && sel[1]);
  assign update_ok     = !busy || always_update;

  // store one port's results: sums at val_base.., counts at cnt_base..
  task automatic store_port(input port_meas_t m, input int unsigned val_base,
                            input int unsigned cnt_base, input int unsigned flag_lsb);
    if (m.mask.a) begin
      ram[val_base]     <= m.a.sum[15:0];
      ram[val_base + 1] <= m.a.sum[31:16];
      ram[cnt_base]     <= m.a.count;
    end
    if (m.mask.b) begin
      ram[val_base + 2] <= m.b.sum[15:0];
      ram[val_base + 3] <= m.b.sum[31:16];
      ram[cnt_base + 1] <= m.b.count;
    end
    if (m.mask.t) begin
      ram[val_base + 6] <= m.t.sum[15:0];
      ram[val_base + 7] <= m.t.sum[31:16];
      ram[cnt_base + 3] <= m.t.count;
    end
    // flags a, b, c (never), t
    ram[A_CH_TRIG][flag_lsb +: 4] <= {m.mask.t, 1'b0, m.mask.b, m.mask.a};
  endtask

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < int'(RAM_WORDS); i++) ram[i] <= '0;
      mcu_data_out     <= '0;
      mcu_req_miso_ack <= 1'b0;
      mcu_req_mosi_ack <= 1'b0;
      mcu_stream_warn  <= 1'b0;
      dvo_hold         <= '0;
    end else begin
      // COMM_PROC: read handshake
      if (miso_req && !mcu_req_miso_ack) begin
        mcu_data_out     <= (mcu_addr < ADDR_W'(RAM_WORDS)) ? ram[mcu_addr[5:0]] : '0;
        mcu_req_miso_ack <= 1'b1;
      end else if (!miso_req) begin
        mcu_req_miso_ack <= 1'b0;
      end
      // COMM_PROC: write handshake
      if (mosi_req && !mcu_req_mosi_ack) begin
        if (mcu_addr < ADDR_W'(RAM_WORDS)) ram[mcu_addr[5:0]] <= mcu_data_in;
        mcu_req_mosi_ack <= 1'b1;
      end else if (!mosi_req) begin
        mcu_req_mosi_ack <= 1'b0;
      end
      // results from the ports
      if (update_ok) begin
        if (meas1.trig) store_port(meas1, A_CH1_VAL, A_CH1_CNT, 0);
        if (meas2.trig) store_port(meas2, A_CH2_VAL, A_CH2_CNT, 4);
      end
      // STREAM_PROC: DVO held for three clocks
      if (stream_ev)          dvo_hold <= 2'd3;
      else if (dvo_hold != 0) dvo_hold <= dvo_hold - 1'b1;
      // STREAM_WARN
      if (stream_ev && busy) begin
        mcu_stream_warn <= 1'b1;
        ram[A_LOST_CNT] <= ram[A_LOST_CNT] + 1'b1;
      end else if (busy && !busy_d) begin
        mcu_stream_warn <= 1'b0;
      end
    end
  end

  assign mcu_stream_dvo = (dvo_hold != 0);

  // handshake rules: an acknowledge only rises in answer to a pending
  // request, and the FPGA drives the data bus only when the MCU asks to read
  a_miso_ack: assert property (@(posedge clk) disable iff (rst)
                               $rose(mcu_req_miso_ack) |-> $past(miso_req));
  a_mosi_ack: assert property (@(posedge clk) disable iff (rst)
                               $rose(mcu_req_mosi_ack) |-> $past(mosi_req));
  a_bus_dir:  assert property (@(posedge clk) disable iff (rst)
                               mcu_req_miso_ack |-> mcu_data_oe);

endmodule
