// fet_pkg -- types and constants shared by the FET measurement FPGA.
//
// The FPGA sits between a 6-channel 16-bit ADC, the switched-biasing
// hardware of two FET measurement ports and a microcontroller (MCU) that
// reads filtered results over a 16-bit parallel bus. This package holds
// the register map of the 64 x 16-bit register file in mcu_io (addresses
// follow the published map; 32-bit values occupy two words, low word at
// the lower address, which is a choice of this design) and the structs
// that carry a port's configuration and its filter results between blocks.
package fet_pkg;

  localparam int unsigned CLK_HZ   = 20_000_000;  // FPGA system clock
  localparam int unsigned ADC_W    = 16;          // ADC sample width
  localparam int unsigned WORD_W   = 32;          // CIC internal/output width
  localparam int unsigned CNT_W    = 32;          // period / phase counters
  localparam int unsigned FCNT_W   = 16;          // filter sample count word
  localparam int unsigned RAM_WORDS = 64;
  localparam int unsigned ADDR_W   = 8;           // MCU address bus
  localparam int unsigned DATA_W   = 16;          // MCU data bus

  // Register map (word addresses). Each *_LO is followed by its high word.
  localparam int unsigned A_TPERIOD_A   = 0;   // port 1 switched-bias period
  localparam int unsigned A_TWIDTH_A    = 2;   // port 1 A-level width
  localparam int unsigned A_TPERIOD_B   = 4;   // port 2 period
  localparam int unsigned A_TWIDTH_B    = 6;   // port 2 width
  localparam int unsigned A_PHASE_A1    = 8;   // port 1 phases a,b,c,d: 8,10,12,14
  localparam int unsigned A_PHASE_A2    = 16;  // port 2 phases a,b,c,d: 16,18,20,22
  localparam int unsigned A_SAMP_DELAY  = 24;  // ADC sampling delay
  localparam int unsigned A_CH_TRIG     = 27;  // trigger flags + stream select
  localparam int unsigned A_ADC_SETUP   = 28;  // bit 7: results always update
  localparam int unsigned A_CONTROL     = 29;  // bit0 sw reset, bit1/2 range
  localparam int unsigned A_CH1_VAL     = 32;  // ch1 a,b,c,t: 32,34,36,38
  localparam int unsigned A_CH2_VAL     = 40;  // ch2 a,b,c,t: 40,42,44,46
  localparam int unsigned A_CH1_CNT     = 48;  // fet1 a,b,c,t counts: 48..51
  localparam int unsigned A_CH2_CNT     = 52;  // fet2 a,b,c,t counts: 52..55
  localparam int unsigned A_DATA_PER1   = 56;  // port 1 data (decimation) period
  localparam int unsigned A_DATA_PER2   = 58;  // port 2 data period
  localparam int unsigned A_LOST_CNT    = 60;  // lost-measurement counter

  // Configuration of one measurement port, in FPGA clock cycles.
  typedef struct packed {
    logic [CNT_W-1:0] sw_period;    // switched-bias period
    logic [CNT_W-1:0] sw_width;     // time spent at level A within a period
    logic [CNT_W-1:0] phase_a;      // A window start
    logic [CNT_W-1:0] phase_b;      // A window end
    logic [CNT_W-1:0] phase_c;      // B window start
    logic [CNT_W-1:0] phase_d;      // B window end
    logic [CNT_W-1:0] data_period;  // decimation (result output) period
  } port_cfg_t;

  // One filter result: integrated sum and number of samples in it.
  typedef struct packed {
    logic [WORD_W-1:0] sum;
    logic [FCNT_W-1:0] count;
  } filt_res_t;

  // Which filters of a port contributed to a trigger.
  typedef struct packed {
    logic t;
    logic b;
    logic a;
  } filt_mask_t;

  // Results of one port as handed from calc_ch to mcu_io.
  typedef struct packed {
    logic       trig;     // one-cycle pulse: port results ready
    filt_mask_t mask;     // filters that delivered since the last trigger
    filt_res_t  a;
    filt_res_t  b;
    filt_res_t  t;
  } port_meas_t;

endpackage
