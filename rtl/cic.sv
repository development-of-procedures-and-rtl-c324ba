// cic -- one-stage cascaded integrator-comb decimator with variable rate.
//
// Samples arrive only when the owning port routes one to this filter
// (en pulse, x_in valid). The integrator adds each sign-extended sample to a
// WORD_W-bit accumulator that wraps modulo 2**WORD_W. Decimation is not at a
// fixed rate: the port raises dec once per data period, and the filter
// remembers it; the next enabled sample closes the block. At that moment the
// comb stage (differential delay M = 1) subtracts the integrator value kept
// at the previous decimation from the current one, which is the sum of the
// samples of the finished block, and reports it on y_out together with
// count_out, the number of samples summed. dvo pulses for one cycle; the
// sample that closed the block starts the next block. The MCU divides the
// sum by the count, so no gain correction is done here.
//
// Following the published filter: N = 1 stage, M = 1, 16-bit input, 32-bit
// word, which holds up to 65536 samples of full-scale input. The count is
// a FCNT_W-bit word; a block of exactly 2**FCNT_W samples reads as 0. A
// block is only reported if it holds at least one sample.
//
// Timing: y_out/count_out/dvo are registered and valid the cycle after the
// en that closed the block.
module cic
  import fet_pkg::*;
#(
  parameter int unsigned IN_W  = ADC_W,
  parameter int unsigned OUT_W = WORD_W,
  parameter int unsigned CW    = FCNT_W
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   en,        // sample valid for this filter
  input  logic                   dec,       // decimate request from the port
  input  logic signed [IN_W-1:0] x_in,
  output logic signed [OUT_W-1:0] y_out,
  output logic [CW-1:0]          count_out,
  output logic                   dvo
);

  typedef enum logic {HOLD, SAMPLE} cic_state_e;

  logic signed [OUT_W-1:0] sxtx;     // sign-extended input
  logic signed [OUT_W-1:0] integ;    // integrator
  logic signed [OUT_W-1:0] comb_d;   // integrator value at last decimation
  logic [OUT_W-1:0]        count;    // samples in current block (saturating)
  logic                    dec_i;    // decimation pending
  cic_state_e              state;

  assign sxtx  = OUT_W'(x_in);       // signed source: sign extension
  assign state = (en && (dec_i || dec) && count != '0) ? SAMPLE : HOLD;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      integ     <= '0;
      comb_d    <= '0;
      count     <= '0;
      dec_i     <= 1'b0;
      y_out     <= '0;
      count_out <= '0;
      dvo       <= 1'b0;
    end else begin
      dvo <= 1'b0;
      if (dec) dec_i <= 1'b1;
      if (en) begin
        integ <= integ + sxtx;
        if (state == SAMPLE) begin
          // comb: difference of integrator snapshots, M = 1
          y_out     <= integ - comb_d;
          comb_d    <= integ;
          count_out <= CW'(count);
          dvo       <= 1'b1;
          count     <= OUT_W'(1);
          dec_i     <= 1'b0;
        end else begin
          // an empty block has nothing to report: drop the request
          if (count == '0) dec_i <= 1'b0;
          if (count != '1) count <= count + 1'b1;
        end
      end
    end
  end

endmodule
