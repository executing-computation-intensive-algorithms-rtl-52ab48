// adc_control -- set-up and read-out of the THS1206 12-bit ADC.
//
// Two state machines do the work. The main one (ad_state) walks through the
// configuration sequence of the converter's data sheet: write 0x401 (set the reset
// bit in CR1), write 0x400 (clear it), write the user value of CR0, write the user
// value of CR1, then stay in SAMPLE for good (only the system reset leaves it). The
// second one (ctrl_state) performs each bus cycle: SETWR/USETWR drive a word onto the
// data bus and pulse adc_wr; SETRD/UNSETRD pulse adc_rd after the converter flags a
// new sample on adc_data_av and latch the bus. The main machine moves on each time
// the bus machine falls back to IDLE after a write.
//
// While in SAMPLE a counter divides the clock by CONV_DIV to make the conversion
// clock: with an 18.432 MHz clock and CONV_DIV = 6 that is 3.072 MS/s, one sample
// every six clocks. The conversion clock is high for CONV_DIV/2 clocks and low for
// the rest. This follows the stated 3.072 MHz sample rate; a counter that toggled
// the clock only once per six clocks would give half of it.
//
// Interface: the bidirectional data bus of the converter is split into adc_data_i,
// adc_data_o and adc_data_oe. adc_wr and adc_rd are active-high one-clock strobes.
// sample_valid pulses for one clock with the new value on sample, two clocks after
// adc_data_av was seen. The register values and the sequence are the document's;
// strobe polarity, the one-clock strobe width and the split bus are this design's.
module adc_control
  import rfid_pkg::*;
#(
  parameter int unsigned CONV_DIV   = 6,
  parameter logic [11:0] RESET_WORD = 12'h401,
  parameter logic [11:0] CLEAR_WORD = 12'h400,
  parameter logic [11:0] CR0_VAL    = 12'h000,
  parameter logic [11:0] CR1_VAL    = 12'h4A0
) (
  input  logic    clk,
  input  logic    rst,
  output logic    adc_wr,
  output logic    adc_rd,
  input  logic    adc_data_av,
  input  sample_t adc_data_i,
  output sample_t adc_data_o,
  output logic    adc_data_oe,
  output logic    adc_convclk,
  output sample_t sample,
  output logic    sample_valid,
  output logic    configured
);

  typedef enum logic [2:0] {
    AD_IDLE, AD_RESET_AD, AD_SET_AD, AD_CR0_SET, AD_CR1_SET, AD_SAMPLE
  } ad_state_t;

  typedef enum logic [2:0] {
    C_IDLE, C_SETWR, C_USETWR, C_SETRD, C_UNSETRD
  } ctrl_state_t;

  ad_state_t   ad_state;
  ctrl_state_t ctrl_state;
  logic [$clog2(CONV_DIV)-1:0] conv_cnt;

  // Word written for each configuration state.
  sample_t wr_word;
  always_comb begin
    unique case (ad_state)
      AD_RESET_AD: wr_word = RESET_WORD;
      AD_SET_AD:   wr_word = CLEAR_WORD;
      AD_CR0_SET:  wr_word = CR0_VAL;
      AD_CR1_SET:  wr_word = CR1_VAL;
      default:     wr_word = '0;
    endcase
  end

  // Main state machine: one step per completed write.
  always_ff @(posedge clk) begin
    if (rst) begin
      ad_state <= AD_IDLE;
    end else begin
      unique case (ad_state)
        AD_IDLE:     ad_state <= AD_RESET_AD;
        AD_RESET_AD: if (ctrl_state == C_USETWR) ad_state <= AD_SET_AD;
        AD_SET_AD:   if (ctrl_state == C_USETWR) ad_state <= AD_CR0_SET;
        AD_CR0_SET:  if (ctrl_state == C_USETWR) ad_state <= AD_CR1_SET;
        AD_CR1_SET:  if (ctrl_state == C_USETWR) ad_state <= AD_SAMPLE;
        AD_SAMPLE:   ad_state <= AD_SAMPLE;
        default:     ad_state <= AD_IDLE;
      endcase
    end
  end

  // Bus state machine.
  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl_state   <= C_IDLE;
      adc_wr       <= 1'b0;
      adc_rd       <= 1'b0;
      adc_data_o   <= '0;
      adc_data_oe  <= 1'b0;
      sample       <= '0;
      sample_valid <= 1'b0;
    end else begin
      sample_valid <= 1'b0;
      unique case (ctrl_state)
        C_IDLE: begin
          adc_data_oe <= 1'b0;
          if (ad_state inside {AD_RESET_AD, AD_SET_AD, AD_CR0_SET, AD_CR1_SET}) begin
            ctrl_state  <= C_SETWR;
            adc_data_o  <= wr_word;
            adc_data_oe <= 1'b1;
            adc_wr      <= 1'b1;
          end else if (ad_state == AD_SAMPLE && adc_data_av) begin
            ctrl_state <= C_SETRD;
            adc_rd     <= 1'b1;
          end
        end
        C_SETWR: begin
          adc_wr     <= 1'b0;
          ctrl_state <= C_USETWR;
        end
        C_USETWR: begin
          adc_data_oe <= 1'b0;
          ctrl_state  <= C_IDLE;
        end
        C_SETRD: begin
          adc_rd     <= 1'b0;
          ctrl_state <= C_UNSETRD;
        end
        C_UNSETRD: begin
          sample       <= adc_data_i;
          sample_valid <= 1'b1;
          ctrl_state   <= C_IDLE;
        end
        default: ctrl_state <= C_IDLE;
      endcase
    end
  end

  // Conversion clock, running only in SAMPLE (START_CONV).
  always_ff @(posedge clk) begin
    if (rst) begin
      conv_cnt    <= '0;
      adc_convclk <= 1'b0;
    end else if (ad_state == AD_SAMPLE) begin
      if (32'(conv_cnt) == CONV_DIV - 1) begin
        conv_cnt    <= '0;
        adc_convclk <= 1'b1;
      end else begin
        conv_cnt <= conv_cnt + 1'b1;
        if (32'(conv_cnt) == CONV_DIV / 2 - 1) adc_convclk <= 1'b0;
      end
    end
  end

  assign configured = (ad_state == AD_SAMPLE);

  // A bus cycle never reads and writes at once.
  assert property (@(posedge clk) disable iff (rst) !(adc_wr && adc_rd));

endmodule
