// flash_adc_model: behavioural model of the flash ADC hybrid (500 MS/s
// sample-and-hold feeding two interleaved 250 MS/s 8-bit converters).
// For testbenches only. The two analog inputs of one 250 MHz clock period
// come in as millivolts; pair[0] is the earlier sample. The threshold DAC
// level is subtracted as on the real part's second input. Conversion is
// immediate: the codes are valid at the clock edge that samples them.
module flash_adc_model
  import td_pkg::*;
  import td_tb_pkg::*;
(
  input  real         vin_early_mv,
  input  real         vin_late_mv,
  input  logic [11:0] dac_level,
  output adc_pair_t   pair
);
  always_comb begin
    pair[0] = adc_code(vin_early_mv, dac_level);
    pair[1] = adc_code(vin_late_mv, dac_level);
  end
endmodule
