// fpix1_frontend: behavioural model of the analog front end of one pixel.
//
// This is a behavioural model, not circuit logic. The real part is a charge
// sensitive amplifier, a second amplification stage, a discriminator and the
// three comparators of a 2-bit flash ADC. The model takes the amplitude at
// the output of the second stage, expressed in equivalent input electrons,
// and compares it with the four thresholds that are common to all pixels and
// enter the chip as DC levels: the discriminator threshold and three ADC
// thresholds. Outputs follow the input without delay (no time walk, noise or
// recovery-time modelling).
//
//   amp_e     amplitude in electrons (dynamic range about 40 ke-, 16 bits)
//   thr_e     discriminator threshold; hit = amp_e > thr_e
//   adc_thr_e ADC comparator thresholds; comp[i] = amp_e > adc_thr_e[i]
//
// The structure (discriminator plus three ADC comparators fed from the
// second stage) follows the chip description; the unit and width of the
// amplitude are this model's choice.
module fpix1_frontend #(
  parameter int unsigned AMP_W = 16
) (
  input  logic [AMP_W-1:0]      amp_e,
  input  logic [AMP_W-1:0]      thr_e,
  input  logic [2:0][AMP_W-1:0] adc_thr_e,
  output logic                  hit,
  output logic [2:0]            comp
);

  always_comb begin
    hit = (amp_e > thr_e);
    for (int i = 0; i < 3; i++) comp[i] = (amp_e > adc_thr_e[i]);
  end

endmodule
