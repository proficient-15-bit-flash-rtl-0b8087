// comparator_bank: the ladderless flash comparator array.
//
// A conventional flash ADC spaces its comparator thresholds 1 LSB apart with a
// resistor ladder. Here the ladder is removed: every comparator receives the
// same differential input, and each one's trip point is only its own random
// mismatch offset. The offsets are Gaussian with zero mean and spread
// SIGMA_MV, so for an input v the expected number of comparators that trip is
// N * Phi(v / SIGMA_MV). The outputs are not a thermometer code: comparator
// order carries no meaning, and "bubbles" are normal. Only the count of ones
// is used downstream.
//
// The mismatch of one die is modelled by drawing the trip points at
// elaboration time from a seeded pseudo-random Gaussian generator
// (flash_adc_pkg::gauss_offset_mv); change SEED to model another die.
//
// Interface: vin_p/vin_n signed mV; dec[i] is comparator i's latched
// decision, registered on the rising clock edge (one cycle latency).
//
// Follows the document: no reference ladder, one common differential input,
// Gaussian random offsets as virtual references. Own choices: the offset
// spread, the pseudo-random model of the mismatch and the count N (15, from
// the converter's "15-bit" name).
module comparator_bank
  import flash_adc_pkg::*;
#(
  parameter int unsigned N        = N_COMP,
  parameter int          SIGMA    = SIGMA_MV,
  parameter int unsigned SEED     = OFFSET_SEED
) (
  input  logic         clk,
  input  logic         rst_n,
  input  sample_t      vin_p,
  input  sample_t      vin_n,
  output logic [N-1:0] dec
);

  for (genvar i = 0; i < N; i++) begin : g_cmp
    nand_comparator #(
      .TRIP_MV(gauss_offset_mv(i, SIGMA, SEED))
    ) u_cmp (
      .clk  (clk),
      .rst_n(rst_n),
      .vin_p(vin_p),
      .vin_n(vin_n),
      .q    (dec[i])
    );
  end

endmodule
