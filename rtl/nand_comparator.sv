// nand_comparator: one clocked comparator of the flash bank.
//
// The physical comparator is two cross-coupled 3-input NAND gates. While the
// clock is low both NAND outputs are precharged to the supply. When the clock
// rises, each output discharges through three series NMOS devices, one of them
// gated by its side of the differential input; the faster side falls below a
// PMOS threshold first and the cross-coupling regenerates it to the rails. A
// static SR latch, buffered by inverters, holds the decision while the
// comparator is precharged again.
//
// Digitally the regenerative race resolves "is vin_p - vin_n above this
// comparator's trip point?" on the rising clock edge, and the SR latch holds
// the answer for the rest of the cycle. That is exactly a positive-edge
// flip-flop on a signed comparison, which is how this module renders it. The
// trip point TRIP_MV stands for the comparator's random mismatch offset; in a
// ladderless converter it is the comparator's only reference.
//
// Interface: vin_p/vin_n are signed mV samples; q goes high on the edge where
// vin_p - vin_n > TRIP_MV and stays until the next edge (one cycle latency).
// An exact tie resolves low.
//
// Follows the document: the clocked evaluate/precharge behaviour, the SR latch
// holding the result, the offset acting as the trip point. Own choices: the
// analog race is reduced to an ideal comparison, and the synchronous
// active-low reset clearing the latch (the document gives no reset).
module nand_comparator
  import flash_adc_pkg::*;
#(
  parameter int TRIP_MV = 0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t vin_p,
  input  sample_t vin_n,
  output logic    q
);

  // Difference with one extra bit so it cannot overflow.
  logic signed [SAMPLE_W:0] diff;
  logic                     decide;

  always_comb begin
    diff   = (SAMPLE_W+1)'(vin_p) - (SAMPLE_W+1)'(vin_n);
    decide = (32'(diff) > TRIP_MV);
  end

  // Evaluate on the rising edge; the SR latch holds through the precharge.
  always_ff @(posedge clk) begin
    if (!rst_n) q <= 1'b0;
    else        q <= decide;
  end

endmodule
