// flash_adc_top: all-digital stochastic flash ADC with its sine-wave source.
//
// Signal path (one sample per clock, fully pipelined):
//
//   sine_gen --vin--> comparator_bank --dec[N]--> wallace_counter --count-->
//   inv_gauss_pwl --vout-->
//
// The sine generator produces the test input (5 V peak to peak, 1.6 MHz at a
// 100 MHz clock). The comparator bank has no reference ladder: N comparators
// see the same input and trip at their own Gaussian random offsets. The
// Wallace tree counts how many tripped, which is insensitive to the bubbles
// such a bank produces. The piecewise-linear inverse Gaussian CDF maps the
// count back to millivolts, reconstructing the input.
//
// Interface: vin is the generated input, dec the comparator decisions, count
// the ones count and vout the reconstructed sample. Latencies from vin: dec
// one cycle, count two, vout three. The reference side of the comparators'
// differential input is tied to 0 mV. en advances the sine source; the
// converter itself runs on every clock. rst_n is synchronous, active low.
//
// Follows the document: the chain of sine source, ladderless NAND-comparator
// bank, Wallace tree ones adder and piecewise-linear inverse Gaussian, and the
// pipelining of the adder. Own choices: the clock, the mV scale, one pipeline
// register per stage and the reset.
module flash_adc_top
  import flash_adc_pkg::*;
#(
  parameter int unsigned N       = N_COMP,
  parameter int          SIGMA   = SIGMA_MV,
  parameter int unsigned SEED    = OFFSET_SEED,
  parameter longint      CLK_HZ  = 100_000_000,
  parameter longint      FREQ_HZ = 1_600_000,
  parameter int          AMPL_MV = VSIN_MV / 2,
  localparam int unsigned CW     = count_width(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  output sample_t       vin,
  output logic [N-1:0]  dec,
  output logic [CW-1:0] count,
  output sample_t       vout
);

  sample_t unused_cos;

  sine_gen #(
    .CLK_HZ (CLK_HZ),
    .FREQ_HZ(FREQ_HZ),
    .AMPL_MV(AMPL_MV)
  ) u_sine (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (en),
    .sample(vin),
    .cosine(unused_cos)
  );

  comparator_bank #(
    .N    (N),
    .SIGMA(SIGMA),
    .SEED (SEED)
  ) u_bank (
    .clk  (clk),
    .rst_n(rst_n),
    .vin_p(vin),
    .vin_n('0),
    .dec  (dec)
  );

  wallace_counter #(
    .N   (N),
    .PIPE(1'b1)
  ) u_count (
    .clk  (clk),
    .rst_n(rst_n),
    .din  (dec),
    .count(count)
  );

  inv_gauss_pwl #(
    .N    (N),
    .SIGMA(SIGMA),
    .PIPE (1'b1)
  ) u_invg (
    .clk  (clk),
    .rst_n(rst_n),
    .count(count),
    .vout (vout)
  );

endmodule
