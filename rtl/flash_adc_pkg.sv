// flash_adc_pkg: types and constants shared by the stochastic flash ADC.
//
// The converter has no reference ladder. Every comparator sees the same input,
// and its trip point is set only by its own random offset, which is Gaussian
// with zero mean. The number of comparators that trip therefore follows the
// Gaussian CDF of the input, and an inverse-Gaussian stage linearises it.
//
// Voltages are carried as signed integers in millivolts (1 LSB = 1 mV); this
// scale is a choice of this design. The 7 V reference range and the 5 V sine
// range follow the input-signal specification (Vref 7 V, Vsinin 5 V). The 15
// comparators follow the "15-bit" of the converter's name, read as fifteen
// one-bit comparator decisions summed by a 15-input Wallace tree into a 4-bit
// count. The offset spread SIGMA_MV is chosen so that the central 90 % of the
// offset distribution (+-1.645 sigma) spans the 5 V sine swing.
package flash_adc_pkg;

  // Width of a voltage sample in mV; +-32.767 V is ample for the 7 V range.
  parameter int unsigned SAMPLE_W = 16;
  typedef logic signed [SAMPLE_W-1:0] sample_t;

  // Number of comparators in the flash bank, and the width of their count.
  parameter int unsigned N_COMP = 15;

  // Reference range (7 V peak to peak) and sine range (5 V peak to peak).
  parameter int VREF_MV  = 7000;
  parameter int VSIN_MV  = 5000;

  // Standard deviation of the comparator offsets, in mV:
  // 2500 mV / 1.6449 = 1520 mV.
  parameter int SIGMA_MV = 1520;

  // Seed of the offset generator (the "die" being modelled).
  parameter int unsigned OFFSET_SEED = 32'h1234_5678;

  // Bits needed to count 0..n ones.
  function automatic int unsigned count_width(input int unsigned n);
    return $clog2(n + 1);
  endfunction

  // Offset of comparator idx, in mV, for a bank with spread sigma_mv.
  // A 32-bit linear congruential generator gives uniform numbers; the sum of
  // twelve of them, minus six, is close to a standard normal variate
  // (Irwin-Hall). Comparator idx uses the 12 numbers following the first
  // 12*idx of the sequence. Evaluated at elaboration time only.
  function automatic int gauss_offset_mv(input int unsigned idx,
                                         input int sigma_mv,
                                         input int unsigned seed);
    logic [31:0] state;
    longint      sum;
    state = seed;
    sum   = 0;
    for (int unsigned k = 0; k < 12 * (idx + 1); k++) begin
      state = state * 32'd1664525 + 32'd1013904223;
      if (k >= 12 * idx) sum += longint'(state[31:16]);
    end
    // sum/65536 - 6 is ~N(0,1); scale by sigma and round to nearest mV.
    return int'(((sum - 64'sd393216) * longint'(sigma_mv) + 64'sd32768) >>> 16);
  endfunction

endpackage
