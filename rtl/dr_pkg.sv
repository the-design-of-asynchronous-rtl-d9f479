// Shared constants of the asynchronous 8-point FFT.
//
// All data in this design travels on 4-phase dual-rail channels: every bit is a
// pair of wires (t, f). {t,f} = {0,0} is EMPTY (the spacer), {1,0} is a valid 1,
// {0,1} a valid 0, {1,1} never occurs. A channel alternates VALID and EMPTY
// codewords, each acknowledged by the receiver (ack high after VALID, low after
// EMPTY). Vectors are carried as two plain vectors, one per rail.
//
// The transform size (8 points, radix-2, decimation in frequency, single-path
// delay feedback) and the 16-bit complex data width follow the source design.
// The sample index tag (IDX_W bits) that rides with each sample is this
// implementation's own steering mechanism.
package dr_pkg;
  localparam int unsigned FFT_N     = 8;
  localparam int unsigned FFT_LOG_N = 3;
  localparam int unsigned DATA_W    = 16;   // width of real and of imaginary part
  localparam int unsigned IDX_W     = FFT_LOG_N;

  // sqrt(2)/2 ~= 2^-1 + 2^-3 + 2^-4 + 2^-6 + 2^-8 + 2^-14
  localparam int unsigned K_TERMS = 6;
  typedef int unsigned k_shift_t [K_TERMS];
  localparam k_shift_t K_SHIFTS = '{1, 3, 4, 6, 8, 14};
endpackage
