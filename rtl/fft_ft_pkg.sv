// fft_ft_pkg: constants and types shared by the fault-tolerant parallel FFT bank.
//
// The bank protects four parallel FFTs with one parity FFT and three sum-of-squares
// (Parseval) checks whose inputs are Hamming-coded combinations of the four channels.
// This package holds the transform length, the sample width, the Hamming syndrome
// decoding of the three check results, and the fault-injection bundle used to exercise
// the protection.
//
// The coding (which channels enter each check) and the syndrome table follow the
// published parity-SOS-ECC scheme. The transform length of 4 points, the 16-bit sample
// components and the fault-injection bundle are this design's own choices.
package fft_ft_pkg;

  // Number of points per transform. With 4 points every twiddle factor is 1, -1, j or -j,
  // so the transform is exact in integer arithmetic and the Parseval identity holds
  // bit-for-bit: sum |X[k]|^2 == N * sum |x[n]|^2.
  localparam int unsigned N    = 4;

  // Width of the real and of the imaginary part of an input sample (two's complement).
  // A 32-bit input word carries one complex sample as {re, im}.
  localparam int unsigned DW   = 16;

  // Number of original (protected) FFTs and of Parseval checks.
  localparam int unsigned NCH  = 4;
  localparam int unsigned NCHK = 3;

  // Module in error as located from the three check results c1 c2 c3.
  typedef enum logic [2:0] {
    LOC_NONE = 3'd0,
    LOC_Y1   = 3'd1,
    LOC_Y2   = 3'd2,
    LOC_Y3   = 3'd3,
    LOC_Y4   = 3'd4,
    LOC_C1   = 3'd5,   // only check 1 failed: the check path itself is faulty
    LOC_C2   = 3'd6,
    LOC_C3   = 3'd7
  } err_loc_e;

  // Syndrome decoding. Check 1 covers channels 1,2,3, check 2 covers 1,2,4 and check 3
  // covers 1,3,4, so each channel has a distinct set of failing checks:
  //   c1c2c3 = 111 -> y1, 110 -> y2, 101 -> y3, 011 -> y4, a single 1 -> that check.
  function automatic err_loc_e decode_syndrome(input logic [NCHK-1:0] c);
    // c[2] is c1, c[1] is c2, c[0] is c3
    unique case (c)
      3'b000:  return LOC_NONE;
      3'b111:  return LOC_Y1;
      3'b110:  return LOC_Y2;
      3'b101:  return LOC_Y3;
      3'b011:  return LOC_Y4;
      3'b100:  return LOC_C1;
      3'b010:  return LOC_C2;
      default: return LOC_C3;   // 3'b001
    endcase
  endfunction

  // Fault-injection targets, for testing the protection. A fault XORs a pattern into the
  // real part of one stream while it is valid.
  typedef enum logic [3:0] {
    INJ_NONE = 4'd0,
    INJ_FFT1 = 4'd1,   // output of original FFT 1
    INJ_FFT2 = 4'd2,
    INJ_FFT3 = 4'd3,
    INJ_FFT4 = 4'd4,
    INJ_FFTP = 4'd5,   // output of the parity FFT
    INJ_CHK1 = 4'd6,   // coded output sum X5 entering check 1
    INJ_CHK2 = 4'd7,
    INJ_CHK3 = 4'd8
  } inj_target_e;

  typedef struct packed {
    inj_target_e       target;
    logic [DW+1:0]     pattern;   // XORed into the low bits of the real part
  } fault_inj_t;

endpackage
