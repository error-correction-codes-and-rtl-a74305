// psecc_pkg -- types and constants shared by the parity-SOS-ECC parallel FFT.
//
// The three Parseval checks form a Hamming-style code over the four
// original FFTs: check c1 covers FFTs 1,2,3, c2 covers 1,2,4 and c3 covers
// 1,3,4. A failing set of checks (the syndrome {c1,c2,c3}) names the FFT
// in error: 111 -> FFT1, 110 -> FFT2, 101 -> FFT3, 011 -> FFT4. The
// syndromes with a single bit set cannot come from one faulty FFT; this
// design reports them as a check-side error and corrects nothing.
package psecc_pkg;
  localparam int unsigned NUM_FFT   = 4;
  localparam int unsigned NUM_CHECK = 3;

  // which original FFT each check covers (bit i = FFT i+1)
  localparam logic [NUM_FFT-1:0] CHECK_COVER [NUM_CHECK] = '{4'b0111, 4'b1011, 4'b1101};

  typedef enum logic [2:0] {
    LOC_NONE  = 3'd0,   // syndrome 000: no error
    LOC_FFT1  = 3'd1,
    LOC_FFT2  = 3'd2,
    LOC_FFT3  = 3'd3,
    LOC_FFT4  = 3'd4,
    LOC_CHECK = 3'd5    // single-bit syndrome: error outside the FFTs
  } loc_t;

  // syndrome is {c1, c2, c3}
  function automatic loc_t decode_syndrome(input logic [NUM_CHECK-1:0] syn);
    unique case (syn)
      3'b000:  return LOC_NONE;
      3'b111:  return LOC_FFT1;
      3'b110:  return LOC_FFT2;
      3'b101:  return LOC_FFT3;
      3'b011:  return LOC_FFT4;
      default: return LOC_CHECK;
    endcase
  endfunction
endpackage
