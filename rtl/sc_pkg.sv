// sc_pkg: constants and types shared by the stochastic-computing (SC) blocks.
//
// A stochastic number (SN) here is an N-bit binary value v turned into a
// bitstream of 2^N-1 bits whose fraction of ones is v/(2^N-1). The default
// N=8 gives 255-bit streams, the length the divider and square-root circuits
// are specified for. The LFSR feedback masks below are standard
// maximal-length tap sets; the particular polynomial is this design's choice.
package sc_pkg;

  // Default bit width of the stochastic number generators.
  parameter int unsigned SC_N = 8;

  // The four square-root kernels.
  typedef enum logic [1:0] {
    SSRC_A = 2'd0,  // OR gate + JKFF (K tied to 1) + DE
    SSRC_B = 2'd1,  // OR gate + AND gate + NOT gate + DE
    SSRC_C = 2'd2,  // MUX + NAND gate + DE
    SSRC_D = 2'd3   // MUX + AND gate + NOT gate + DE
  } ssrc_variant_e;

  // Smallest DE depth each kernel can run with: SSRC-A gets its first
  // feedback bit from the JKFF, the others need one DFF in the DE.
  function automatic int unsigned ssrc_min_de(ssrc_variant_e v);
    return (v == SSRC_A) ? 0 : 1;
  endfunction

  // Fibonacci LFSR feedback mask (bit i set = stage i+1 is tapped) of a
  // maximal-length polynomial, for widths 3 to 16. Period is 2^n-1.
  function automatic logic [15:0] lfsr_taps(int unsigned n);
    case (n)
      3:       return 16'h0006;
      4:       return 16'h000C;
      5:       return 16'h0014;
      6:       return 16'h0030;
      7:       return 16'h0060;
      8:       return 16'h00B8;  // x^8 + x^6 + x^5 + x^4 + 1
      9:       return 16'h0110;
      10:      return 16'h0240;
      11:      return 16'h0500;
      12:      return 16'h0E08;
      13:      return 16'h1C80;
      14:      return 16'h3802;
      15:      return 16'h6000;
      16:      return 16'hB400;
      default: return 16'h00B8;
    endcase
  endfunction

endpackage
