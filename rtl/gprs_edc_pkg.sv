// gprs_edc_pkg: types and constants shared by the GPRS single-bit EDC
// co-processor.
//
// Holds the coding scheme encoding, the two Block Check Sequence (BCS)
// generator polynomials, the number of bits covered by the BCS in each
// coding scheme and the register map of the bus interface.
//
// From the GPRS coding definitions: the 16-bit BCS of CS-2..CS-4 uses
// g(D) = D^16 + D^12 + D^5 + 1 and the 40-bit BCS of CS-1 uses
// g(D) = (D^23 + 1)(D^17 + D^3 + 1) = D^40 + D^26 + D^23 + D^17 + D^3 + 1.
// A received block is good when its remainder after division by g(D) is
// all ones. Block lengths are data plus USF plus BCS: 184+40, 271+16,
// 315+16 and 431+16 bits.
//
// Own choices: the 2-bit coding scheme code, the register addresses and the
// bit positions inside the configuration and status words.
package gprs_edc_pkg;

  typedef enum logic [1:0] {
    CS1 = 2'd0,
    CS2 = 2'd1,
    CS3 = 2'd2,
    CS4 = 2'd3
  } cs_e;

  // Widest BCS register (CS-1) and the narrow one (CS-2..CS-4).
  localparam int unsigned CRC_W_WIDE   = 40;
  localparam int unsigned CRC_W_NARROW = 16;

  // Generator polynomials without their leading D^L term.
  localparam logic [39:0] POLY40 = 40'h00_0482_0009; // D^26+D^23+D^17+D^3+1
  localparam logic [15:0] POLY16 = 16'h1021;         // D^12+D^5+1

  // Bit index width: the longest block (CS-4, 447 bits) needs 9 bits.
  localparam int unsigned POS_W = 9;

  // Number of bits covered by the BCS, data first, BCS last.
  function automatic logic [POS_W-1:0] block_len(cs_e cs);
    case (cs)
      CS1:     return POS_W'(184 + 40);
      CS2:     return POS_W'(271 + 16);
      CS3:     return POS_W'(315 + 16);
      default: return POS_W'(431 + 16);
    endcase
  endfunction

  // Register map of the bus interface (word addresses).
  localparam logic [1:0] ADDR_CONFIG = 2'd0; // W: coding scheme + section, R: result
  localparam logic [1:0] ADDR_DATA   = 2'd1; // W: one decoded bit on D0, R: status
  localparam logic [1:0] ADDR_RESULT = 2'd0;
  localparam logic [1:0] ADDR_STATUS = 2'd1;

  // Configuration word written to ADDR_CONFIG: D1..D0 coding scheme,
  // D2 upwards the section number. Status word read from ADDR_STATUS.
  localparam int unsigned CFG_SECTION_LSB = 2;
  localparam int unsigned STAT_DONE  = 0; // all bits of the block clocked in
  localparam int unsigned STAT_FOUND = 1; // a CRC unit of this section passed

endpackage
