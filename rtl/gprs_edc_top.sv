// gprs_edc_top: single-bit error detection and correction (EDC) co-processor
// for the GPRS Block Check Sequence (BCS).
//
// A GPRS radio block whose BCS check fails is corrected, if a single bit is
// wrong, by trying every single-bit inversion at once: a bank of N CRC
// units receives the decoded block bit by bit as it arrives from the
// baseband DSP, and unit k inverts one chosen bit on the way in. When the
// last bit has been clocked, every unit's remainder is ready; the one
// that shows the all-ones remainder names the bit in error. With N = 64
// units and blocks of up to 447 bits (CS-4), the host runs the block
// through the co-processor up to 7 times, once per section of 64 bit
// positions, selecting the section in the CONFIG write that starts each
// pass.
//
// Host sequence per pass: write CONFIG (coding scheme, section); write each
// bit of the block to DATA (one write per bit, D0); read STATUS; if found,
// read RESULT for the bit position. STATUS and RESULT are valid the cycle
// after the last bit's write.
//
// Structure (interface unit, control unit, XOR plus CRC unit per bank
// entry, output unit) and the 64 x 7 sizing follow the document; the
// register map and bus timing are described in interface_unit.
module gprs_edc_top
  import gprs_edc_pkg::*;
#(
  parameter int unsigned N_CRC      = 64,
  parameter int unsigned N_SECTIONS = 7,
  parameter int unsigned DATA_W     = 16,
  parameter int unsigned ADDR_W     = 2
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              ce_n,
  input  logic              rd_n,
  input  logic              wr_n,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] data_in,
  output logic [DATA_W-1:0] data_out,
  output logic              data_oe
);

  localparam int unsigned SEC_W = (N_SECTIONS > 1) ? $clog2(N_SECTIONS) : 1;

  logic             cfg_we, bit_we, bit_val;
  cs_e              cfg_cs, cs;
  logic [SEC_W-1:0] cfg_section;
  logic             crc_clear, shift_en, wide, done, found;
  logic [N_CRC-1:0] invert, valid, pass;
  logic [POS_W-1:0] base, bit_cnt, pos;
  logic [$clog2(N_CRC+1)-1:0] n_pass;

  interface_unit #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .SEC_W(SEC_W)) u_if (
    .clk, .reset, .ce_n, .rd_n, .wr_n, .addr, .data_in, .data_out, .data_oe,
    .cfg_we, .cfg_cs, .cfg_section, .bit_we, .bit_val,
    .done (done & ~cfg_we),
    .found(found & done),
    .ambiguous(done && n_pass > 1),
    .pos, .bit_cnt
  );

  control_unit #(.N_CRC(N_CRC), .N_SECTIONS(N_SECTIONS), .SEC_W(SEC_W)) u_ctrl (
    .clk, .reset, .cfg_we, .cfg_cs, .cfg_section, .bit_we,
    .crc_clear, .shift_en, .wide, .invert, .valid, .base, .bit_cnt, .done, .cs
  );

  crc_bank #(.N_CRC(N_CRC)) u_bank (
    .clk, .clear(crc_clear), .shift_en, .wide, .data_bit(bit_val), .invert, .pass
  );

  output_unit #(.N_CRC(N_CRC)) u_out (
    .pass, .valid, .base, .found, .pos, .n_pass
  );

  // The sections must cover the longest block (CS-4).
  initial assert (N_CRC * N_SECTIONS >= 431 + 16)
    else $error("N_CRC * N_SECTIONS does not cover a CS-4 block");

endmodule
