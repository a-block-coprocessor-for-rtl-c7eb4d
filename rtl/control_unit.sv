// control_unit: sequencing of one pass of the EDC search.
//
// A pass covers one section: the group of N consecutive bit positions
// [section*N, section*N + N). On `cfg_we` the unit latches the coding scheme
// and the section number, zeroes its bit counter and clears the CRC bank.
// On each `bit_we` it lets the bank shift the bit in and, when the bit's
// position falls inside the current section, raises the inversion strobe
// of the one CRC unit that owns that position. Bits arriving after the
// coding scheme's block length are ignored. `done` rises when the last bit
// of the block has been shifted in. `valid[k]` marks the units whose
// position lies inside the block, so that the output unit ignores the
// units that, past the end of a short block, saw no inversion.
//
// Timing: the strobes are combinational from `bit_we`; `done` and the
// counter update on the clock edge that shifts the bit.
//
// The document gives the function (bit inversion under control, a maximum
// of 7 sections of 64 CRC units, the coding scheme written after reset); the
// counter and comparator structure is this design's own.
module control_unit
  import gprs_edc_pkg::*;
#(
  parameter int unsigned N_CRC      = 64,
  parameter int unsigned N_SECTIONS = 7,
  parameter int unsigned SEC_W      = (N_SECTIONS > 1) ? $clog2(N_SECTIONS) : 1
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             cfg_we,
  input  cs_e              cfg_cs,
  input  logic [SEC_W-1:0] cfg_section,
  input  logic             bit_we,
  output logic             crc_clear,
  output logic             shift_en,
  output logic             wide,
  output logic [N_CRC-1:0] invert,
  output logic [N_CRC-1:0] valid,
  output logic [POS_W-1:0] base,
  output logic [POS_W-1:0] bit_cnt,
  output logic             done,
  output cs_e              cs
);

  logic [SEC_W-1:0] section_q;
  logic [POS_W-1:0] len;
  logic [POS_W:0]   local_pos;

  assign len       = block_len(cs);
  assign wide      = (cs == CS1);
  assign base      = POS_W'(section_q * N_CRC);
  assign crc_clear = reset | cfg_we;
  assign shift_en  = bit_we & ~done & ~crc_clear;
  assign local_pos = {1'b0, bit_cnt} - {1'b0, base};

  always_comb begin
    invert = '0;
    for (int unsigned k = 0; k < N_CRC; k++) begin
      if (shift_en && bit_cnt >= base && local_pos == (POS_W+1)'(k)) invert[k] = 1'b1;
      valid[k] = ((POS_W+1)'(base) + (POS_W+1)'(k)) < (POS_W+1)'(len);
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      cs        <= CS4;
      section_q <= '0;
      bit_cnt   <= '0;
      done      <= 1'b0;
    end else if (cfg_we) begin
      cs        <= cfg_cs;
      section_q <= cfg_section;
      bit_cnt   <= '0;
      done      <= 1'b0;
    end else if (shift_en) begin
      bit_cnt <= bit_cnt + 1'b1;
      done    <= (bit_cnt + 1'b1 == len);
    end
  end

endmodule
