// crc_bank: the parallel bank of N CRC units.
//
// Every unit sees the same decoded bit stream and the same shift enable;
// unit k gets its own inversion strobe invert[k] from the control unit, so
// unit k checks the block with one particular bit flipped. All N candidate
// corrections are therefore tested in the time it takes to receive the
// block. pass[k] is unit k's all-ones remainder test, valid the cycle after
// the last bit.
//
// The bank structure and the XOR in front of each unit follow the
// document's architecture figure; N defaults to the 64 units of the FPGA
// implementation.
module crc_bank
  import gprs_edc_pkg::*;
#(
  parameter int unsigned N_CRC = 64
) (
  input  logic             clk,
  input  logic             clear,
  input  logic             shift_en,
  input  logic             wide,
  input  logic             data_bit,
  input  logic [N_CRC-1:0] invert,
  output logic [N_CRC-1:0] pass
);

  for (genvar k = 0; k < N_CRC; k++) begin : g_unit
    logic [CRC_W_WIDE-1:0] remainder;
    crc_unit u_crc (
      .clk      (clk),
      .clear    (clear),
      .shift_en (shift_en),
      .wide     (wide),
      .data_bit (data_bit),
      .invert   (invert[k]),
      .remainder(remainder),
      .pass     (pass[k])
    );
  end

endmodule
