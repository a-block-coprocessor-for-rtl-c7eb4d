// interface_unit: parallel microprocessor bus slave towards the baseband DSP.
//
// Bus: chip enable `ce_n`, read strobe `rd_n` and write strobe `wr_n`, all
// active low and sampled on `clk`, a small word address and a data bus
// split into `data_in`/`data_out` with `data_oe` for an external tri-state
// driver. A write is taken once per strobe, on the first clock edge at which
// ce_n and wr_n are both low, so strobes may last any number of cycles but
// must go high between two writes. Reads are combinational while ce_n and
// rd_n are low.
//
// Register map (word addresses):
//   0 write  CONFIG  D1..D0 coding scheme (0=CS-1 .. 3=CS-4), D2.. section;
//                    starts a new pass (clears the CRC bank and bit counter)
//   1 write  DATA    D0 = next decoded bit of the block
//   0 read   RESULT  D8..D0 position of the bit that, inverted, makes the
//                    block pass its BCS
//   1 read   STATUS  D0 done, D1 found, D2 more than one unit passed,
//                    D12..D4 number of bits clocked in so far
//
// The document fixes the signal set (data, address, RD, WR, Reset, CE,
// clock), that bits arrive one at a time on D0 and that the result comes
// back on D0-D8. The addresses, the active-low strobes, the one-write-per-
// strobe rule and the status word are this design's choices.
module interface_unit
  import gprs_edc_pkg::*;
#(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned ADDR_W = 2,
  parameter int unsigned SEC_W  = 3
) (
  input  logic              clk,
  input  logic              reset,
  // bus side
  input  logic              ce_n,
  input  logic              rd_n,
  input  logic              wr_n,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] data_in,
  output logic [DATA_W-1:0] data_out,
  output logic              data_oe,
  // co-processor side
  output logic              cfg_we,
  output cs_e               cfg_cs,
  output logic [SEC_W-1:0]  cfg_section,
  output logic              bit_we,
  output logic              bit_val,
  input  logic              done,
  input  logic              found,
  input  logic              ambiguous,
  input  logic [POS_W-1:0]  pos,
  input  logic [POS_W-1:0]  bit_cnt
);

  logic wr_act, wr_prev, wr_pulse, rd_act;

  assign wr_act   = ~ce_n & ~wr_n;
  assign rd_act   = ~ce_n & ~rd_n;
  assign wr_pulse = wr_act & ~wr_prev;

  always_ff @(posedge clk) begin
    if (reset) wr_prev <= 1'b0;
    else       wr_prev <= wr_act;
  end

  assign cfg_we      = wr_pulse && (addr == ADDR_W'(ADDR_CONFIG));
  assign bit_we      = wr_pulse && (addr == ADDR_W'(ADDR_DATA));
  assign cfg_cs      = cs_e'(data_in[1:0]);
  assign cfg_section = data_in[CFG_SECTION_LSB +: SEC_W];
  assign bit_val     = data_in[0];

  always_comb begin
    data_out = '0;
    data_oe  = rd_act;
    if (rd_act) begin
      if (addr == ADDR_W'(ADDR_RESULT)) begin
        data_out[POS_W-1:0] = pos;
      end else if (addr == ADDR_W'(ADDR_STATUS)) begin
        data_out[STAT_DONE]  = done;
        data_out[STAT_FOUND] = found;
        data_out[2]          = ambiguous;
        data_out[4 +: POS_W] = bit_cnt;
      end
    end
  end

  // A bus master never reads and writes in the same cycle.
  a_no_rd_wr: assert property (@(posedge clk) disable iff (reset) !(rd_act && wr_act));

endmodule
