// output_unit: looks through the CRC bank for a unit that passed.
//
// Of the units marked valid, the lowest-numbered one whose remainder is all
// ones wins. `found` says that one passed; `pos` is the absolute position
// in the block of the bit that unit inverted (section base plus unit
// number), i.e. the bit the host must flip to correct the block. `n_pass`
// counts the passing units; more than one means the correction is
// ambiguous. Purely combinational.
//
// The document says only that the output unit examines the CRCs looking for
// a pass; the priority choice and the pass count are this design's own.
module output_unit
  import gprs_edc_pkg::*;
#(
  parameter int unsigned N_CRC = 64
) (
  input  logic [N_CRC-1:0]         pass,
  input  logic [N_CRC-1:0]         valid,
  input  logic [POS_W-1:0]         base,
  output logic                     found,
  output logic [POS_W-1:0]         pos,
  output logic [$clog2(N_CRC+1)-1:0] n_pass
);

  logic [N_CRC-1:0] hit;

  always_comb begin
    hit    = pass & valid;
    found  = 1'b0;
    pos    = '0;
    n_pass = '0;
    for (int k = N_CRC - 1; k >= 0; k--) begin
      if (hit[k]) begin
        found = 1'b1;
        pos   = base + POS_W'(k);
        n_pass = n_pass + 1'b1;
      end
    end
  end

endmodule
