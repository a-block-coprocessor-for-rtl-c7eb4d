// tb_control_unit: checks the sequencing of one pass for every coding
// scheme and section: the inversion strobe must go to unit (i - 64*section)
// exactly when bit i of that section is shifted, bits past the block length
// must be refused, `done` must rise right after the last bit, and the valid
// mask must cover exactly the positions inside the block.
module tb_control_unit;
  import gprs_edc_pkg::*;
  import tb_gprs_pkg::*;

  localparam int N = 64;
  localparam int NS = 7;
  logic clk = 1'b0, reset;
  logic cfg_we, bit_we;
  cs_e cfg_cs, cs;
  logic [2:0] cfg_section;
  logic crc_clear, shift_en, wide, done;
  logic [N-1:0] invert, valid, exp_inv, exp_valid;
  logic [POS_W-1:0] base, bit_cnt;
  int checks = 0, failures = 0;

  control_unit #(.N_CRC(N), .N_SECTIONS(NS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (cs=%0d section=%0d bit_cnt=%0d)", what, cs, cfg_section, bit_cnt);
    end
  endtask

  initial begin
    int n;
    reset = 1'b1; cfg_we = 1'b0; bit_we = 1'b0; cfg_cs = CS4; cfg_section = '0;
    repeat (2) @(posedge clk); #1;
    reset = 1'b0;
    for (int c = 0; c < 4; c++) begin
      for (int s = 0; s < NS; s++) begin
        n = blk_len(c);
        cfg_cs = cs_e'(c); cfg_section = 3'(s); cfg_we = 1'b1;
        #1;
        check(crc_clear && !shift_en, "config clears the bank");
        @(posedge clk); #1;
        cfg_we = 1'b0;
        check(cs == cs_e'(c) && wide == (c == 0) && base == POS_W'(s * N), "config latched");
        for (int k = 0; k < N; k++) exp_valid[k] = (s * N + k) < n;
        check(valid == exp_valid, "valid mask");
        for (int i = 0; i < n + 3; i++) begin
          // idle cycles between some bits
          if (($urandom & 3) == 0) begin
            bit_we = 1'b0; #1;
            check(invert == 0 && !shift_en, "no strobe without a bit");
            @(posedge clk); #1;
          end
          bit_we = 1'b1; #1;
          exp_inv = (i >= s * N && i < s * N + N && i < n) ? (N'(1) << (i - s * N)) : '0;
          check(shift_en == (i < n), "shift enable");
          check(invert == exp_inv, "inversion strobe");
          check(done == (i >= n), "done flag");
          @(posedge clk); #1;
          bit_we = 1'b0;
        end
        check(bit_cnt == POS_W'(n), "bit count");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
