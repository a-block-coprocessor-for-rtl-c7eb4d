// tb_crc_bank: checks the bank of 64 CRC units.
//
// Unit k is given the inversion strobe on bit k of the block. Blocks of
// every coding scheme carry no error, one error among the first 64 bits, or
// one error further on. For every unit the expected pass flag is worked out
// by flipping that unit's bit in a copy of the block and running the
// long-division reference on it.
module tb_crc_bank;
  import gprs_edc_pkg::*;
  import tb_gprs_pkg::*;

  localparam int N = 64;
  logic clk = 1'b0;
  logic clear, shift_en, wide, data_bit;
  logic [N-1:0] invert, pass, expect_pass;
  int checks = 0, failures = 0;

  crc_bank #(.N_CRC(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_t b, c;
    int n, e, cs;
    for (int t = 0; t < 24; t++) begin
      cs = t % 4;
      n = blk_len(cs);
      b = make_block(cs);
      case ((t / 4) % 3)
        0: e = -1;
        1: e = $urandom_range(0, N - 1);
        default: e = $urandom_range(N, n - 1);
      endcase
      if (e >= 0) b[e] = ~b[e];
      for (int k = 0; k < N; k++) begin
        c = b; c[k] = ~c[k];
        expect_pass[k] = passes(c, n, cs);
      end
      clear = 1'b1; shift_en = 1'b0; invert = '0; wide = (cs == 0); data_bit = 1'b0;
      @(posedge clk); #1;
      clear = 1'b0;
      for (int i = 0; i < n; i++) begin
        shift_en = 1'b1; data_bit = b[i];
        invert = (i < N) ? (N'(1) << i) : '0;
        @(posedge clk); #1;
      end
      shift_en = 1'b0; invert = '0;
      checks++;
      if (pass !== expect_pass) begin
        failures++;
        $display("FAIL cs=%0d e=%0d pass=%h want %h", cs, e, pass, expect_pass);
      end
      // the reference itself must see the planted error
      checks++;
      if ((e >= 0 && e < N) != (expect_pass == (N'(1) << e) && expect_pass != 0)) begin
        failures++;
        $display("FAIL reference cs=%0d e=%0d", cs, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
