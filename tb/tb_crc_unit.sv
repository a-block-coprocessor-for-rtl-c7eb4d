// tb_crc_unit: checks one CRC unit against polynomial long division.
//
// For random blocks of every coding scheme it shifts the block in (a) as
// sent, (b) with one random bit flipped, (c) with that bit flipped and the
// unit's inversion strobe raised on it. The remainder must equal the long
// division result each time, and `pass` must be 1, 0 and 1 respectively.
// One bit per clock: the remainder is also checked to be ready the cycle
// after the last bit.
module tb_crc_unit;
  import gprs_edc_pkg::*;
  import tb_gprs_pkg::*;

  logic clk = 1'b0;
  logic clear, shift_en, wide, data_bit, invert;
  logic [39:0] remainder;
  logic pass;
  int checks = 0, failures = 0;

  crc_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(blk_t b, int n, int cs, int inv_at, bit exp_pass);
    logic [39:0] r, mask;
    clear = 1'b1; shift_en = 1'b0; invert = 1'b0; data_bit = 1'b0;
    wide = (cs == 0);
    @(posedge clk); #1;
    clear = 1'b0;
    for (int i = 0; i < n; i++) begin
      shift_en = 1'b1; data_bit = b[i]; invert = (i == inv_at);
      @(posedge clk); #1;
    end
    shift_en = 1'b0; invert = 1'b0;
    if (inv_at >= 0) b[inv_at] = ~b[inv_at];
    r = ref_remainder(b, n, cs);
    mask = (cs == 0) ? '1 : 40'hFFFF;
    checks++;
    if ((remainder & mask) !== (r & mask) || (cs != 0 && remainder[39:16] != 0)) begin
      failures++;
      $display("FAIL remainder cs=%0d got %h want %h", cs, remainder, r);
    end
    checks++;
    if (pass !== exp_pass) begin
      failures++;
      $display("FAIL pass cs=%0d inv=%0d got %0b want %0b", cs, inv_at, pass, exp_pass);
    end
  endtask

  initial begin
    blk_t b;
    int n, e, cs;
    for (int t = 0; t < 40; t++) begin
      cs = t % 4;
      n = blk_len(cs);
      b = make_block(cs);
      run(b, n, cs, -1, 1'b1);
      e = $urandom_range(0, n - 1);
      b[e] = ~b[e];
      run(b, n, cs, -1, 1'b0);
      run(b, n, cs, e, 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
